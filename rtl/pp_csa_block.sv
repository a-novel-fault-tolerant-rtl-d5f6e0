// pp_csa_block: a 4-bit parity preserving reversible carry skip adder block.
//
// Structure (21 gates):
//   - F2G (Cin, 0, 0) makes copies of the block carry-in: Q feeds the
//     first full adder, R goes to the final selector, P is garbage.
//   - Four pp_full_adder stages ripple the carry C0..C3 and produce the sums
//     S0..S3 and the propagate signals P0..P3 (Pi = Ai ^ Bi).
//   - Three Fredkin gates with a constant-0 middle input act as AND gates:
//     FRG(P3,0,P2) -> P3P2, FRG(P1,0,P0) -> P1P0 and
//     FRG(P3P2,0,P1P0) -> PB = P0P1P2P3, the block propagate.
//   - A last Fredkin gate FRG(PB, C3, Cin) is a 2:1 multiplexer on its Q
//     output: Cout = Cin when PB = 1 (the carry skips the block), else C3.
// When PB = 1 the carry into the block leaves it unchanged, so both choices
// give the same value; the selector only shortens the path Cin -> Cout to
// the F2G plus one Fredkin gate.
// Lines: 9 data inputs and 25 constant-0 inputs; 4 sums, Cout and 29 garbage
// lines out. The XOR of all outputs equals A^B^Cin reduced to one bit.
// The gates, their constants and what each computes follow the published
// block; the order of the constant and data inputs on the Fredkin gates
// (control first, then 0, then the other operand) is this design's choice.
// Purely combinational.
module pp_csa_block
  import pp_pkg::*;
(
  input  logic [CSA_BLOCK_BITS-1:0] a,
  input  logic [CSA_BLOCK_BITS-1:0] b,
  input  logic                      cin,
  output logic [CSA_BLOCK_BITS-1:0] sum,
  output logic                      cout,
  output csa_garbage_t              garbage
);

  logic                      cin_fa;    // carry-in copy for the adders
  logic                      cin_skip;  // carry-in copy for the skip path
  logic [CSA_BLOCK_BITS:0]   carry;
  logic [CSA_BLOCK_BITS-1:0] prop;
  logic                      p32, p10, pb;

  // The line count of the block: 29 garbage lines.
  if ($bits(csa_garbage_t) != $bits(csa_lines_t)) begin : g_bad_garbage_width
    $error("csa_garbage_t must hold %0d lines", CSA_GARBAGE);
  end

  f2g u_fanout (
    .a(cin), .b(1'b0), .c(1'b0),
    .p(garbage.cin_p), .q(cin_fa), .r(cin_skip)
  );

  assign carry[0] = cin_fa;

  for (genvar i = 0; i < CSA_BLOCK_BITS; i++) begin : g_stage
    pp_full_adder u_fa (
      .a(a[i]), .b(b[i]), .cin(carry[i]),
      .sum(sum[i]), .cout(carry[i+1]), .prop(prop[i]),
      .garbage(garbage.fa[i])
    );
  end

  frg u_and_hi (
    .a(prop[3]), .b(1'b0), .c(prop[2]),
    .p(garbage.hi_p), .q(p32), .r(garbage.hi_r)
  );

  frg u_and_lo (
    .a(prop[1]), .b(1'b0), .c(prop[0]),
    .p(garbage.lo_p), .q(p10), .r(garbage.lo_r)
  );

  frg u_and_all (
    .a(p32), .b(1'b0), .c(p10),
    .p(garbage.mid_p), .q(pb), .r(garbage.mid_r)
  );

  frg u_skip_sel (
    .a(pb), .b(carry[CSA_BLOCK_BITS]), .c(cin_skip),
    .p(garbage.sel_p), .q(cout), .r(garbage.sel_r)
  );

endmodule
