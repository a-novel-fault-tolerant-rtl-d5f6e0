// pp_ripple_carry_adder: an n-bit parity preserving reversible ripple carry
// adder, a chain of n pp_full_adder stages.
//
// Stage i adds A[i], B[i] and the carry of stage i-1 (Cin for stage 0) and
// passes its carry to stage i+1; the carry of stage n-1 is Cout. Every stage
// also brings out its propagate signal P[i] = A[i]^B[i] and five garbage lines,
// so the adder has 7n+1 output lines for its 2n+1 data and 5n constant-0 inputs,
// and the XOR of all outputs equals the XOR of A, B and Cin.
// Cost: n stages of 4 gates, 6n garbage lines counting P, quantum cost 18n.
// Purely combinational; the delay grows by 4 gate delays per stage.
// WIDTH is n; the chain is the published structure, its default width of 4
// is this design's choice.
module pp_ripple_carry_adder
  import pp_pkg::*;
#(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0]  a,
  input  logic [WIDTH-1:0]  b,
  input  logic              cin,
  output logic [WIDTH-1:0]  sum,
  output logic              cout,
  output logic [WIDTH-1:0]  prop,
  output fa_garbage_t [WIDTH-1:0] garbage
);

  logic [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    pp_full_adder u_fa (
      .a(a[i]), .b(b[i]), .cin(carry[i]),
      .sum(sum[i]), .cout(carry[i+1]), .prop(prop[i]),
      .garbage(garbage[i])
    );
  end

  assign cout = carry[WIDTH];

endmodule
