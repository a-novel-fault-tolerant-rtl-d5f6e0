// pp_full_adder: a parity preserving reversible full adder built from two
// NMG gates and two F2G gates (4 gates, 4 gate delays, quantum cost 18).
//
//   NMG #1 (A, B, 0, 0)        -> A, B, AB, AB
//   F2G #1 (A, B, 0)           -> A, A^B, A
//   NMG #2 (A^B, Cin, AB, 0)   -> A^B, Cin, (A^B)Cin, (A^B)Cin ^ AB = Cout
//   F2G #2 (A^B, Cin, 0)       -> A^B = P, A^B^Cin = S, A^B
//
// The adder has 3 data inputs and 5 constant-0 inputs, so 8 lines in and 8
// out: sum, carry out, the propagate signal P = A^B (used by the carry skip
// block) and five garbage lines. Since every gate keeps parity,
// A^B^Cin equals the XOR of all 8 outputs. The gate order and the constants
// follow the published structure; which of the two equal AB outputs of
// NMG #1 feeds NMG #2 (S here, R is garbage) is this design's choice.
// Purely combinational: all outputs settle 4 gate delays after the inputs.
module pp_full_adder
  import pp_pkg::*;
(
  input  logic        a,
  input  logic        b,
  input  logic        cin,
  output logic        sum,
  output logic        cout,
  output logic        prop,     // propagate P = A ^ B
  output fa_garbage_t garbage
);

  logic n1_p, n1_q, n1_s;   // A, B, AB from NMG #1
  logic f1_q;               // A ^ B from F2G #1
  logic n2_p, n2_q;         // A ^ B, Cin from NMG #2

  if ($bits(fa_garbage_t) != FA_GARBAGE) begin : g_bad_garbage_width
    $error("fa_garbage_t must hold %0d lines", FA_GARBAGE);
  end

  nmg u_nmg1 (
    .a(a), .b(b), .c(1'b0), .d(1'b0),
    .p(n1_p), .q(n1_q), .r(garbage.ab_r), .s(n1_s)
  );

  f2g u_f2g1 (
    .a(n1_p), .b(n1_q), .c(1'b0),
    .p(garbage.a_p), .q(f1_q), .r(garbage.a_r)
  );

  nmg u_nmg2 (
    .a(f1_q), .b(cin), .c(n1_s), .d(1'b0),
    .p(n2_p), .q(n2_q), .r(garbage.pc_r), .s(cout)
  );

  f2g u_f2g2 (
    .a(n2_p), .b(n2_q), .c(1'b0),
    .p(prop), .q(sum), .r(garbage.p_r)
  );

endmodule
