// pp_toffoli: a Toffoli gate that preserves parity, made of a single NMG.
//
// The ordinary Toffoli gate (A, B, C) -> (A, B, AB^C) changes the parity of
// its lines whenever A&B is 1. Feeding an NMG with D tied to 0 gives
//
//   P = A,  Q = B,  R = A & B,  S = (A & B) ^ C
//
// so P, Q and S are the Toffoli outputs and R is the one garbage line that
// restores the parity: A^B^C == P^Q^R^S. One gate, one garbage output,
// one gate delay, quantum cost 7. Purely combinational.
module pp_toffoli (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,        // A
  output logic q,        // B
  output logic garbage,  // A & B
  output logic t         // (A & B) ^ C, the Toffoli target
);

  nmg u_nmg (
    .a(a), .b(b), .c(c), .d(1'b0),
    .p(p), .q(q), .r(garbage), .s(t)
  );

endmodule
