// frg: the 3x3 Fredkin gate (FRG), a controlled swap.
//
//   P = A
//   Q = (~A & B) ^ (A & C)
//   R = (~A & C) ^ (A & B)
//
// When A is 1, B and C change places; otherwise they pass straight through.
// It is parity preserving (A^B^C == P^Q^R). With B = 0 the Q output is A & C,
// which the carry skip block uses as a parity preserving AND gate; with A as a
// select it is a 2:1 multiplexer on Q. Purely combinational.
module frg (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = (~a & b) ^ (a & c);
    r = (~a & c) ^ (a & b);
  end

endmodule
