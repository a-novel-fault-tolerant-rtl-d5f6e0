// f2g: the 3x3 Feynman double gate (F2G), a parity preserving reversible gate.
//
//   P = A
//   Q = A ^ B
//   R = A ^ C
//
// A controls two CNOTs. With B = C = 0 it makes two copies of A, which is how
// parity preserving circuits fan a signal out (fan-out of a line is not
// allowed in reversible logic). A^B^C == P^Q^R for every input.
// These are the usual equations of the gate; its quantum cost is 2.
// Purely combinational.
module f2g (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = a ^ b;
    r = a ^ c;
  end

endmodule
