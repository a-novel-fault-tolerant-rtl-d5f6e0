// nmg: the 4x4 Nayeem gate (NMG), a parity preserving reversible gate.
//
//   P = A
//   Q = B ^ D
//   R = (~A & D) ^ (A & B)
//   S = R ^ C
//
// The map from (A,B,C,D) to (P,Q,R,S) is a bijection, and
// A^B^C^D == P^Q^R^S for every input, so a single flipped line anywhere in a
// network of such gates shows up as a parity mismatch at its outputs.
// R is a 2:1 multiplexer (A selects B, otherwise D); S adds C to it.
// With D = 0 the gate is a Toffoli gate that keeps parity (see pp_toffoli).
// The equations and the truth table are those the gate is defined by; the
// gate is purely combinational, with no clock or reset.
module nmg (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  always_comb begin
    p = a;
    q = b ^ d;
    r = (~a & d) ^ (a & b);
    s = r ^ c;
  end

endmodule
