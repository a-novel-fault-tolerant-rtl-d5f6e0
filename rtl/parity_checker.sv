// parity_checker: single error detector for a parity preserving circuit.
//
// A circuit built only from parity preserving gates has, on every input,
// XOR(all input lines) == XOR(all output lines). A single flipped line breaks
// this, so error = ^in_lines ^ ^out_lines is 1 exactly when an odd number of
// lines are wrong. Constant-0 inputs add nothing to the input parity and need
// not be connected. The checker is ordinary (irreversible) logic that sits
// beside the reversible circuit; its form is this design's choice.
// Combinational.
module parity_checker #(
  parameter int unsigned IN_W  = 3,
  parameter int unsigned OUT_W = 8
) (
  input  logic [IN_W-1:0]  in_lines,
  input  logic [OUT_W-1:0] out_lines,
  output logic             error
);

  always_comb error = (^in_lines) ^ (^out_lines);

endmodule
