// nmg_tb: exhaustive test of the Nayeem gate.
//
// Applies all 16 input patterns and compares (P,Q,R,S) with the gate's truth
// table, written out below row by row. It also checks that no output
// pattern repeats (the gate is reversible) and that the parity of the four
// outputs equals that of the four inputs.
module nmg_tb;

  // Expected {P,Q,R,S} for input {A,B,C,D} = 0..15.
  localparam logic [3:0] TRUTH [16] = '{
    4'b0000, 4'b0111, 4'b0001, 4'b0110,
    4'b0100, 4'b0011, 4'b0101, 4'b0010,
    4'b1000, 4'b1100, 4'b1001, 4'b1101,
    4'b1111, 4'b1011, 4'b1110, 4'b1010
  };

  logic a, b, c, d, p, q, r, s;
  int   checks = 0;
  int   failures = 0;
  logic [15:0] seen = '0;

  nmg dut (.a, .b, .c, .d, .p, .q, .r, .s);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b, c, d} = 4'(i);
      #1;
      check({p, q, r, s} == TRUTH[i],
            $sformatf("ABCD=%04b: PQRS=%04b expected %04b", 4'(i), {p, q, r, s}, TRUTH[i]));
      check((a ^ b ^ c ^ d) == (p ^ q ^ r ^ s),
            $sformatf("ABCD=%04b: parity not preserved", 4'(i)));
      check(!seen[{p, q, r, s}],
            $sformatf("ABCD=%04b: output %04b repeats", 4'(i), {p, q, r, s}));
      seen[{p, q, r, s}] = 1'b1;
    end
    check(&seen, "not every output pattern was produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
