// pp_toffoli_tb: exhaustive test of the parity preserving Toffoli gate.
//
// For all 8 inputs, checks the Toffoli outputs A, B, C xor (A and B), the
// garbage line A and B, that the four outputs keep the input parity and that
// the three Toffoli outputs alone form a reversible map.
module pp_toffoli_tb;

  logic a, b, c, p, q, garbage, t;
  int   checks = 0;
  int   failures = 0;
  logic [7:0] seen = '0;

  pp_toffoli dut (.a, .b, .c, .p, .q, .garbage, .t);

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
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      check(p == a && q == b, $sformatf("ABC=%03b: P/Q", 3'(i)));
      check(t == ((a && b) ? !c : c), $sformatf("ABC=%03b: target %b", 3'(i), t));
      check(garbage == (a && b), $sformatf("ABC=%03b: garbage", 3'(i)));
      check($countones({a, b, c}) % 2 == $countones({p, q, garbage, t}) % 2,
            $sformatf("ABC=%03b: parity", 3'(i)));
      check(!seen[{p, q, t}], $sformatf("ABC=%03b: Toffoli output repeats", 3'(i)));
      seen[{p, q, t}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
