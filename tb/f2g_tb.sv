// f2g_tb: exhaustive test of the Feynman double gate.
//
// For all 8 inputs, checks P = A, Q = A xor B and R = A xor C (worked out as
// sums modulo 2), that outputs never repeat and that parity is preserved.
module f2g_tb;

  logic a, b, c, p, q, r;
  int   checks = 0;
  int   failures = 0;
  logic [7:0] seen = '0;

  f2g dut (.a, .b, .c, .p, .q, .r);

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
      check(p == a, $sformatf("ABC=%03b: P", 3'(i)));
      check(q == 1'((int'(a) + int'(b)) % 2), $sformatf("ABC=%03b: Q", 3'(i)));
      check(r == 1'((int'(a) + int'(c)) % 2), $sformatf("ABC=%03b: R", 3'(i)));
      check($countones({a, b, c}) % 2 == $countones({p, q, r}) % 2,
            $sformatf("ABC=%03b: parity", 3'(i)));
      check(!seen[{p, q, r}], $sformatf("ABC=%03b: output repeats", 3'(i)));
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
