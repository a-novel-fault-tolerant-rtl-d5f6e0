// frg_tb: exhaustive test of the Fredkin gate.
//
// For all 8 inputs, checks that B and C pass straight through when A = 0
// and swap when A = 1, that outputs never repeat and that parity is kept.
module frg_tb;

  logic a, b, c, p, q, r;
  int   checks = 0;
  int   failures = 0;
  logic [7:0] seen = '0;

  frg dut (.a, .b, .c, .p, .q, .r);

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
      logic eq, er;
      {a, b, c} = 3'(i);
      #1;
      if (a) begin eq = c; er = b; end
      else   begin eq = b; er = c; end
      check(p == a && q == eq && r == er,
            $sformatf("ABC=%03b: PQR=%b%b%b expected %b%b%b", 3'(i), p, q, r, a, eq, er));
      check($countones({a, b, c}) % 2 == $countones({p, q, r}) % 2,
            $sformatf("ABC=%03b: parity", 3'(i)));
      check(!seen[{p, q, r}], $sformatf("ABC=%03b: output repeats", 3'(i)));
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
