// pp_full_adder_tb: exhaustive test of the parity preserving full adder.
//
// For all 8 inputs, checks sum and carry against integer addition, the
// propagate output against A xor B, the number of garbage lines, every garbage line against the value its
// gate must carry, and that the XOR of all 8 output lines equals A^B^Cin.
module pp_full_adder_tb;
  import pp_pkg::*;

  logic        a, b, cin, sum, cout, prop;
  fa_garbage_t garbage;
  int          checks = 0;
  int          failures = 0;

  pp_full_adder dut (.a, .b, .cin, .sum, .cout, .prop, .garbage);

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
    // 6 garbage outputs: everything but sum and carry out
    check($bits({prop, garbage}) == 6, "full adder does not have 6 garbage lines");
    for (int i = 0; i < 8; i++) begin
      int total;
      {a, b, cin} = 3'(i);
      #1;
      total = int'(a) + int'(b) + int'(cin);
      check({cout, sum} == 2'(total),
            $sformatf("A B Cin=%03b: Cout,S=%b%b expected %0d", 3'(i), cout, sum, total));
      check(prop == (a != b), $sformatf("A B Cin=%03b: P", 3'(i)));
      check(garbage.ab_r == (a && b) && garbage.a_p == a && garbage.a_r == a &&
            garbage.pc_r == ((a != b) && cin) && garbage.p_r == (a != b),
            $sformatf("A B Cin=%03b: garbage lines %05b", 3'(i), garbage));
      check($countones({a, b, cin}) % 2 == $countones({sum, cout, prop, garbage}) % 2,
            $sformatf("A B Cin=%03b: parity of the 8 lines", 3'(i)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
