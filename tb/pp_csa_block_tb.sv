// pp_csa_block_tb: exhaustive test of the 4-bit carry skip block.
//
// For all 512 inputs, checks the sum and carry-out against integer addition,
// the block propagate (garbage line sel_p) against AND of A xor B, the AND
// tree lines, the line counts, and the parity of the 34 output lines
// against A, B and Cin.
// It counts how often the carry skipped the block and how often it rippled,
// and fails if either never happened.
module pp_csa_block_tb;
  import pp_pkg::*;

  logic [3:0]   a, b, sum;
  logic         cin, cout;
  csa_garbage_t garbage;
  int checks = 0;
  int failures = 0;
  int skipped = 0;
  int rippled = 0;

  pp_csa_block dut (.a, .b, .cin, .sum, .cout, .garbage);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 34 lines in and out, 29 of them garbage
    check($bits(garbage) == 29, "block does not have 29 garbage lines");
    check($bits({sum, cout, garbage}) == 34, "block does not have 34 output lines");
    for (int i = 0; i < 512; i++) begin
      int total;
      logic [3:0] pr;
      {a, b, cin} = 9'(i);
      #1;
      total = int'(a) + int'(b) + int'(cin);
      pr = a ^ b;
      check({cout, sum} == 5'(total),
            $sformatf("%h+%h+%b: got %b_%h expected %0d", a, b, cin, cout, sum, total));
      check(garbage.sel_p == (pr == 4'hF), $sformatf("%h+%h: block propagate", a, b));
      check(garbage.hi_p == pr[3] && garbage.lo_p == pr[1] &&
            garbage.mid_p == (pr[3] && pr[2]) && garbage.cin_p == cin,
            $sformatf("%h+%h+%b: AND tree / fan-out lines", a, b, cin));
      // the unused selector output carries the candidate not chosen; both
      // candidates equal Cin when the block propagates, so it is always Cin
      check(garbage.sel_r == cin,
            $sformatf("%h+%h+%b: selector R line", a, b, cin));
      check((^{a, b, cin}) == (^{sum, cout, garbage}),
            $sformatf("%h+%h+%b: parity of 34 lines", a, b, cin));
      if (pr == 4'hF) skipped++;
      else rippled++;
    end
    check(skipped > 0, "carry never skipped the block");
    check(rippled > 0, "carry never rippled through the block");
    $display("skipped=%0d rippled=%0d", skipped, rippled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
