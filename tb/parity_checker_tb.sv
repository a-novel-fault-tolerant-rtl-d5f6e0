// parity_checker_tb: tests the single error detector.
//
// Builds random input vectors and output vectors of equal parity (no error),
// then flips one random output bit (a single error) or two bits (which
// parity cannot see), and checks the error flag each time. Uses the default
// sizes and a wider instance.
module parity_checker_tb;

  localparam int unsigned IW = 17;
  localparam int unsigned OW = 67;

  logic [2:0]    in0;
  logic [7:0]    out0;
  logic          err0;
  logic [IW-1:0] in1;
  logic [OW-1:0] out1;
  logic          err1;

  int checks = 0;
  int failures = 0;

  parity_checker dut0 (.in_lines(in0), .out_lines(out0), .error(err0));
  parity_checker #(.IN_W(IW), .OUT_W(OW)) dut1 (.in_lines(in1), .out_lines(out1), .error(err1));

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
    for (int i = 0; i < 1000; i++) begin
      int f1, f2;
      in0  = 3'($urandom);
      out0 = 8'($urandom);
      in1  = IW'({$urandom, $urandom});
      out1 = OW'({$urandom, $urandom, $urandom});
      // repair the output parity with bit 0 so the vectors match
      if ($countones(out0) % 2 != $countones(in0) % 2) out0[0] = ~out0[0];
      if ($countones(out1) % 2 != $countones(in1) % 2) out1[0] = ~out1[0];
      #1;
      check(!err0 && !err1, $sformatf("vector %0d: error flagged with matching parity", i));
      f1 = int'($urandom_range(OW - 1));
      f2 = (f1 + 1 + int'($urandom_range(OW - 2))) % OW;
      out0[i % 8] = ~out0[i % 8];
      out1[f1]    = ~out1[f1];
      #1;
      check(err0 && err1, $sformatf("vector %0d: single flipped line not flagged", i));
      out1[f2] = ~out1[f2];
      #1;
      check(!err1, $sformatf("vector %0d: double error flagged", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
