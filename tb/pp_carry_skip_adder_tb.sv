// pp_carry_skip_adder_tb: tests the multi-block carry skip adder at its
// default size (2 blocks, all 2^17 inputs) and at 8 blocks (32 bits, random
// inputs plus long carry chains). Checks sum and carry against integer
// addition, each block's skip output against AND of its A xor B bits, and the
// parity of all output lines. Counts skips and ripples per run and fails if
// either never happened, or if a carry never skipped from one block across
// the next.
module pp_carry_skip_adder_tb;
  import pp_pkg::*;

  localparam int unsigned B0 = 2;
  localparam int unsigned W0 = B0 * CSA_BLOCK_BITS;
  localparam int unsigned B1 = 8;
  localparam int unsigned W1 = B1 * CSA_BLOCK_BITS;

  logic [W0-1:0] a0, b0, s0;
  logic          c0, co0;
  logic [B0-1:0] k0;
  csa_garbage_t [B0-1:0] g0;

  logic [W1-1:0] a1, b1, s1;
  logic          c1, co1;
  logic [B1-1:0] k1;
  csa_garbage_t [B1-1:0] g1;

  int checks = 0;
  int failures = 0;
  int skips = 0;
  int ripples = 0;
  int double_skips = 0;

  pp_carry_skip_adder dut0 (
    .a(a0), .b(b0), .cin(c0), .sum(s0), .cout(co0), .skip(k0), .garbage(g0)
  );

  pp_carry_skip_adder #(.BLOCKS(B1)) dut1 (
    .a(a1), .b(b1), .cin(c1), .sum(s1), .cout(co1), .skip(k1), .garbage(g1)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [B1-1:0] block_prop(input logic [W1-1:0] x, input logic [W1-1:0] y,
                                               input int unsigned nblk);
    logic [B1-1:0] r = '0;
    for (int k = 0; k < int'(nblk); k++) begin
      logic [3:0] xn, yn;
      xn = 4'(x >> (4 * k));
      yn = 4'(y >> (4 * k));
      r[k] = ((xn ^ yn) == 4'hF);
    end
    return r;
  endfunction

  task automatic check1();
    longint unsigned total;
    #1;
    total = longint'(a1) + longint'(b1) + longint'(c1);
    check({co1, s1} == (W1+1)'(total),
          $sformatf("W=%0d %h+%h+%b: got %b_%h", W1, a1, b1, c1, co1, s1));
    check(k1 == block_prop(a1, b1, B1), $sformatf("W=%0d %h+%h: skip %b", W1, a1, b1, k1));
    check((^{a1, b1, c1}) == (^{s1, co1, g1}),
          $sformatf("W=%0d %h+%h+%b: parity", W1, a1, b1, c1));
    skips   += $countones(k1);
    ripples += B1 - $countones(k1);
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a1 = '0; b1 = '0; c1 = 1'b0;
    for (int i = 0; i < (1 << (2 * W0 + 1)); i++) begin
      int total;
      {a0, b0, c0} = (2 * W0 + 1)'(i);
      #1;
      total = int'(a0) + int'(b0) + int'(c0);
      check({co0, s0} == (W0+1)'(total),
            $sformatf("W=%0d %h+%h+%b: got %b_%h", W0, a0, b0, c0, co0, s0));
      check(k0 == B0'(block_prop(W1'(a0), W1'(b0), B0)),
            $sformatf("W=%0d %h+%h: skip %b", W0, a0, b0, k0));
      check((^{a0, b0, c0}) == (^{s0, co0, g0}),
            $sformatf("W=%0d %h+%h+%b: parity", W0, a0, b0, c0));
      skips   += $countones(k0);
      ripples += B0 - $countones(k0);
      if (&k0) double_skips++;
    end
    // carries that run the full width, through every skip path
    a1 = '1; b1 = '0; c1 = 1'b1; check1();
    a1 = '0; b1 = '1; c1 = 1'b0; check1();
    a1 = 32'h0FFF_FFF0; b1 = 32'h0000_000F; c1 = 1'b0; check1();
    for (int i = 0; i < 5000; i++) begin
      a1 = W1'($urandom); b1 = W1'($urandom); c1 = 1'($urandom);
      // make some blocks propagate so the skip path is used often
      if (i % 2 == 0) b1 = ~a1 ^ (W1'($urandom) & W1'($urandom) & W1'($urandom));
      check1();
    end
    check(skips > 0, "no block ever skipped");
    check(ripples > 0, "no block ever rippled");
    check(double_skips > 0, "a carry never skipped two blocks in a row");
    $display("skips=%0d ripples=%0d double_skips=%0d", skips, ripples, double_skips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
