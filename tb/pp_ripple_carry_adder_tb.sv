// pp_ripple_carry_adder_tb: tests the ripple carry adder at its default width
// (all 2^(2n+1) inputs) and at 16 bits (random inputs plus the longest carry
// chains). Sum and carry are checked against integer addition, the propagate
// outputs against A xor B, the number of garbage lines (6n, counting the
// propagate lines), and the parity of all output lines against the
// parity of A, B and Cin.
module pp_ripple_carry_adder_tb;
  import pp_pkg::*;

  localparam int unsigned W0 = 4;
  localparam int unsigned W1 = 16;

  logic [W0-1:0] a0, b0, s0, p0;
  logic          c0, co0;
  fa_garbage_t [W0-1:0] g0;

  logic [W1-1:0] a1, b1, s1, p1;
  logic          c1, co1;
  fa_garbage_t [W1-1:0] g1;

  int checks = 0;
  int failures = 0;

  pp_ripple_carry_adder dut0 (
    .a(a0), .b(b0), .cin(c0), .sum(s0), .cout(co0), .prop(p0), .garbage(g0)
  );

  pp_ripple_carry_adder #(.WIDTH(W1)) dut1 (
    .a(a1), .b(b1), .cin(c1), .sum(s1), .cout(co1), .prop(p1), .garbage(g1)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic check1();
    longint unsigned total;
    #1;
    total = longint'(a1) + longint'(b1) + longint'(c1);
    check({co1, s1} == (W1+1)'(total),
          $sformatf("W=%0d %h+%h+%b: got %b_%h", W1, a1, b1, c1, co1, s1));
    check(p1 == (a1 ^ b1), $sformatf("W=%0d %h+%h: P", W1, a1, b1));
    check((^{a1, b1, c1}) == (^{s1, co1, p1, g1}),
          $sformatf("W=%0d %h+%h+%b: parity", W1, a1, b1, c1));
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a1 = '0; b1 = '0; c1 = 1'b0;
    // 6n garbage outputs (propagate lines included)
    check($bits({p0, g0}) == 6 * W0, "4-bit adder does not have 24 garbage lines");
    check($bits({p1, g1}) == 6 * W1, "16-bit adder does not have 96 garbage lines");
    for (int i = 0; i < (1 << (2 * W0 + 1)); i++) begin
      int total;
      {a0, b0, c0} = (2 * W0 + 1)'(i);
      #1;
      total = int'(a0) + int'(b0) + int'(c0);
      check({co0, s0} == (W0+1)'(total),
            $sformatf("W=%0d %h+%h+%b: got %b_%h", W0, a0, b0, c0, co0, s0));
      check(p0 == (a0 ^ b0), $sformatf("W=%0d %h+%h: P", W0, a0, b0));
      check((^{a0, b0, c0}) == (^{s0, co0, p0, g0}),
            $sformatf("W=%0d %h+%h+%b: parity", W0, a0, b0, c0));
    end
    // longest carry chains
    a1 = '1; b1 = '0; c1 = 1'b1; check1();
    a1 = '0; b1 = '1; c1 = 1'b1; check1();
    a1 = '1; b1 = '1; c1 = 1'b1; check1();
    for (int i = 0; i < 2000; i++) begin
      a1 = W1'($urandom); b1 = W1'($urandom); c1 = 1'($urandom);
      check1();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
