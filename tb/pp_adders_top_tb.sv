// pp_adders_top_tb: end to end test of the top at its default sizes
// (4-bit ripple carry adder, 2-block 8-bit carry skip adder).
//
// 1. Applies every input of the Toffoli gate (8), the ripple carry adder
//    (512) and the carry skip adder (131072) and checks the results against
//    integer arithmetic, with every parity error flag low.
// 2. Fault injection: for a sample of inputs it flips one of the output
//    lines (sum, carry, propagate or garbage) that each circuit's parity
//    checker sees, as a single faulty line would, and checks that the
//    circuit's parity error flag goes high.
// It counts each mechanism: Toffoli target inverted, carry out of the ripple
// adder, a carry rippling the full ripple adder, a block skipped, a block
// rippled, a carry skipping both blocks, and a detected single error in each
// circuit. A mechanism that never happened counts as a failure.
module pp_adders_top_tb;
  import pp_pkg::*;

  localparam int unsigned RW = 4;
  localparam int unsigned CW = 8;
  localparam int unsigned CB = 2;

  logic          tg_a, tg_b, tg_c, tg_p, tg_q, tg_t, tg_parity_err;
  logic [RW-1:0] rca_a, rca_b, rca_sum, rca_prop;
  logic          rca_cin, rca_cout, rca_parity_err;
  logic [CW-1:0] csa_a, csa_b, csa_sum;
  logic          csa_cin, csa_cout, csa_parity_err;
  logic [CB-1:0] csa_skip;

  int checks = 0;
  int failures = 0;

  // mechanism counters
  int n_tg_flip = 0;
  int n_rca_cout = 0;
  int n_rca_full_ripple = 0;
  int n_csa_skip = 0;
  int n_csa_ripple = 0;
  int n_csa_double_skip = 0;
  int n_tg_detect = 0;
  int n_rca_detect = 0;
  int n_csa_detect = 0;

  pp_adders_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tg_a = 0; tg_b = 0; tg_c = 0;
    rca_a = '0; rca_b = '0; rca_cin = 0;
    csa_a = '0; csa_b = '0; csa_cin = 0;

    // ---------------- fault free, exhaustive ----------------
    for (int i = 0; i < 8; i++) begin
      {tg_a, tg_b, tg_c} = 3'(i);
      #1;
      check(tg_p == tg_a && tg_q == tg_b && tg_t == (tg_c ^ (tg_a & tg_b)),
            $sformatf("Toffoli %03b", 3'(i)));
      check(!tg_parity_err, $sformatf("Toffoli %03b: false parity error", 3'(i)));
      if (tg_t != tg_c) n_tg_flip++;
    end

    for (int i = 0; i < (1 << (2 * RW + 1)); i++) begin
      int total;
      {rca_a, rca_b, rca_cin} = (2 * RW + 1)'(i);
      #1;
      total = int'(rca_a) + int'(rca_b) + int'(rca_cin);
      check({rca_cout, rca_sum} == (RW+1)'(total),
            $sformatf("RCA %h+%h+%b: got %b_%h", rca_a, rca_b, rca_cin, rca_cout, rca_sum));
      check(rca_prop == (rca_a ^ rca_b), $sformatf("RCA %h+%h: P", rca_a, rca_b));
      check(!rca_parity_err, $sformatf("RCA %h+%h+%b: false parity error", rca_a, rca_b, rca_cin));
      if (rca_cout) n_rca_cout++;
      if (rca_cin && &(rca_a ^ rca_b)) n_rca_full_ripple++;
    end

    for (int i = 0; i < (1 << (2 * CW + 1)); i++) begin
      int total;
      logic [CW-1:0] pr;
      {csa_a, csa_b, csa_cin} = (2 * CW + 1)'(i);
      #1;
      total = int'(csa_a) + int'(csa_b) + int'(csa_cin);
      pr = csa_a ^ csa_b;
      check({csa_cout, csa_sum} == (CW+1)'(total),
            $sformatf("CSA %h+%h+%b: got %b_%h", csa_a, csa_b, csa_cin, csa_cout, csa_sum));
      check(csa_skip == {&pr[7:4], &pr[3:0]}, $sformatf("CSA %h+%h: skip %b", csa_a, csa_b, csa_skip));
      check(!csa_parity_err, $sformatf("CSA %h+%h+%b: false parity error", csa_a, csa_b, csa_cin));
      n_csa_skip   += $countones(csa_skip);
      n_csa_ripple += CB - $countones(csa_skip);
      if (&csa_skip && csa_cin) n_csa_double_skip++;
    end

    // ---------------- single line faults ----------------
    // One of the output lines seen by each circuit's checker is flipped.
    for (int i = 0; i < 200; i++) begin
      logic [3:0] tl, tmask;
      logic [2*RW+1+RW*FA_GARBAGE-1:0] rl, rmask;
      logic [CW+1+CB*CSA_GARBAGE-1:0]  cl, cmask;

      {tg_a, tg_b, tg_c} = 3'($urandom);
      rca_a = RW'($urandom); rca_b = RW'($urandom); rca_cin = 1'($urandom);
      csa_a = CW'($urandom); csa_b = CW'($urandom); csa_cin = 1'($urandom);
      #1;
      tl = dut.u_tg_chk.out_lines;
      rl = dut.u_rca_chk.out_lines;
      cl = dut.u_csa_chk.out_lines;
      tmask = 4'(1) << $urandom_range(3);
      rmask = ($bits(rl))'(1) << $urandom_range($bits(rl) - 1);
      cmask = ($bits(cl))'(1) << $urandom_range($bits(cl) - 1);

      force dut.u_tg_chk.out_lines  = tl ^ tmask;
      force dut.u_rca_chk.out_lines = rl ^ rmask;
      force dut.u_csa_chk.out_lines = cl ^ cmask;
      #1;
      check(tg_parity_err,  $sformatf("Toffoli fault mask %b not detected", tmask));
      check(rca_parity_err, $sformatf("RCA fault mask %h not detected", rmask));
      check(csa_parity_err, $sformatf("CSA fault mask %h not detected", cmask));
      if (tg_parity_err)  n_tg_detect++;
      if (rca_parity_err) n_rca_detect++;
      if (csa_parity_err) n_csa_detect++;
      release dut.u_tg_chk.out_lines;
      release dut.u_rca_chk.out_lines;
      release dut.u_csa_chk.out_lines;
      #1;
      check(!tg_parity_err && !rca_parity_err && !csa_parity_err,
            "parity error still flagged after the fault was removed");
    end

    $display("mechanisms: tg_flip=%0d rca_cout=%0d rca_full_ripple=%0d csa_skip=%0d csa_ripple=%0d csa_double_skip=%0d",
             n_tg_flip, n_rca_cout, n_rca_full_ripple, n_csa_skip, n_csa_ripple, n_csa_double_skip);
    $display("detected single errors: tg=%0d rca=%0d csa=%0d", n_tg_detect, n_rca_detect, n_csa_detect);
    check(n_tg_flip > 0, "Toffoli target never inverted");
    check(n_rca_cout > 0, "ripple adder never produced a carry out");
    check(n_rca_full_ripple > 0, "carry never rippled through the whole ripple adder");
    check(n_csa_skip > 0, "no carry skip block was ever bypassed");
    check(n_csa_ripple > 0, "no carry skip block ever rippled");
    check(n_csa_double_skip > 0, "a carry never skipped both blocks");
    check(n_tg_detect > 0, "no Toffoli single error detected");
    check(n_rca_detect > 0, "no ripple adder single error detected");
    check(n_csa_detect > 0, "no carry skip adder single error detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
