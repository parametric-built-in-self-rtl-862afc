// tb_pbist_top: end-to-end test of the parametric BIST at its default
// parameters (N_MAX = 28, 6-bit M and N), with the behavioural PLL and three
// behavioural circuits under test of different speed.
//
// f_in is 33 MHz. Each run scans in M and N, pulses start, waits for done,
// reads the result serially and compares it with the expected highest
// passing N, worked out from the CUT's path delay: N passes when the period
// M/(N*f_in) is at least the path delay. While a BIST run is on, the test
// bench measures f_out and checks it against N/M * f_in. Runs cover the
// N > N_max exit, a failing-signature exit, an initial N above N_max and a
// second M. Each mechanism is counted and must occur at least once.
`timescale 1ns / 1ps
module tb_pbist_top;
  localparam real TCLK = 1000.0 / 33.0;   // 33 MHz board clock

  logic clk = 1'b0, rst = 1'b1, start = 1'b0, scan_in = 1'b0, read_out = 1'b0;
  logic data_out, done, pll_ref, pll_fb, pll_fout, pll_lock;
  logic test_on, test_ready, good;
  logic [5:0] result;
  logic [2:0] ready_v, good_v;
  int   sel = 0;
  int   checks = 0, failures = 0;
  int   n_runs = 0, n_pass = 0, n_fail = 0, n_nmax_exit = 0, n_inc = 0,
        n_dec = 0, n_lock = 0, n_store = 0, n_freq = 0, n_settle_drop = 0;

  always #(TCLK / 2.0) clk = ~clk;

  pbist_top dut (
    .clk, .rst, .start, .scan_in, .read_out, .data_out, .done, .result,
    .pll_ref, .pll_fb, .pll_fout, .pll_lock,
    .test_on, .test_ready, .good
  );

  pll_cp_model u_pll (.ref_clk(pll_ref), .fb_clk(pll_fb), .fout(pll_fout), .lock(pll_lock));

  cut_model #(.PATH_DELAY(9.0))  u_cut_fast (.clk(pll_fout), .test_on(test_on && sel == 0),
                                             .test_ready(ready_v[0]), .good(good_v[0]));
  cut_model #(.PATH_DELAY(13.5)) u_cut_mid  (.clk(pll_fout), .test_on(test_on && sel == 1),
                                             .test_ready(ready_v[1]), .good(good_v[1]));
  cut_model #(.PATH_DELAY(30.0)) u_cut_slow (.clk(pll_fout), .test_on(test_on && sel == 2),
                                             .test_ready(ready_v[2]), .good(good_v[2]));
  assign test_ready = ready_v[sel];
  assign good       = good_v[sel];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Mechanism counters, observed on the design's internal strobes.
  always @(posedge clk) begin
    if (dut.n_inc)  n_inc++;
    if (dut.n_dec)  n_dec++;
    if (dut.store)  n_store++;
    if (dut.u_test.state == pbist_pkg::TST_LOCK && dut.u_test.lock_s) n_lock++;
    if (dut.u_test.state == pbist_pkg::TST_CHECK && dut.n_q > 6'd28) n_nmax_exit++;
    // The PLL drops a stale lock while the FSM waits out a change of N.
    if (dut.u_test.state == pbist_pkg::TST_SETTLE && dut.u_test.lock_s === 1'b0 &&
        dut.u_test.settle == 1) n_settle_drop++;
    if (dut.u_test.state == pbist_pkg::TST_SAMPLE) begin
      if (dut.u_test.good_s) n_pass++;
      else                   n_fail++;
    end
  end

  // f_out against N/M * f_in while the CUT runs.
  always @(posedge test_on) begin
    realtime t0;
    real expect_p, got_p;
    repeat (2) @(posedge pll_fout);
    t0 = $realtime;
    repeat (16) @(posedge pll_fout);
    got_p    = ($realtime - t0) / 16.0;
    expect_p = TCLK * real'(dut.m_q) / real'(dut.n_q);
    n_freq++;
    check(got_p > expect_p * 0.995 && got_p < expect_p * 1.005,
          $sformatf("f_out period %0.3f ns, expected %0.3f ns (M=%0d N=%0d)",
                    got_p, expect_p, dut.m_q, dut.n_q));
  end

  task automatic run(input int m, input int n, input int cut, input int exp_res);
    logic [11:0] bits;
    logic [5:0]  rd;
    sel  = cut;
    bits = {6'(m), 6'(n)};
    @(negedge clk) start = 1'b1;
    @(posedge clk);                       // start sampled, init rises
    for (int k = 11; k >= 0; k--) begin
      @(negedge clk) scan_in = bits[k];
      @(posedge clk);
    end
    @(posedge clk iff done);
    n_runs++;
    check(result == 6'(exp_res),
          $sformatf("M=%0d N0=%0d: result %0d, expected %0d", m, n, result, exp_res));
    check(dut.n_q == ((exp_res == 0) ? 6'(n - 1) : 6'(exp_res)),
          $sformatf("M=%0d N0=%0d: final N %0d", m, n, dut.n_q));
    @(negedge clk) read_out = 1'b1;
    for (int i = 5; i >= 0; i--) begin
      #1 rd[i] = data_out;
      @(negedge clk);
    end
    read_out = 1'b0;
    check(rd == 6'(exp_res), $sformatf("serial read %0d, expected %0d", rd, exp_res));
    start = 1'b0;
    repeat (4) @(posedge clk);
  endtask

  // Highest passing N for a CUT with path delay d, starting at n0.
  function automatic int expected(input int m, input int n0, input real d);
    int n = n0;
    if (n0 > 28) return 0;
    while (n <= 28 && (TCLK * m / n) >= d) n++;
    return n - 1 < n0 ? 0 : n - 1;
  endfunction

  initial begin
    repeat (5) @(posedge clk);
    rst = 1'b0;
    repeat (5) @(posedge clk);
    run(10, 18, 0, expected(10, 18, 9.0));    // every N passes: N > N_max exit
    run(10, 20, 1, expected(10, 20, 13.5));   // fails at N = 23
    run(10, 30, 1, 0);                        // start above N_max
    run(5, 10, 1, expected(5, 10, 13.5));     // M = 5, fails at N = 12
    run(10, 12, 2, 0);                        // first N already fails
    $display("runs=%0d pass=%0d fail=%0d nmax_exit=%0d inc=%0d dec=%0d lock=%0d store=%0d freq=%0d settle_unlocked=%0d",
             n_runs, n_pass, n_fail, n_nmax_exit, n_inc, n_dec, n_lock, n_store, n_freq, n_settle_drop);
    check(n_settle_drop > 0, "lock never seen low at the end of a settle wait");
    check(n_pass > 0, "no passing BIST run");
    check(n_fail > 0, "no failing BIST run");
    check(n_nmax_exit > 0, "N > N_max exit never taken");
    check(n_inc > 0 && n_dec > 0, "N never incremented or decremented");
    check(n_lock > 0, "PLL lock never reached");
    check(n_store == n_pass, "store count differs from pass count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
