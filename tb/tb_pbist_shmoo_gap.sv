// tb_pbist_shmoo_gap: the two evaluation cases of the parametric BIST at
// default parameters, f_in = 33 MHz and M = 10 (3.3 MHz steps).
//
// 1. Full range: a CUT faster than the top BIST frequency is searched from
//    N = 1; the result must be N_MAX = 28, i.e. 92.4 MHz, and the measured
//    f_out at N = 28 must be 92.4 MHz.
// 2. Pass island: a CUT whose main pass region ends at a 14.3 ns period
//    (69.93 MHz), that fails between 14.3 ns and 12.8 ns (78.125 MHz) and
//    passes again in an island from 12.8 ns down to 12.0 ns. The linear
//    search from N = 1 must stop at N = 21 (69.3 MHz), below the gap. Two
//    of the 3.3 MHz steps (N = 22, 23) fall in the gap. For comparison, a
//    search started above the gap, at N = 24, must report the island
//    (N = 25, 82.5 MHz): the error a search that skips the gap makes.
`timescale 1ns / 1ps
module tb_pbist_shmoo_gap;
  localparam real TCLK = 1000.0 / 33.0;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0, scan_in = 1'b0, read_out = 1'b0;
  logic data_out, done, pll_ref, pll_fb, pll_fout, pll_lock;
  logic test_on, test_ready, good;
  logic [5:0] result;
  logic [1:0] ready_v, good_v;
  int   sel = 0;
  int   checks = 0, failures = 0;
  real  fout_mhz = 0.0;

  always #(TCLK / 2.0) clk = ~clk;

  pbist_top dut (
    .clk, .rst, .start, .scan_in, .read_out, .data_out, .done, .result,
    .pll_ref, .pll_fb, .pll_fout, .pll_lock,
    .test_on, .test_ready, .good
  );

  pll_cp_model u_pll (.ref_clk(pll_ref), .fb_clk(pll_fb), .fout(pll_fout), .lock(pll_lock));

  cut_model #(.PATH_DELAY(9.0)) u_cut_fast (.clk(pll_fout), .test_on(test_on && sel == 0),
                                            .test_ready(ready_v[0]), .good(good_v[0]));
  cut_model #(.PATH_DELAY(14.3), .ISLAND_LO(12.0), .ISLAND_HI(12.8))
            u_cut_gap (.clk(pll_fout), .test_on(test_on && sel == 1),
                       .test_ready(ready_v[1]), .good(good_v[1]));
  assign test_ready = ready_v[sel];
  assign good       = good_v[sel];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge test_on) begin
    realtime t0;
    repeat (2) @(posedge pll_fout);
    t0 = $realtime;
    repeat (16) @(posedge pll_fout);
    fout_mhz = 16.0 * 1000.0 / ($realtime - t0);
  end

  task automatic run(input int m, input int n, input int cut, output int res);
    logic [11:0] bits;
    sel  = cut;
    bits = {6'(m), 6'(n)};
    @(negedge clk) start = 1'b1;
    @(posedge clk);
    for (int k = 11; k >= 0; k--) begin
      @(negedge clk) scan_in = bits[k];
      @(posedge clk);
    end
    @(posedge clk iff done);
    res = int'(result);
    @(negedge clk) start = 1'b0;
    repeat (4) @(posedge clk);
  endtask

  initial begin
    int  res, in_gap;
    real step;
    step = 33.0 / 10.0;
    repeat (5) @(posedge clk);
    rst = 1'b0;
    repeat (5) @(posedge clk);

    // Case 1: full range.
    run(10, 1, 0, res);
    check(res == 28, $sformatf("full range: result %0d, expected 28", res));
    check(fout_mhz > 92.4 * 0.995 && fout_mhz < 92.4 * 1.005,
          $sformatf("f_out at N=28 is %0.2f MHz, expected 92.4", fout_mhz));
    $display("full range: N=%0d -> %0.2f MHz (measured f_out %0.2f MHz)", res, res * step, fout_mhz);

    // Case 2: gap and island.
    in_gap = 0;
    for (int n = 1; n <= 28; n++)
      if (1000.0 / (n * step) < 14.3 && 1000.0 / (n * step) > 12.8) in_gap++;
    check(in_gap == 2, $sformatf("%0d steps in the gap, expected 2", in_gap));
    run(10, 1, 1, res);
    check(res == 21, $sformatf("linear search: result %0d, expected 21", res));
    $display("linear search: N=%0d -> %0.2f MHz (true boundary 69.93 MHz)", res, res * step);

    // A search that enters above the gap is caught by the island: started
    // at N = 24 (79.2 MHz) it passes N = 24 and 25 and reports 82.5 MHz.
    run(10, 24, 1, res);
    check(res == 25, $sformatf("search from N=24: result %0d, expected 25 (island)", res));
    $display("search from N=24: N=%0d -> %0.2f MHz (island)", res, res * step);

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
