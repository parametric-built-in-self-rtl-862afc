// tb_pbist_test_fsm: self-checking test of the test application FSM.
//
// The test bench plays Register N, the PLL and the circuit under test. N
// follows n_inc/n_dec; lock drops when N changes and returns after a random
// delay; the CUT answers test_on after a random delay with good = (N <=
// limit). For random start values and limits it checks the stored result
// (the highest passing N, or nothing stored), the final N (last passing
// N, or start-1), test_ok, that test_on never rises without lock, that at
// least SETTLE_CYCLES + 2 cycles pass between a change of N and the next
// test_on, and the four-phase handshake.
`timescale 1ns / 1ps
module tb_pbist_test_fsm;
  localparam int unsigned SETTLE = 8;
  localparam int unsigned NMAX   = 28;

  logic       clk = 1'b0, rst = 1'b1, test = 1'b0;
  logic [5:0] n_q = '0;
  logic       lock = 1'b0, test_ready = 1'b0, good = 1'b0;
  logic       test_ok, test_on, store, n_inc, n_dec;
  int         checks = 0, failures = 0;
  int         limit = 0, stored = -1, since_change = 0, lock_wait = 0;
  int         n_exits_nmax = 0, n_exits_fail = 0;

  always #5 clk = ~clk;

  pbist_test_fsm #(.N_MAX(NMAX), .SETTLE_CYCLES(SETTLE)) dut (
    .clk, .rst, .test, .n_q, .lock, .test_ready, .good,
    .test_ok, .test_on, .store, .n_inc, .n_dec
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Register N, PLL lock and output register models.
  always @(posedge clk) begin
    if (store) stored = int'(n_q);
    if (n_inc || n_dec) begin
      n_q          <= n_inc ? n_q + 6'd1 : n_q - 6'd1;
      lock         <= 1'b0;
      since_change <= 0;
      lock_wait    <= $urandom_range(1, 20);
    end else begin
      since_change <= since_change + 1;
      if (lock_wait > 0) lock_wait <= lock_wait - 1;
      else               lock <= 1'b1;
    end
  end

  // CUT model: four-phase handshake with a random run time.
  int run_left = -1;
  always @(posedge clk) begin
    if (test_on && !test_ready && run_left < 0) begin
      check(lock, "test_on raised without lock");
      check(since_change >= SETTLE + 2, $sformatf("test_on %0d cycles after N changed", since_change));
      run_left <= $urandom_range(1, 30);
    end else if (run_left > 0) begin
      run_left <= run_left - 1;
    end else if (run_left == 0) begin
      good       <= (int'(n_q) <= limit);
      test_ready <= 1'b1;
      run_left   <= -1;
    end else if (test_ready && !test_on) begin
      test_ready <= 1'b0;
      good       <= 1'b0;
    end
  end

  // test_on must stay high until test_ready is seen.
  a_hold: assert property (@(posedge clk) disable iff (rst)
    $fell(test_on) |-> $past(test_ready, 2) || $past(test_ready, 3));

  task automatic search(input int n0, input int lim);
    int exp_res, exp_n;
    limit  = lim;
    stored = -1;
    @(negedge clk) n_q = 6'(n0);
    if (n0 > NMAX || lim < n0) begin
      exp_res = -1;
      exp_n   = n0 - 1;
    end else begin
      exp_res = (lim > NMAX) ? NMAX : lim;
      exp_n   = exp_res;
    end
    test = 1'b1;
    @(posedge clk iff test_ok);
    check(stored == exp_res, $sformatf("N0=%0d limit=%0d stored %0d expected %0d", n0, lim, stored, exp_res));
    check(int'(n_q) == exp_n, $sformatf("N0=%0d limit=%0d final N %0d expected %0d", n0, lim, n_q, exp_n));
    if (lim > NMAX && n0 <= NMAX) n_exits_nmax++;
    else                          n_exits_fail++;
    @(negedge clk) test = 1'b0;
    @(negedge clk);
    check(!test_ok, "test_ok did not drop");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    search(1, 5);
    search(20, 40);          // every N passes, N > N_max exit
    search(30, 40);          // start above N_max
    search(10, 9);           // first N fails
    search(28, 28);          // N_max passes, then exit
    for (int i = 0; i < 20; i++) begin
      automatic int n0 = $urandom_range(1, 30);
      search(n0, $urandom_range(0, 35));
    end
    check(n_exits_nmax > 0 && n_exits_fail > 0, "both exits exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
