// tb_pbist_control_fsm: self-checking test of the control FSM.
//
// Runs complete start -> init -> test -> done sequences with random
// response delays and checks, cycle by cycle, the outputs against the
// expected sequence: clear only in the start cycle, init until init_ok,
// test until test_ok, done until start drops, and no restart while start
// stays high.
`timescale 1ns / 1ps
module tb_pbist_control_fsm;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0, init_ok = 1'b0, test_ok = 1'b0;
  logic init, test, clear, done;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  pbist_control_fsm dut (.clk, .rst, .start, .init_ok, .test_ok, .init, .test, .clear, .done);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic expect_out(input logic i, input logic t, input logic c, input logic d,
                            input string where);
    #1 check({init, test, clear, done} == {i, t, c, d},
             $sformatf("%s: init=%b test=%b clear=%b done=%b", where, init, test, clear, done));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    expect_out(0, 0, 0, 0, "idle");
    for (int r = 0; r < 20; r++) begin
      automatic int wi = $urandom_range(1, 15), wt = $urandom_range(1, 40), wd = $urandom_range(0, 5);
      start = 1'b1;
      expect_out(0, 0, 1, 0, "start cycle");
      @(negedge clk);
      for (int i = 0; i < wi; i++) begin
        expect_out(1, 0, 0, 0, "init");
        @(negedge clk);
      end
      init_ok = 1'b1;
      expect_out(1, 0, 0, 0, "init_ok cycle");
      @(negedge clk);
      init_ok = 1'b0;
      for (int i = 0; i < wt; i++) begin
        expect_out(0, 1, 0, 0, "test");
        @(negedge clk);
      end
      test_ok = 1'b1;
      expect_out(0, 1, 0, 0, "test_ok cycle");
      @(negedge clk);
      test_ok = 1'b0;
      for (int i = 0; i < wd; i++) begin
        expect_out(0, 0, 0, 1, "done, start high");
        @(negedge clk);
      end
      start = 1'b0;
      expect_out(0, 0, 0, 1, "done, start low");
      @(negedge clk);
      expect_out(0, 0, 0, 0, "back in idle");
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
