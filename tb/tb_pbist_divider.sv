// tb_pbist_divider: self-checking test of the programmable divider.
//
// For every factor 2..63 it measures, in input-clock cycles, the distance
// between rising output edges and the high time, and compares them with the
// factor and ceil(factor/2). It checks that factors 0 and 1 pass the input
// clock through, and that a factor changed in mid-period only takes effect
// at the next reload (parallel preset).
`timescale 1ns / 1ps
module tb_pbist_divider;
  logic       clk = 1'b0, rst = 1'b1;
  logic [5:0] div = 6'd2;
  logic       q, q_d = 1'b0;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  pbist_divider dut (.clk_in(clk), .rst, .div, .clk_out(q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Cycles from one output rising edge to the next, and high time, sampled
  // mid-cycle.
  task automatic measure(output int period, output int high);
    int n;
    @(negedge clk iff q);                 // inside a high phase
    @(negedge clk iff !q);                // first low sample
    @(negedge clk iff q);                 // first high sample of a period
    n = 0; high = 0;
    do begin
      if (q) high++;
      n++;
      @(negedge clk);
    end while (!(q && !q_d));
    period = n;
  endtask

  always @(negedge clk) q_d <= q;

  initial begin
    int p, h;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int d = 2; d < 64; d++) begin
      @(negedge clk) div = 6'(d);
      repeat (2 * d + 2) @(negedge clk);
      measure(p, h);
      check(p == d, $sformatf("div=%0d period %0d", d, p));
      check(h == (d + 1) / 2, $sformatf("div=%0d high time %0d", d, h));
    end
    // Bypass for 1 and 0.
    for (int d = 0; d < 2; d++) begin
      @(negedge clk) div = 6'(d);
      #1 check(q == 1'b0, $sformatf("div=%0d low phase", d));
      @(posedge clk) #1 check(q == 1'b1, $sformatf("div=%0d high phase", d));
    end
    // Preset: a factor change in mid-period ends the running period first.
    @(negedge clk) div = 6'd10;
    repeat (30) @(negedge clk);
    @(negedge clk iff (q && !q_d));       // first cycle of a period
    repeat (3) @(negedge clk);
    div = 6'd4;
    p = 3;
    while (!(q && !q_d)) begin
      @(negedge clk);
      p++;
    end
    check(p == 10, $sformatf("running period after change %0d, expected 10", p));
    measure(p, h);
    check(p == 4, $sformatf("period after reload %0d, expected 4", p));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
