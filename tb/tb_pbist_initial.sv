// tb_pbist_initial: self-checking test of the initialisation logic.
//
// Checks the reset values (M = 10, N = 1), loads random M and N through the
// scan chain (M first, MSB first) under init and checks the registers and
// the cycle in which init_ok rises (after exactly 12 shifts), then checks
// n_inc and n_dec against a reference count, including that they are
// ignored while init is high.
`timescale 1ns / 1ps
module tb_pbist_initial;
  logic       clk = 1'b0, rst = 1'b1, init = 1'b0, scan_in = 1'b0;
  logic       n_inc = 1'b0, n_dec = 1'b0, init_ok;
  logic [5:0] m_q, n_q;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  pbist_initial dut (.clk, .rst, .init, .scan_in, .n_inc, .n_dec, .init_ok, .m_q, .n_q);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic load(input logic [5:0] m, input logic [5:0] n);
    logic [11:0] bits = {m, n};
    int cyc = 0;
    @(negedge clk) init = 1'b1;
    for (int k = 11; k >= 0; k--) begin
      scan_in = bits[k];
      check(init_ok == 1'b0, "init_ok early");
      @(negedge clk);
    end
    scan_in = 1'($urandom);                    // must not be shifted any more
    while (!init_ok) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == 1, $sformatf("init_ok %0d cycles after the last bit", cyc));
    check(m_q == m && n_q == n, $sformatf("loaded M=%0d N=%0d, expected %0d %0d", m_q, n_q, m, n));
    repeat (3) @(negedge clk);
    check(m_q == m && n_q == n, "registers changed after the scan");
    init = 1'b0;
    @(negedge clk);
    check(init_ok == 1'b0, "init_ok did not drop");
  endtask

  initial begin
    logic [5:0] ref_n;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(m_q == 6'd10 && n_q == 6'd1, "reset values");
    for (int i = 0; i < 20; i++) load(6'($urandom), 6'($urandom));
    load(6'd10, 6'd5);
    ref_n = 6'd5;
    for (int i = 0; i < 200; i++) begin
      n_inc = 1'($urandom);
      n_dec = 1'($urandom);
      @(negedge clk);
      if (n_inc)      ref_n++;
      else if (n_dec) ref_n--;
      check(n_q == ref_n && m_q == 6'd10, $sformatf("N=%0d expected %0d", n_q, ref_n));
    end
    n_inc = 1'b1;
    init  = 1'b1;
    @(negedge clk);
    n_inc = 1'b0;
    init  = 1'b0;
    check(n_q == {ref_n[4:0], scan_in}, "n_inc acted during init");
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
