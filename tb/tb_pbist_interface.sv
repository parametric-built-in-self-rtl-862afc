// tb_pbist_interface: self-checking test of the interface logic.
//
// Stores random values, clears, and reads the output register serially:
// with read_out high, data_out must give the W bits MSB first, one per clock
// cycle, and the parallel result must equal the last stored value.
`timescale 1ns / 1ps
module tb_pbist_interface;
  logic       clk = 1'b0, rst = 1'b1, clear = 1'b0, store = 1'b0, read_out = 1'b0;
  logic [5:0] n_in = '0, result;
  logic       data_out;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  pbist_interface dut (.clk, .rst, .clear, .store, .n_in, .read_out, .result, .data_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic read_and_check(input logic [5:0] exp);
    logic [5:0] rd;
    @(negedge clk) read_out = 1'b1;
    for (int i = 5; i >= 0; i--) begin
      #1 rd[i] = data_out;
      @(negedge clk);
    end
    read_out = 1'b0;
    check(rd == exp, $sformatf("serial read %0d, expected %0d", rd, exp));
    check(result == exp, $sformatf("result %0d, expected %0d", result, exp));
    @(negedge clk);
  endtask

  initial begin
    automatic logic [5:0] exp = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    read_and_check(6'd0);
    for (int i = 0; i < 40; i++) begin
      automatic int k = $urandom_range(0, 5);
      for (int j = 0; j < k; j++) begin
        n_in  = 6'($urandom);
        store = 1'($urandom);
        clear = ($urandom_range(0, 9) == 0);
        @(negedge clk);
        if (clear)      exp = '0;
        else if (store) exp = n_in;
        store = 1'b0;
        clear = 1'b0;
      end
      read_and_check(exp);
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
