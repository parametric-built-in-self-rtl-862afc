// pbist_top: parametric maximum-frequency built-in self-test.
//
// The circuit finds the highest clock frequency at which a circuit under
// test (CUT) still passes its own BIST, using the on-chip PLL as the
// frequency source instead of external test equipment. The PLL output is
// f_out = N/M * f_in. The reference divider M stays fixed during a test,
// so N sets the test frequency in steps of f_in/M. A linear search starts at
// the scanned-in N and raises N by one after every passing BIST run, up to
// N_MAX. The last passing N is kept in the output register; the maximum
// frequency is that value times f_in/M. A linear search cannot be fooled by
// pass "islands" above the first fail region, which a binary search can.
//
// Blocks: control FSM, initialisation logic (Register M, Register N, scan
// chain), test FSM, interface with the output register, divider M
// (clocked by f_in) and divider N (clocked by f_out). The PLL and the CUT
// are outside: their signals are ports. clk is the board clock f_in and
// clocks all control logic; rst is synchronous to clk. The divider N is
// clocked by pll_fout and takes its reset through a two-flip-flop
// synchroniser; its factor changes only while the PLL re-locks.
//
// Pins: start, reset, scan_in, read_out in; data_out out (the minimum pin
// set of the document), plus done and result, a status flag and a parallel
// copy of the output register added here.
module pbist_top
  import pbist_pkg::*;
#(
  parameter int unsigned W             = DIV_W,
  parameter int unsigned N_MAX         = N_MAX_DEF,
  parameter int unsigned SETTLE_CYCLES = 128
) (
  input  logic clk,         // f_in, board clock
  input  logic rst,
  input  logic start,
  input  logic scan_in,
  input  logic read_out,
  output logic data_out,
  output logic done,
  output logic [W-1:0] result,  // parallel view of the output register
  // PLL
  output logic pll_ref,     // f_in / M
  output logic pll_fb,      // f_out / N
  input  logic pll_fout,
  input  logic pll_lock,
  // self-testable circuit
  output logic test_on,
  input  logic test_ready,
  input  logic good
);
  logic         init, init_ok, test, test_ok, clear;
  logic         store, n_inc, n_dec;
  logic [W-1:0] m_q, n_q;
  logic         rst_fout;

  pbist_control_fsm u_ctl (
    .clk, .rst, .start, .init_ok, .test_ok,
    .init, .test, .clear, .done
  );

  pbist_initial #(.W(W)) u_init (
    .clk, .rst, .init, .scan_in, .n_inc, .n_dec,
    .init_ok, .m_q, .n_q
  );

  pbist_test_fsm #(.W(W), .N_MAX(N_MAX), .SETTLE_CYCLES(SETTLE_CYCLES)) u_test (
    .clk, .rst, .test, .n_q,
    .lock(pll_lock), .test_ready, .good,
    .test_ok, .test_on, .store, .n_inc, .n_dec
  );

  pbist_interface #(.W(W)) u_if (
    .clk, .rst, .clear, .store, .n_in(n_q), .read_out,
    .result, .data_out
  );

  pbist_divider #(.W(W)) u_div_m (
    .clk_in(clk), .rst, .div(m_q), .clk_out(pll_ref)
  );

  pbist_sync2 u_sync_rst (.clk(pll_fout), .rst(1'b0), .d(rst), .q(rst_fout));

  pbist_divider #(.W(W)) u_div_n (
    .clk_in(pll_fout), .rst(rst_fout), .div(n_q), .clk_out(pll_fb)
  );
endmodule
