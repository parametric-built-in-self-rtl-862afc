// pbist_test_fsm: test application FSM, the linear maximum-frequency search.
//
// It follows the flow of the parametric self-test step by step. With test
// high it checks N against N_MAX; if N is larger the search is over.
// Otherwise it waits SETTLE_CYCLES clk cycles so the PLL can see the new
// feedback factor, waits for the PLL lock signal, raises test_on to start the
// BIST of the circuit under test and waits for test_ready. It then samples
// good (the CUT's signature comparison). On a pass it pulses store (the
// output register takes N), pulses n_inc and returns to the N check; on a
// fail, or once N exceeds N_MAX, it pulses n_dec, leaving N at the last
// passing value, and raises test_ok until test drops.
//
// lock, test_ready and good come from other clock domains and are
// synchronised with two flip-flops each. The CUT handshake is four-phase:
// test_on stays high until test_ready is seen, then the FSM drops test_on
// and waits for test_ready to fall before it goes on; good must be valid
// while test_ready is high. The flow, N_MAX = 28 and the signal names follow
// the document; the settle wait, the synchroniser and the four-phase
// handshake are this design's own choices.
module pbist_test_fsm
  import pbist_pkg::*;
#(
  parameter int unsigned W             = DIV_W,
  parameter int unsigned N_MAX         = N_MAX_DEF,
  parameter int unsigned SETTLE_CYCLES = 128
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         test,
  input  logic [W-1:0] n_q,
  input  logic         lock,
  input  logic         test_ready,
  input  logic         good,
  output logic         test_ok,
  output logic         test_on,
  output logic         store,
  output logic         n_inc,
  output logic         n_dec
);
  localparam int unsigned SW = $clog2(SETTLE_CYCLES + 1);

  tst_state_e  state, state_next;
  logic [SW-1:0] settle;
  logic        lock_s, ready_s, good_s;
  logic        passed;

  pbist_sync2 u_sync_lock  (.clk, .rst, .d(lock),       .q(lock_s));
  pbist_sync2 u_sync_ready (.clk, .rst, .d(test_ready), .q(ready_s));
  pbist_sync2 u_sync_good  (.clk, .rst, .d(good),       .q(good_s));

  always_comb begin
    state_next = state;
    unique case (state)
      TST_IDLE:    if (test) state_next = TST_CHECK;
      TST_CHECK:   state_next = (n_q > W'(N_MAX)) ? TST_DEC : TST_SETTLE;
      TST_SETTLE:  if (settle == '0) state_next = TST_LOCK;
      TST_LOCK:    if (lock_s) state_next = TST_RUN;
      TST_RUN:     if (ready_s) state_next = TST_SAMPLE;
      TST_SAMPLE:  state_next = TST_RELEASE;
      TST_RELEASE: if (!ready_s) state_next = passed ? TST_STORE : TST_DEC;
      TST_STORE:   state_next = TST_INC;
      TST_INC:     state_next = TST_CHECK;
      TST_DEC:     state_next = TST_FINISH;
      TST_FINISH:  if (!test) state_next = TST_IDLE;
      default:     state_next = TST_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= TST_IDLE;
      settle <= '0;
      passed <= 1'b0;
    end else begin
      state <= state_next;
      if (state == TST_CHECK)                      settle <= SW'(SETTLE_CYCLES);
      else if (state == TST_SETTLE && settle != '0) settle <= settle - SW'(1);
      if (state == TST_SAMPLE) passed <= good_s;
    end
  end

  assign test_on = (state == TST_RUN);
  assign store   = (state == TST_STORE);
  assign n_inc   = (state == TST_INC);
  assign n_dec   = (state == TST_DEC);
  assign test_ok = (state == TST_FINISH);

  // The output register may only be written with an N inside the search range.
  a_store_in_range: assert property (@(posedge clk) disable iff (rst)
    store |-> (n_q <= W'(N_MAX)));
  // The CUT's BIST is only started on a locked PLL.
  a_run_locked: assert property (@(posedge clk) disable iff (rst)
    $rose(test_on) |-> $past(lock_s));
  // N is never incremented and decremented in the same cycle.
  a_inc_dec_excl: assert property (@(posedge clk) disable iff (rst)
    !(n_inc && n_dec));
endmodule
