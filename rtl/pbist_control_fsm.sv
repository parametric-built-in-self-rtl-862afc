// pbist_control_fsm: control FSM of the parametric BIST.
//
// On start (sampled high in IDLE) it clears the output register for one
// cycle and raises init, so the initialisation logic scans in M and N; when
// init_ok answers it drops init and raises test, handing the search to the
// test FSM. When the test FSM reports test_ok it drops test, raises done and
// waits for start to go low before accepting the next start. The document
// gives the block, its start/reset inputs and the init/init_ok and
// test/test_ok signal pairs; the four states, the level-sensitive
// handshakes, the clear pulse and the done flag are this design's own.
//
// Timing: init rises the cycle after start is sampled; test rises the cycle
// after init_ok is seen; done rises the cycle after test_ok is seen.
module pbist_control_fsm
  import pbist_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  logic init_ok,
  input  logic test_ok,
  output logic init,
  output logic test,
  output logic clear,
  output logic done
);
  ctl_state_e state, state_next;

  always_comb begin
    state_next = state;
    unique case (state)
      CTL_IDLE: if (start)   state_next = CTL_INIT;
      CTL_INIT: if (init_ok) state_next = CTL_TEST;
      CTL_TEST: if (test_ok) state_next = CTL_DONE;
      CTL_DONE: if (!start)  state_next = CTL_IDLE;
      default:               state_next = CTL_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= CTL_IDLE;
    else     state <= state_next;
  end

  assign init  = (state == CTL_INIT);
  assign test  = (state == CTL_TEST);
  assign done  = (state == CTL_DONE);
  assign clear = (state == CTL_IDLE) && start;

  // Initialisation and search never overlap.
  a_init_test_excl: assert property (@(posedge clk) disable iff (rst) !(init && test));
endmodule
