// pbist_pkg: shared widths, defaults and state encodings of the parametric
// maximum-frequency BIST.
//
// The divider factors M and N are 6 bits wide, as the M<5:0> and N<5:0> buses
// of the block diagram show. N_MAX_DEF = 28 and M_DEF = 10 are the default
// search limit and reference divider chosen for stable PLL operation
// (f_in = 33 MHz gives a 3.3 MHz step and a 92.4 MHz top frequency).
// The state encodings are this implementation's own.
package pbist_pkg;

  localparam int unsigned DIV_W     = 6;   // width of M and N
  localparam int unsigned N_MAX_DEF = 28;  // highest N the search may use
  localparam int unsigned M_DEF     = 10;  // default reference divider

  typedef enum logic [1:0] {
    CTL_IDLE,   // waiting for start
    CTL_INIT,   // M and N being scanned in
    CTL_TEST,   // test FSM running the search
    CTL_DONE    // result ready, waiting for start to drop
  } ctl_state_e;

  typedef enum logic [3:0] {
    TST_IDLE,     // waiting for test
    TST_CHECK,    // compare N against N_max
    TST_SETTLE,   // give the PLL time to react to a new N
    TST_LOCK,     // wait for PLL lock
    TST_RUN,      // test_on high, wait for test_ready
    TST_SAMPLE,   // sample the synchronised good flag
    TST_RELEASE,  // test_on low, wait for test_ready to drop
    TST_STORE,    // write N to the output register
    TST_INC,      // increment N
    TST_DEC,      // decrement N
    TST_FINISH    // test_ok high until test drops
  } tst_state_e;

endpackage
