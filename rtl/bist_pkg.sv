// bist_pkg: types shared by the PLL self-test blocks.
//
// The self-test is a small sequencer running in the reference-clock domain.
// It repeats a measurement window (clear the counters, count for a fixed
// number of reference cycles, let the other clock domains stop, read the
// counts) and moves through the test procedure once per window:
// frequency lock test, charge test (feedback = Fvco/N), discharge test
// (feedback = Fvco), then the pass/fail decision. The names of the procedure
// steps follow the test flow of the design; the window sub-steps are this
// implementation's own choice.
package bist_pkg;

  // Step of the test procedure, advanced at the end of a measurement window.
  typedef enum logic [2:0] {
    T_IDLE      = 3'd0,  // test not enabled: on-line lock monitoring only
    T_FLT       = 3'd1,  // frequency lock test, Ffb = Fvco, waiting for lock
    T_CHARGE    = 3'd2,  // strobe high, Ffb = Fvco/N, loop filter charges
    T_DISCHARGE = 3'd3,  // strobe low, Ffb = Fvco, loop filter discharges
    T_DONE      = 3'd4   // verdict available
  } test_state_e;

  // Sub-step of one measurement window.
  typedef enum logic [1:0] {
    W_INIT   = 2'd0,  // init high: all counters cleared
    W_RUN    = 2'd1,  // counters enabled for WIN reference cycles
    W_SETTLE = 2'd2,  // enable low, waiting for the Ffb/Fvco domains to stop
    W_EVAL   = 2'd3   // counts are static: compare and store
  } win_state_e;

endpackage
