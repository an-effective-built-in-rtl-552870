// pll_bist_top: built-in self-test for a charge-pump PLL.
//
// The PLL itself (phase-frequency detector, charge pump, loop filter, VCO)
// stays outside: this block only taps the VCO output `fvco` and the
// reference `fref`, and drives the PLL's feedback input `ffb`. The strobe
// c_clk switches the feedback between the VCO output and the VCO output
// divided by DIV_N, which forces the loop to unlock and relock at DIV_N times
// the reference and back again. Every block of the PLL is exercised by these
// transitions; a fault that slows or distorts them leaves the VCO at the
// wrong frequency when it is measured, a fixed time after each strobe edge.
//
// Inside: bist_control (sequencer, Fvco counter, evaluation, test output),
// fref_ffb_counter (Fref and Ffb counters for the lock decision), clk_div_n
// (the 1/N divider) and fb_mux (the 2:1 feedback multiplexer), connected as
// in the design's block diagram. Everything except the two counters in the
// Ffb and Fvco domains and the divider runs on fref; rst_n is an asynchronous
// active-low reset. Raise test_en to run the test once; `done` rises with the
// verdict on `pass` about 2 x STROBE_WINDOWS + (windows to first lock) + 1
// windows later, a window being WIN + SETTLE + 2 Fref cycles. `test_out` is
// the Fvco count of the last window (CNT_BITS bits plus an overflow flag):
// the VCO frequency in units of Fref / WIN. R1..R3 are the stored counts.
// Parameters default to a 25 MHz reference and 7-bit counters, where one
// count of test_out is 1.25 MHz. The block set and the wiring follow the
// design's block diagram (the 8-bit buses, init, C_clk to the multiplexer,
// Fvco into the control block); the test-enable pin, the status outputs and
// the divider's reset are this implementation's additions.
module pll_bist_top
  import bist_pkg::*;
#(
  parameter int unsigned CNT_BITS       = 7,
  parameter int unsigned DIV_N          = 4,
  parameter int unsigned WIN            = 20,
  parameter int unsigned SETTLE         = 4,
  parameter int unsigned LOCK_TOL       = 1,
  parameter int unsigned LOCK_COUNT     = 2,
  parameter int unsigned STROBE_WINDOWS = 4,
  parameter int unsigned STROBE_CYCLES  = 1,
  parameter int unsigned FLT_TIMEOUT    = 64,
  parameter int unsigned EVAL_TOL       = 1
) (
  input  logic              fref,
  input  logic              fvco,
  input  logic              rst_n,
  input  logic              test_en,
  output logic              ffb,
  output logic              c_clk,
  output logic              lock,
  output logic [CNT_BITS:0] test_out,
  output logic              done,
  output logic              pass,
  output logic              flt_timeout,
  output logic [CNT_BITS:0] r1,
  output logic [CNT_BITS:0] r2,
  output logic [CNT_BITS:0] r3,
  output test_state_e       state
);

  logic              init;
  logic              cnt_en;
  logic              fvco_div;
  logic [CNT_BITS:0] ref_cnt;
  logic [CNT_BITS:0] fb_cnt;

  clk_div_n #(.N(DIV_N)) u_div (
    .clk_in (fvco),
    .rst_n  (rst_n),
    .clk_out(fvco_div)
  );

  fb_mux u_mux (
    .fvco    (fvco),
    .fvco_div(fvco_div),
    .sel     (c_clk),
    .ffb     (ffb)
  );

  fref_ffb_counter #(.CNT_BITS(CNT_BITS)) u_cnt (
    .fref   (fref),
    .ffb    (ffb),
    .init   (init),
    .en     (cnt_en),
    .ref_cnt(ref_cnt),
    .fb_cnt (fb_cnt)
  );

  bist_control #(
    .CNT_BITS      (CNT_BITS),
    .DIV_N         (DIV_N),
    .WIN           (WIN),
    .SETTLE        (SETTLE),
    .LOCK_TOL      (LOCK_TOL),
    .LOCK_COUNT    (LOCK_COUNT),
    .STROBE_WINDOWS(STROBE_WINDOWS),
    .STROBE_CYCLES (STROBE_CYCLES),
    .FLT_TIMEOUT   (FLT_TIMEOUT),
    .EVAL_TOL      (EVAL_TOL)
  ) u_ctrl (
    .fref       (fref),
    .rst_n      (rst_n),
    .fvco       (fvco),
    .test_en    (test_en),
    .ref_cnt    (ref_cnt),
    .fb_cnt     (fb_cnt),
    .init       (init),
    .cnt_en     (cnt_en),
    .c_clk      (c_clk),
    .lock       (lock),
    .test_out   (test_out),
    .done       (done),
    .pass       (pass),
    .flt_timeout(flt_timeout),
    .r1         (r1),
    .r2         (r2),
    .r3         (r3),
    .state      (state)
  );

endmodule
