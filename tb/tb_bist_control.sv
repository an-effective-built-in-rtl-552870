// tb_bist_control: checks the self-test sequencer against an ideal PLL.
//
// The PLL is replaced by an ideal frequency source: the VCO runs at `mult`
// times the 25 MHz reference, and after each strobe edge `mult` moves to its
// new target (4 when the feedback is divided, 1 otherwise) after a
// programmable relock delay, sitting at an in-between value until then. The
// feedback path (divide-by-4 and multiplexer) is modelled here too;
// fref_ffb_counter supplies the two counts. Cases:
//   - monitoring with test_en low: lock rises, strobe stays low;
//   - fast relock: pass, R1 = 20, R2 = 80, R3 = 20 (within one count), the
//     window lasts WIN + SETTLE + 2 cycles, the strobe is high for exactly
//     STROBE_WINDOWS windows;
//   - relock later than the strobe half period: fail;
//   - VCO settles at 4.15 x Fref in the charge test: still locked by the count
//     rule but R2 is out of range: fail;
//   - VCO never near the reference: timeout after FLT_TIMEOUT windows;
//   - test_en dropped during the charge test: the strobe falls at once.
`timescale 1ns / 1ps
module tb_bist_control;
  import bist_pkg::*;

  localparam real TREF = 40.0;
  localparam int  WIN = 20, SETTLE = 4, STROBE_WINDOWS = 4, FLT_TIMEOUT = 64;
  localparam int  WINDOW_CYCLES = WIN + SETTLE + 2;

  logic fref = 1'b0;
  logic rst_n = 1'b0;
  logic test_en = 1'b0;
  logic fvco = 1'b0;
  logic fvco_div = 1'b0;
  logic ffb;
  logic init, cnt_en, c_clk, lock, done, pass, flt_timeout;
  logic [7:0] ref_cnt, fb_cnt, test_out, r1, r2, r3;
  test_state_e state;

  int checks = 0, failures = 0, cycle = 0;

  // Ideal PLL.
  real mult = 1.0;
  real mult_hi = 4.0;         // where the VCO settles with divided feedback
  real mult_base = 1.0;       // where it settles with direct feedback
  int  relock_delay = 30;     // Fref cycles from a strobe edge to relock
  int  div_cnt = 0;

  always #(TREF / 2) fref = ~fref;
  always @(posedge fref) cycle++;
  initial forever begin
    #(TREF / (2.0 * mult));
    fvco = ~fvco;
  end
  always @(posedge fvco) begin
    div_cnt = (div_cnt + 1) % 4;
    fvco_div = (div_cnt >= 2);
  end
  assign ffb = c_clk ? fvco_div : fvco;

  always @(c_clk) begin
    mult = 2.5;
    repeat (relock_delay) @(posedge fref);
    mult = c_clk ? mult_hi : mult_base;
  end

  fref_ffb_counter u_cnt (
    .fref(fref), .ffb(ffb), .init(init), .en(cnt_en), .ref_cnt(ref_cnt), .fb_cnt(fb_cnt)
  );

  bist_control dut (
    .fref(fref), .rst_n(rst_n), .fvco(fvco), .test_en(test_en), .ref_cnt(ref_cnt),
    .fb_cnt(fb_cnt), .init(init), .cnt_en(cnt_en), .c_clk(c_clk), .lock(lock),
    .test_out(test_out), .done(done), .pass(pass), .flt_timeout(flt_timeout),
    .r1(r1), .r2(r2), .r3(r3), .state(state)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic bit near(input logic [7:0] v, input int e);
    return int'(v) >= e - 1 && int'(v) <= e + 1;
  endfunction

  // Window period from the init pulses, strobe high time.
  int init_rise = -1, window_len = -1, strobe_rise = 0, strobe_len = -1;
  logic init_d = 1'b0, c_clk_d = 1'b0;
  always @(posedge fref) begin
    if (init && !init_d) begin
      if (init_rise >= 0) window_len = cycle - init_rise;
      init_rise = cycle;
    end
    if (c_clk && !c_clk_d) strobe_rise = cycle;
    if (!c_clk && c_clk_d) strobe_len = cycle - strobe_rise;
    init_d <= init;
    c_clk_d <= c_clk;
  end

  task automatic run(output int cycles);
    int start;
    @(negedge fref) test_en = 1'b1;
    start = cycle;
    while (!done && cycle - start < (FLT_TIMEOUT + 20) * WINDOW_CYCLES) @(posedge fref);
    cycles = cycle - start;
  endtask

  task automatic stop();
    @(negedge fref) test_en = 1'b0;
    repeat (2 * WINDOW_CYCLES) @(posedge fref);
    check(!done && state == T_IDLE, "back to idle when test_en falls");
  endtask

  initial begin
    int cyc;
    repeat (3) @(posedge fref);
    #1 rst_n = 1'b1;

    // Monitoring.
    repeat (6 * WINDOW_CYCLES) @(posedge fref);
    check(lock && !c_clk && !done, "monitoring: locked, strobe low");
    check(window_len == WINDOW_CYCLES, $sformatf("window length %0d", window_len));
    check(near(test_out, WIN), $sformatf("monitored count %0d", test_out));

    // Fast relock: pass.
    relock_delay = 30;
    run(cyc);
    check(done && pass && !flt_timeout, "fast relock passes");
    check(near(r1, WIN) && near(r2, 4 * WIN) && near(r3, WIN),
          $sformatf("R1=%0d R2=%0d R3=%0d", r1, r2, r3));
    check(strobe_len == STROBE_WINDOWS * WINDOW_CYCLES, $sformatf("strobe high %0d", strobe_len));
    // test_en is seen at the end of some window (up to one window plus the
    // synchronizer), then one window of lock test and two strobe halves.
    check(cyc > (2 * STROBE_WINDOWS + 1) * WINDOW_CYCLES && cyc <= (2 * STROBE_WINDOWS + 2) * WINDOW_CYCLES + 3,
          $sformatf("test took %0d", cyc));
    stop();

    // Relock after the strobe half period: fail.
    relock_delay = STROBE_WINDOWS * WINDOW_CYCLES - 10;
    run(cyc);
    check(done && !pass && !flt_timeout, "late relock fails");
    stop();
    relock_delay = 30;
    repeat (6 * WINDOW_CYCLES) @(posedge fref);

    // R2 out of range while lock holds.
    mult_hi = 4.15;
    run(cyc);
    check(done && !pass, $sformatf("R2=%0d out of range fails", r2));
    check(r2 > 8'(4 * WIN + 1), "R2 above the tolerance");
    stop();
    mult_hi = 4.0;

    // Test aborted during the charge test.
    @(negedge fref) test_en = 1'b1;
    wait (c_clk);
    repeat (WINDOW_CYCLES) @(posedge fref);
    @(negedge fref) test_en = 1'b0;
    repeat (WINDOW_CYCLES + 4) @(posedge fref);
    check(!c_clk && state == T_IDLE, "abort drops the strobe");
    repeat (6 * WINDOW_CYCLES) @(posedge fref);

    // No lock at all: timeout.
    mult_base = 1.4;
    mult = 1.4;
    repeat (4 * WINDOW_CYCLES) @(posedge fref);
    check(!lock, "no lock at 1.4 x Fref");
    run(cyc);
    check(done && !pass && flt_timeout, "lock test times out");
    check(cyc > FLT_TIMEOUT * WINDOW_CYCLES && cyc <= (FLT_TIMEOUT + 1) * WINDOW_CYCLES + 3,
          $sformatf("timeout after %0d", cyc));
    stop();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge fref);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
