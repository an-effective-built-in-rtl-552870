// tb_vco_range: VCO frequency measurement over the 20-150 MHz range.
//
// The self-test at its default parameters (25 MHz reference, 20-cycle
// window, 7-bit counters) measures a VCO stand-in running at fixed
// frequencies, with test_en low (on-line monitoring, feedback = VCO). Each
// reading of test_out must be f x WIN / Fref to within one count, i.e. a
// resolution of 1.25 MHz, and lock must be high only when the count is
// within one of the reference count (23.75-26.25 MHz). At 160 MHz (above 127 counts) the overflow flag must be set.
`timescale 1ns / 1ps
module tb_vco_range;
  import bist_pkg::*;

  localparam real TREF = 40.0;
  localparam int  WIN = 20;
  localparam int  WINDOW_CYCLES = 26;

  logic fref = 1'b0;
  logic fvco = 1'b0;
  logic rst_n = 1'b0;
  logic ffb, c_clk, lock, done, pass, flt_timeout;
  logic [7:0] test_out, r1, r2, r3;
  test_state_e state;
  real  f_mhz = 25.0;
  int   checks = 0, failures = 0;

  always #(TREF / 2) fref = ~fref;
  initial forever begin
    #(500.0 / f_mhz);
    fvco = ~fvco;
  end

  pll_bist_top dut (
    .fref(fref), .fvco(fvco), .rst_n(rst_n), .test_en(1'b0), .ffb(ffb),
    .c_clk(c_clk), .lock(lock), .test_out(test_out), .done(done), .pass(pass),
    .flt_timeout(flt_timeout), .r1(r1), .r2(r2), .r3(r3), .state(state)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic measure(input real f);
    real expv;
    f_mhz = f;
    repeat (3 * WINDOW_CYCLES) @(posedge fref);
    expv = f * real'(WIN) * TREF / 1000.0;
    $display("%6.1f MHz: test_out=%0d expected %0.1f lock=%0d", f, test_out, expv, lock);
    if (expv < 127.0) begin
      check(!test_out[7] && real'(test_out) >= expv - 1.0 && real'(test_out) <= expv + 1.0,
            $sformatf("count %0d at %0.1f MHz", test_out, f));
    end else begin
      check(test_out[7], $sformatf("overflow at %0.1f MHz", f));
    end
    // Locked when the feedback (= VCO) count is within one of the reference count.
    check(lock == (expv >= real'(WIN) - 1.0 && expv <= real'(WIN) + 1.0),
          $sformatf("lock=%0d at %0.1f MHz", lock, f));
  endtask

  initial begin
    repeat (3) @(posedge fref);
    #1 rst_n = 1'b1;
    measure(20.0);
    measure(25.0);
    measure(26.25);
    measure(27.5);
    measure(50.0);
    measure(75.0);
    measure(100.0);
    measure(125.0);
    measure(150.0);
    measure(160.0);
    measure(25.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100 * WINDOW_CYCLES) @(posedge fref);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
