// tb_pll_bist_repeat: the self-test with repeated strobe periods.
//
// pll_bist_top with STROBE_CYCLES = 3 drives cp_pll_model at a 25 MHz
// reference. A fault-free run must strobe three times and pass. A second run
// weakens the PLL's UP current only during the second charge test: the first
// period is good, so only the repetition can catch the fault, and the test
// must fail. A third run weakens it only after the test is over and must pass.
`timescale 1ns / 1ps
module tb_pll_bist_repeat;
  import bist_pkg::*;

  localparam real TREF = 40.0;
  localparam int  WINDOW_CYCLES = 26;
  localparam int  CYCLES = 3;

  logic fref = 1'b0;
  logic rst_n = 1'b0;
  logic test_en = 1'b0;
  logic fault_weak_up = 1'b0;
  logic fvco, ffb, c_clk, lock, done, pass, flt_timeout;
  logic [7:0] test_out, r1, r2, r3;
  test_state_e state;
  int checks = 0, failures = 0;
  int rises = 0;
  int fault_on_rise = 0;      // weaken UP during this strobe period (0 = never)
  logic c_clk_d = 1'b0;

  always #(TREF / 2) fref = ~fref;

  cp_pll_model u_pll (
    .fref(fref), .ffb(ffb), .fault_weak_up(fault_weak_up), .fault_dead_vco(1'b0), .fvco(fvco)
  );

  pll_bist_top #(.STROBE_CYCLES(CYCLES)) dut (
    .fref(fref), .fvco(fvco), .rst_n(rst_n), .test_en(test_en), .ffb(ffb),
    .c_clk(c_clk), .lock(lock), .test_out(test_out), .done(done), .pass(pass),
    .flt_timeout(flt_timeout), .r1(r1), .r2(r2), .r3(r3), .state(state)
  );

  always @(posedge fref) begin
    if (c_clk && !c_clk_d) rises++;
    fault_weak_up <= (fault_on_rise != 0) && (rises == fault_on_rise) && c_clk;
    c_clk_d <= c_clk;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic run(input int fault_rise, output bit p, output int n_rises);
    fault_on_rise = fault_rise;
    rises = 0;
    @(negedge fref) test_en = 1'b1;
    wait (done);
    p = pass;
    n_rises = rises;
    $display("run (fault in period %0d): pass=%0d strobes=%0d R1=%0d R2=%0d R3=%0d",
             fault_rise, pass, rises, r1, r2, r3);
    @(negedge fref) test_en = 1'b0;
    repeat (6 * WINDOW_CYCLES) @(posedge fref);
  endtask

  initial begin
    bit p;
    int n;
    repeat (3) @(posedge fref);
    #1 rst_n = 1'b1;
    repeat (10 * WINDOW_CYCLES) @(posedge fref);

    run(0, p, n);
    check(p, "fault-free repeated test passes");
    check(n == CYCLES, $sformatf("%0d strobe periods", n));

    run(2, p, n);
    check(!p, "fault in the second charge test fails");
    check(n == CYCLES, $sformatf("%0d strobe periods", n));

    run(CYCLES + 1, p, n);
    check(p, "fault outside the test passes");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * WINDOW_CYCLES) @(posedge fref);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
