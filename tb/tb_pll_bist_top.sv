// tb_pll_bist_top: end-to-end test of the PLL self-test with a PLL model.
//
// pll_bist_top runs at its default parameters, attached to cp_pll_model and
// a 25 MHz reference. Four runs:
//   1. on-line monitoring (test_en low): the lock output must rise and the
//      measured VCO count must equal the reference count;
//   2. dead VCO: the lock test must time out and the test fail;
//   3. fault-free test started from reset with the PLL far from lock (the VCO
//      was just revived): the lock test must wait, then the procedure must
//      pass with R1 and R3 at the reference count, R2 at four times it and the
//      strobe high for exactly STROBE_WINDOWS windows;
//   4. slowed charge pump (weak UP current): relock is late and the test must
//      fail.
// Every mechanism (first lock, strobe rise and fall, loss of lock and relock
// after each strobe edge, pass, fail, timeout, monitoring) is counted, and one
// that never happens is a failure.
`timescale 1ns / 1ps
module tb_pll_bist_top;
  import bist_pkg::*;

  localparam real TREF = 40.0;                // 25 MHz reference
  localparam int  WIN = 20, SETTLE = 4, STROBE_WINDOWS = 4, DIV_N = 4;
  localparam int  WINDOW_CYCLES = WIN + SETTLE + 2;

  logic fref = 1'b0;
  logic rst_n = 1'b0;
  logic test_en = 1'b0;
  logic fault_weak_up = 1'b0;
  logic fault_dead_vco = 1'b0;
  logic fvco, ffb, c_clk, lock, done, pass, flt_timeout;
  logic [7:0] test_out, r1, r2, r3;
  test_state_e state;

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  always #(TREF / 2) fref = ~fref;
  always @(posedge fref) cycle++;

  cp_pll_model u_pll (
    .fref(fref), .ffb(ffb), .fault_weak_up(fault_weak_up),
    .fault_dead_vco(fault_dead_vco), .fvco(fvco)
  );

  pll_bist_top dut (
    .fref(fref), .fvco(fvco), .rst_n(rst_n), .test_en(test_en), .ffb(ffb),
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

  // Mechanism counters.
  int n_flt_lock = 0, n_strobe_rise = 0, n_strobe_fall = 0;
  int n_unlock_charge = 0, n_relock_charge = 0, n_unlock_dis = 0, n_relock_dis = 0;
  int n_pass = 0, n_fail = 0, n_timeout = 0, n_monitor_lock = 0;
  int strobe_rise_cycle = 0, strobe_high_cycles = -1;
  logic c_clk_d = 1'b0, lock_d = 1'b0, done_d = 1'b0;
  test_state_e state_d = T_IDLE;

  always @(posedge fref) begin
    if (c_clk && !c_clk_d) begin
      n_strobe_rise++;
      strobe_rise_cycle = cycle;
    end
    if (!c_clk && c_clk_d) begin
      n_strobe_fall++;
      strobe_high_cycles = cycle - strobe_rise_cycle;
    end
    // state_d is the step in which the window that changed lock was counted.
    if (lock && !lock_d && state_d == T_FLT)        n_flt_lock++;
    if (!lock && lock_d && state_d == T_CHARGE)     n_unlock_charge++;
    if (lock && !lock_d && state_d == T_CHARGE)     n_relock_charge++;
    if (!lock && lock_d && state_d == T_DISCHARGE)  n_unlock_dis++;
    if (lock && !lock_d && state_d == T_DISCHARGE)  n_relock_dis++;
    if (lock && !lock_d && state_d == T_IDLE)       n_monitor_lock++;
    state_d <= state;
    c_clk_d <= c_clk;
    lock_d  <= lock;
    done_d  <= done;
  end

  task automatic reset_dut();
    rst_n = 1'b0;
    repeat (3) @(posedge fref);
    #1 rst_n = 1'b1;
  endtask

  task automatic run_test(output bit p, output int cycles);
    int start;
    @(negedge fref) test_en = 1'b1;
    start = cycle;
    while (!done && cycle - start < 400 * WINDOW_CYCLES) @(posedge fref);
    cycles = cycle - start;
    p = pass;
    $display("test: done=%0d pass=%0d timeout=%0d R1=%0d R2=%0d R3=%0d after %0d cycles",
             done, pass, flt_timeout, r1, r2, r3, cycles);
    @(negedge fref) test_en = 1'b0;
    repeat (2 * WINDOW_CYCLES) @(posedge fref);
    check(!done, "done clears when test_en falls");
  endtask

  initial begin
    bit p;
    int cyc;
    reset_dut();

    // 1. On-line monitoring.
    repeat (12 * WINDOW_CYCLES) @(posedge fref);
    check(lock, "lock rises in monitoring mode");
    check(!c_clk, "strobe stays low while monitoring");
    check(test_out == 8'(WIN) || test_out == 8'(WIN - 1) || test_out == 8'(WIN + 1),
          $sformatf("monitored VCO count %0d near %0d", test_out, WIN));

    // 2. Dead VCO: the lock test times out.
    fault_dead_vco = 1'b1;
    reset_dut();
    run_test(p, cyc);
    check(!p && flt_timeout, "dead VCO times out");
    if (flt_timeout) n_timeout++;
    fault_dead_vco = 1'b0;

    // 3. Fault-free test, started straight from reset while the PLL is
    //    still far from lock, so that the lock test has to wait.
    reset_dut();
    run_test(p, cyc);
    check(p, "fault-free PLL passes");
    check(!flt_timeout, "no timeout on a fault-free PLL");
    check(r1 >= 8'(WIN - 1) && r1 <= 8'(WIN + 1), $sformatf("R1=%0d", r1));
    check(r2 >= 8'(DIV_N * WIN - 1) && r2 <= 8'(DIV_N * WIN + 1), $sformatf("R2=%0d", r2));
    check(r3 >= 8'(WIN - 1) && r3 <= 8'(WIN + 1), $sformatf("R3=%0d", r3));
    check(strobe_high_cycles == STROBE_WINDOWS * WINDOW_CYCLES,
          $sformatf("strobe high for %0d cycles", strobe_high_cycles));
    if (p) n_pass++;

    // 4. Weak charge current: relock too slow.
    fault_weak_up = 1'b1;
    reset_dut();
    repeat (12 * WINDOW_CYCLES) @(posedge fref);
    run_test(p, cyc);
    check(!p, "weak UP current fails");
    // Already locked: up to one window until test_en is seen, one for the
    // lock test, then two strobe half periods.
    check(cyc > (2 * STROBE_WINDOWS + 1) * WINDOW_CYCLES && cyc <= (2 * STROBE_WINDOWS + 2) * WINDOW_CYCLES + 3,
          $sformatf("test from lock takes %0d cycles", cyc));
    if (!p && !flt_timeout) n_fail++;
    fault_weak_up = 1'b0;

    check(n_monitor_lock > 0, "mechanism: lock while monitoring");
    check(n_flt_lock > 0, "mechanism: lock in frequency lock test");
    check(n_strobe_rise > 0, "mechanism: strobe rise (feedback divided)");
    check(n_unlock_charge > 0, "mechanism: lock lost after strobe rise");
    check(n_relock_charge > 0, "mechanism: relock at N x Fref");
    check(n_strobe_fall > 0, "mechanism: strobe fall (feedback undivided)");
    check(n_unlock_dis > 0, "mechanism: lock lost after strobe fall");
    check(n_relock_dis > 0, "mechanism: relock at Fref");
    check(n_pass > 0, "mechanism: pass verdict");
    check(n_fail > 0, "mechanism: fail verdict");
    check(n_timeout > 0, "mechanism: lock test timeout");
    $display("mechanisms: monitor_lock=%0d flt_lock=%0d strobe_rise=%0d unlock_charge=%0d relock_charge=%0d strobe_fall=%0d unlock_dis=%0d relock_dis=%0d pass=%0d fail=%0d timeout=%0d",
             n_monitor_lock, n_flt_lock, n_strobe_rise, n_unlock_charge, n_relock_charge,
             n_strobe_fall, n_unlock_dis, n_relock_dis, n_pass, n_fail, n_timeout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (2000 * WINDOW_CYCLES) @(posedge fref);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
