// tb_fref_ffb_counter: checks the reference and feedback counters.
//
// Fref has a 40 ns period. For several Ffb periods the testbench clears the
// counters with init, holds en high for a number of Fref cycles, drops it,
// waits for the Ffb domain to stop and then compares: the Fref count must be
// exact, the Ffb count within one of the window length divided by the Ffb
// period. A fast Ffb must set the overflow flag with the count held at its
// maximum, and init must clear both counters.
`timescale 1ns / 1ps
module tb_fref_ffb_counter;

  localparam real TREF = 40.0;

  logic fref = 1'b0;
  logic ffb = 1'b0;
  logic init = 1'b1;
  logic en = 1'b0;
  logic [7:0] ref_cnt, fb_cnt;
  real  tfb = 40.0;
  int   checks = 0, failures = 0;

  always #(TREF / 2) fref = ~fref;
  initial forever begin
    #(tfb / 2);
    ffb = ~ffb;
  end

  fref_ffb_counter dut (
    .fref(fref), .ffb(ffb), .init(init), .en(en), .ref_cnt(ref_cnt), .fb_cnt(fb_cnt)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic window(input int cycles, input real period);
    real expect_fb;
    tfb = period;
    @(posedge fref);
    init <= 1'b1;
    @(posedge fref);
    init <= 1'b0;
    #1 check(ref_cnt == 0 && fb_cnt == 0, "init clears both counters");
    @(posedge fref);
    en <= 1'b1;
    repeat (cycles) @(posedge fref);
    en <= 1'b0;
    repeat (12) @(posedge fref);
    expect_fb = cycles * TREF / period;
    check(ref_cnt == 8'(cycles), $sformatf("ref count %0d for %0d cycles", ref_cnt, cycles));
    if (expect_fb < 127.0) begin
      check(!fb_cnt[7] && real'(fb_cnt) >= expect_fb - 1.0 && real'(fb_cnt) <= expect_fb + 1.0,
            $sformatf("fb count %0d, expected %0.2f (period %0.1f)", fb_cnt, expect_fb, period));
    end else begin
      check(fb_cnt == 8'hFF, $sformatf("fb overflow shows %0h", fb_cnt));
    end
  endtask

  initial begin
    repeat (2) @(posedge fref);
    window(20, 40.0);    // locked: same frequency
    window(20, 10.0);    // four times faster
    window(20, 160.0);   // four times slower
    window(20, 33.0);    // slightly faster
    window(50, 41.0);
    window(100, 8.0);    // 500 edges: overflow
    window(20, 40.0);    // overflow cleared again
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge fref);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
