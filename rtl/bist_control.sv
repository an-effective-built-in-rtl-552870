// bist_control: control and test-output block of the charge-pump PLL self-test.
//
// Clocked by the reference Fref, reset by rst_n (asynchronous, active low).
// It repeats one measurement window, one window after the other:
//   W_INIT   (1 cycle)       init high: the Fref, Ffb and Fvco counters clear
//   W_RUN    (WIN cycles)    cnt_en high: all three counters count
//   W_SETTLE (SETTLE cycles) cnt_en low: the Ffb and Fvco domains stop
//   W_EVAL   (1 cycle)       the counts are static and are evaluated
// so a window takes WIN + SETTLE + 2 Fref cycles. In W_EVAL the window counts
// as locked when the Ffb count is within LOCK_TOL of the Fref count; the lock
// output rises after LOCK_COUNT locked windows in a row and falls at the
// first window that is not locked. The Fvco count of every window (counted
// here, by an internal edge counter clocked by Fvco) is shown on test_out.
//
// With test_en high the procedure runs once:
//   T_FLT       C_clk = 0 (Ffb = Fvco). Frequency lock test: wait for lock,
//               then store the window's Fvco count as R1 and raise C_clk.
//               No lock within FLT_TIMEOUT windows ends the test as failed.
//   T_CHARGE    C_clk = 1 (Ffb = Fvco/N). The loop must relock with the VCO
//               at N x Fref. After STROBE_WINDOWS windows the last window's
//               count is stored as R2 with its lock state, and C_clk falls.
//   T_DISCHARGE C_clk = 0 (Ffb = Fvco). After STROBE_WINDOWS windows the last
//               window's count is stored as R3 with its lock state. A strobe
//               period is good when both lock states are high, R1 and R3 are
//               within EVAL_TOL of WIN and R2 within EVAL_TOL of N x WIN.
//               With STROBE_CYCLES > 1, C_clk rises again and the charge and
//               discharge tests repeat; R2 and R3 keep the last period's
//               values.
//   T_DONE      pass = every strobe period was good; done = 1. The block
//               stays here until test_en falls.
// With test_en low the block only watches the running PLL (C_clk stays low)
// and keeps lock and test_out current: on-line lock monitoring.
//
// Taken from the design: the procedure order (lock test, store R1, charge
// test with Fvco/4 feedback, store R2, discharge test, store R3, evaluate),
// the strobe C_clk selecting the feedback, init clearing the counters, the
// Fvco measurement inside this block, 7-bit counters on 8-bit buses and the
// one-count (about 1 %) pass/fail resolution. This implementation's own
// choices: the window structure and its lengths, the lock rule (count
// comparison, LOCK_TOL, LOCK_COUNT), measuring R2 and R3 at a fixed time
// (STROBE_WINDOWS windows) after each strobe edge, the lock-test timeout,
// the synchronizer on test_en and the extra status outputs. The default of
// one strobe period (STROBE_CYCLES = 1) follows the test flow, which ends
// after R3; the design's remark that the switching repeats at every strobe
// edge is served by STROBE_CYCLES > 1.
module bist_control
  import bist_pkg::*;
#(
  parameter int unsigned CNT_BITS       = 7,   // counter width (8-bit buses)
  parameter int unsigned DIV_N          = 4,   // feedback division in the charge test
  parameter int unsigned WIN            = 20,  // Fref cycles per counting window
  parameter int unsigned SETTLE         = 4,   // Fref cycles between count stop and read
  parameter int unsigned LOCK_TOL       = 1,   // |Ffb count - Fref count| still locked
  parameter int unsigned LOCK_COUNT     = 2,   // locked windows in a row for lock = 1
  parameter int unsigned STROBE_WINDOWS = 4,   // windows per strobe half period
  parameter int unsigned STROBE_CYCLES  = 1,   // charge/discharge periods per test
  parameter int unsigned FLT_TIMEOUT    = 64,  // windows allowed for the first lock
  parameter int unsigned EVAL_TOL       = 1    // counts allowed off the expected R value
) (
  input  logic              fref,
  input  logic              rst_n,
  input  logic              fvco,
  input  logic              test_en,
  input  logic [CNT_BITS:0] ref_cnt,
  input  logic [CNT_BITS:0] fb_cnt,
  output logic              init,
  output logic              cnt_en,
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

  localparam int unsigned CNT_MAX = (1 << CNT_BITS) - 1;
  localparam int unsigned EXP_LO  = WIN;          // expected R1, R3
  localparam int unsigned EXP_HI  = WIN * DIV_N;  // expected R2
  localparam int unsigned SW      = (SETTLE > 1) ? $clog2(SETTLE) : 1;
  localparam int unsigned LW      = $clog2(LOCK_COUNT + 1);
  localparam int unsigned TW      = (FLT_TIMEOUT > 1) ? $clog2(FLT_TIMEOUT) : 1;
  localparam int unsigned BW      = (STROBE_WINDOWS > 1) ? $clog2(STROBE_WINDOWS) : 1;
  localparam int unsigned CW      = (STROBE_CYCLES > 1) ? $clog2(STROBE_CYCLES) : 1;

  initial begin
    assert (WIN >= 2 && WIN <= CNT_MAX) else $error("bist_control: WIN out of range");
    assert (EXP_HI + EVAL_TOL + LOCK_TOL <= CNT_MAX)
      else $error("bist_control: N x WIN does not fit the counters");
    assert (SETTLE >= 1 && LOCK_COUNT >= 1 && STROBE_WINDOWS >= 1 && STROBE_CYCLES >= 1
            && FLT_TIMEOUT >= 1)
      else $error("bist_control: bad sequencing parameter");
  end

  // Fvco measurement counter, gated by the same window.
  logic [CNT_BITS:0] vco_cnt;
  edge_counter #(.CNT_BITS(CNT_BITS), .SYNC_STAGES(2)) u_vco_cnt (
    .clk  (fvco),
    .init (init),
    .en   (cnt_en),
    .count(vco_cnt)
  );

  // test_en is a pin from outside; bring it into the Fref domain.
  logic [1:0] ten_sync_q;
  always_ff @(posedge fref or negedge rst_n) begin
    if (!rst_n) ten_sync_q <= '0;
    else        ten_sync_q <= {ten_sync_q[0], test_en};
  end
  logic ten;
  assign ten = ten_sync_q[1];

  // Is a count within tol of an expected value (and not overflowed)?
  function automatic logic near(input logic [CNT_BITS:0] v, input int unsigned expv,
                                input int unsigned tol);
    int diff;
    diff = int'(v[CNT_BITS-1:0]) - int'(expv);
    return !v[CNT_BITS] && (diff <= int'(tol)) && (diff >= -int'(tol));
  endfunction

  win_state_e        win_q;
  logic [SW-1:0]     settle_q;
  logic [LW-1:0]     streak_q;
  logic [TW-1:0]     flt_cnt_q;
  logic [BW-1:0]     strobe_cnt_q;
  logic              lock2_q;
  logic [CW-1:0]     cyc_q;     // strobe periods done
  logic              ok_acc_q;  // every finished strobe period was in range

  // Lock decision for the window being evaluated.
  logic              win_match;
  logic [LW-1:0]     streak_nxt;
  logic              lock_nxt;
  always_comb begin
    win_match = !ref_cnt[CNT_BITS] && near(fb_cnt, int'(ref_cnt[CNT_BITS-1:0]), LOCK_TOL);
    if (!win_match)                     streak_nxt = '0;
    else if (streak_q >= LW'(LOCK_COUNT)) streak_nxt = streak_q;
    else                                streak_nxt = streak_q + 1'b1;
    lock_nxt = (streak_nxt >= LW'(LOCK_COUNT));
  end

  // Verdict of the strobe period ending in this window (R3 = vco_cnt).
  logic              cycle_ok;
  assign cycle_ok = lock2_q && lock_nxt && near(r1, EXP_LO, EVAL_TOL)
                    && near(r2, EXP_HI, EVAL_TOL) && near(vco_cnt, EXP_LO, EVAL_TOL);

  always_ff @(posedge fref or negedge rst_n) begin
    if (!rst_n) begin
      win_q        <= W_INIT;
      init         <= 1'b1;
      cnt_en       <= 1'b0;
      settle_q     <= '0;
      streak_q     <= '0;
      lock         <= 1'b0;
      test_out     <= '0;
      state        <= T_IDLE;
      c_clk        <= 1'b0;
      done         <= 1'b0;
      pass         <= 1'b0;
      flt_timeout  <= 1'b0;
      flt_cnt_q    <= '0;
      strobe_cnt_q <= '0;
      lock2_q      <= 1'b0;
      cyc_q        <= '0;
      ok_acc_q     <= 1'b0;
      r1           <= '0;
      r2           <= '0;
      r3           <= '0;
    end else begin
      unique case (win_q)
        W_INIT: begin
          init   <= 1'b0;
          cnt_en <= 1'b1;
          win_q  <= W_RUN;
        end
        W_RUN: begin
          // The Fref counter reaches WIN at this edge.
          if (ref_cnt[CNT_BITS-1:0] == CNT_BITS'(WIN - 1)) begin
            cnt_en   <= 1'b0;
            settle_q <= '0;
            win_q    <= W_SETTLE;
          end
        end
        W_SETTLE: begin
          if (settle_q == SW'(SETTLE - 1)) win_q <= W_EVAL;
          else                             settle_q <= settle_q + 1'b1;
        end
        W_EVAL: begin
          streak_q <= streak_nxt;
          lock     <= lock_nxt;
          test_out <= vco_cnt;
          init     <= 1'b1;
          win_q    <= W_INIT;

          // Test procedure: one step per window.
          if (!ten) begin
            state <= T_IDLE;
            c_clk <= 1'b0;
            done  <= 1'b0;
          end else begin
            unique case (state)
              T_IDLE: begin
                state       <= T_FLT;
                flt_cnt_q   <= '0;
                done        <= 1'b0;
                pass        <= 1'b0;
                flt_timeout <= 1'b0;
              end
              T_FLT: begin
                if (lock_nxt) begin
                  r1           <= vco_cnt;
                  cyc_q        <= '0;
                  ok_acc_q     <= 1'b1;
                  c_clk        <= 1'b1;
                  strobe_cnt_q <= '0;
                  state        <= T_CHARGE;
                end else if (flt_cnt_q == TW'(FLT_TIMEOUT - 1)) begin
                  flt_timeout <= 1'b1;
                  pass        <= 1'b0;
                  done        <= 1'b1;
                  state       <= T_DONE;
                end else begin
                  flt_cnt_q <= flt_cnt_q + 1'b1;
                end
              end
              T_CHARGE: begin
                if (strobe_cnt_q == BW'(STROBE_WINDOWS - 1)) begin
                  r2           <= vco_cnt;
                  lock2_q      <= lock_nxt;
                  c_clk        <= 1'b0;
                  strobe_cnt_q <= '0;
                  state        <= T_DISCHARGE;
                end else begin
                  strobe_cnt_q <= strobe_cnt_q + 1'b1;
                end
              end
              T_DISCHARGE: begin
                if (strobe_cnt_q == BW'(STROBE_WINDOWS - 1)) begin
                  r3 <= vco_cnt;
                  if (cyc_q == CW'(STROBE_CYCLES - 1)) begin
                    pass  <= ok_acc_q && cycle_ok;
                    done  <= 1'b1;
                    state <= T_DONE;
                  end else begin
                    // Next strobe period.
                    ok_acc_q     <= ok_acc_q && cycle_ok;
                    cyc_q        <= cyc_q + 1'b1;
                    c_clk        <= 1'b1;
                    strobe_cnt_q <= '0;
                    state        <= T_CHARGE;
                  end
                end else begin
                  strobe_cnt_q <= strobe_cnt_q + 1'b1;
                end
              end
              T_DONE: ;
              default: state <= T_IDLE;
            endcase
          end
        end
        default: win_q <= W_INIT;
      endcase
    end
  end

  // The feedback is divided only during the charge test.
  a_cclk_charge: assert property (@(posedge fref) disable iff (!rst_n) c_clk |-> state == T_CHARGE);
  // The counters are only enabled in the counting phase of a window.
  a_en_run: assert property (@(posedge fref) disable iff (!rst_n) cnt_en |-> win_q == W_RUN);

endmodule
