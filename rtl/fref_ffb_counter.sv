// fref_ffb_counter: the reference and feedback counters of the self-test.
//
// Two gated edge counters run over the same window. The reference counter is
// clocked by Fref, the domain of the control block, and counts the Fref
// cycles for which `en` is high; the control block uses it as the window
// timer. The feedback counter is clocked by Ffb and sees `en` through a
// two-stage synchronizer, so it counts Ffb edges over the same length of time.
// When Ffb is locked to Fref both counts agree; the control block compares
// them to raise its lock signal. `init` (from the control block) clears both
// counters asynchronously.
//
// Outputs are (CNT_BITS+1) bits: a CNT_BITS-bit count and a sticky overflow
// flag on top. Counting both frequencies over a window, the `init` clear and
// the widths follow the design; the synchronizer and overflow flag are this
// implementation's choice. The feedback count is only read after the control
// block has dropped `en` and waited for the Ffb domain to stop.
module fref_ffb_counter #(
  parameter int unsigned CNT_BITS = 7
) (
  input  logic              fref,
  input  logic              ffb,
  input  logic              init,
  input  logic              en,
  output logic [CNT_BITS:0] ref_cnt,
  output logic [CNT_BITS:0] fb_cnt
);

  edge_counter #(.CNT_BITS(CNT_BITS), .SYNC_STAGES(0)) u_ref_cnt (
    .clk  (fref),
    .init (init),
    .en   (en),
    .count(ref_cnt)
  );

  edge_counter #(.CNT_BITS(CNT_BITS), .SYNC_STAGES(2)) u_fb_cnt (
    .clk  (ffb),
    .init (init),
    .en   (en),
    .count(fb_cnt)
  );

endmodule
