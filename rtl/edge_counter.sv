// edge_counter: gated counter of the rising edges of a clock-like signal.
//
// Counts rising edges of `clk` while `en` is high. `en` comes from the
// reference-clock domain; with SYNC_STAGES > 0 it is first passed through
// that many flip-flops clocked by `clk`, so the gate opens and closes a
// fixed number of `clk` edges after `en` changes and the count covers the
// same length of time as the enable pulse, to within one edge. With
// SYNC_STAGES = 0 the counter is in the same domain as `en`.
//
// `init` clears the counter asynchronously (active high). The counter itself
// is CNT_BITS wide; the extra top bit of `count` is a sticky overflow flag,
// set when an edge arrives at the all-ones value, after which the count
// holds. A CNT_BITS-bit count plus the overflow flag makes the
// (CNT_BITS+1)-bit buses between the counters and the control block.
// The overflow flag and the synchronizer are this implementation's choices.
module edge_counter #(
  parameter int unsigned CNT_BITS    = 7,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic              clk,
  input  logic              init,
  input  logic              en,
  output logic [CNT_BITS:0] count
);

  logic                gate;
  logic [CNT_BITS-1:0] cnt_q;
  logic                ovf_q;

  if (SYNC_STAGES == 0) begin : g_nosync
    assign gate = en;
  end else begin : g_sync
    logic [SYNC_STAGES-1:0] sync_q;
    always_ff @(posedge clk or posedge init) begin
      if (init) begin
        sync_q <= '0;
      end else begin
        sync_q[0] <= en;
        for (int i = 1; i < SYNC_STAGES; i++) sync_q[i] <= sync_q[i-1];
      end
    end
    assign gate = sync_q[SYNC_STAGES-1];
  end

  always_ff @(posedge clk or posedge init) begin
    if (init) begin
      cnt_q <= '0;
      ovf_q <= 1'b0;
    end else if (gate && !ovf_q) begin
      if (&cnt_q) ovf_q <= 1'b1;
      else        cnt_q <= cnt_q + 1'b1;
    end
  end

  assign count = {ovf_q, cnt_q};

endmodule
