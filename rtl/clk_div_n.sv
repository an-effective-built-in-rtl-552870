// clk_div_n: divide-by-N of the VCO output.
//
// In the self-test this is the divide-by-4 block: while the strobe is high
// the PLL is fed back through it, so the loop relocks with the VCO running
// at N times the reference. A modulo-N counter clocked by the input runs
// 0..N-1; the registered output is low while the next count is below N/2
// and high otherwise, giving one rising edge per N input edges (50 % duty
// for even N). rst_n clears it asynchronously; the output then starts low.
// The division ratio N = 4 follows the design; the counter structure and
// reset are this implementation's choice.
module clk_div_n #(
  parameter int unsigned N = 4
) (
  input  logic clk_in,
  input  logic rst_n,
  output logic clk_out
);

  localparam int unsigned W = (N > 2) ? $clog2(N) : 1;

  logic [W-1:0] cnt_q;
  logic [W-1:0] cnt_nxt;

  initial begin
    assert (N >= 2) else $error("clk_div_n: N must be at least 2");
  end

  always_comb begin
    if (cnt_q == W'(N - 1)) cnt_nxt = '0;
    else                    cnt_nxt = cnt_q + 1'b1;
  end

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q   <= '0;
      clk_out <= 1'b0;
    end else begin
      cnt_q   <= cnt_nxt;
      clk_out <= (cnt_nxt >= W'(N / 2));
    end
  end

endmodule
