// gray_sync: carries a counter value from one clock domain to another.
//
// The source side converts its binary counter to Gray code in a register,
// so that between two source clock edges exactly one bit changes. The
// destination side samples that register through a two-flop synchroniser
// and converts back to binary. The result lags the source by two to three
// destination clock cycles and is always a value the counter really held,
// provided the counter moves by at most one per source clock.
//
// Interface: src_bin is sampled on src_clk; dst_bin is valid on dst_clk.
// Both resets are active low and asynchronous. This is a standard
// clock-domain-crossing circuit of this design's own choosing.
module gray_sync #(
  parameter int unsigned W = 8
) (
  input  logic         src_clk,
  input  logic         src_rst_n,
  input  logic [W-1:0] src_bin,
  input  logic         dst_clk,
  input  logic         dst_rst_n,
  output logic [W-1:0] dst_bin
);

  logic [W-1:0] src_gray;
  logic [W-1:0] meta, sync;

  always_ff @(posedge src_clk or negedge src_rst_n)
    if (!src_rst_n) src_gray <= '0;
    else            src_gray <= src_bin ^ (src_bin >> 1);

  always_ff @(posedge dst_clk or negedge dst_rst_n)
    if (!dst_rst_n) begin
      meta <= '0;
      sync <= '0;
    end else begin
      meta <= src_gray;
      sync <= meta;
    end

  always_comb begin
    dst_bin[W-1] = sync[W-1];
    for (int i = int'(W) - 2; i >= 0; i--)
      dst_bin[i] = dst_bin[i+1] ^ sync[i];
  end

endmodule
