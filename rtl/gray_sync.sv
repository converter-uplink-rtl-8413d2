// Carries a binary counter from one clock domain into another.
//
// The source side registers the Gray code of the count, the destination side passes
// it through two flip-flops and converts it back. Because the count moves by at most
// one step per source clock, only one bit changes at a time and the destination sees
// either the old or the new value, never a mix. Latency is one source clock plus two
// to three destination clocks. Used for FIFO pointers, the stacked 'go' counts and the
// time counter that the receive arbiter compares time stamps against.
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
  logic [W-1:0] src_gray, meta, sync;

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
    for (int i = int'(W) - 2; i >= 0; i--) dst_bin[i] = dst_bin[i+1] ^ sync[i];
  end
endmodule
