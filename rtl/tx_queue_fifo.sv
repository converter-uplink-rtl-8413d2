// One transmit queue: a 17-bit FIFO between the converter clock (write side) and the
// uplink clock (read side), plus a counter of stacked 'go' commands.
//
// Each entry on the MAC side is 16 data bits and an end-of-frame bit. With WIDE=1
// (queues A to D) the microcode state machine writes one 32-bit word per clock; it is
// stored as one entry and read out as two 16-bit halves, most significant half first,
// and wr_eof marks the second half as the end of the frame. With WIDE=0 (the low
// priority queue) the processor writes one 17-bit entry at a time and an entry with
// its 17th bit set also acts as the 'go' for its frame. DEPTH16 is the capacity in
// 16-bit entries.
//
// 'go' requests are counted on the write side and handed to the read side through a
// Gray-coded counter: frame_ready is high while at least one go is waiting and
// go_take (from the arbiter, when it starts a frame) consumes one. At most GO_MAX gos
// may be stacked; a further one is dropped and pulses go_err. Writing to a full
// queue drops the word and pulses overflow; popping an empty queue pulses underflow.
// The 17-bit width, the end-of-frame bit and the 16 stacked gos are from the
// uplink description; the capacity of about 1000 32-bit words is its approximate
// figure, rounded to a power of two here.
module tx_queue_fifo
  import uplink_pkg::*;
#(
  parameter bit          WIDE    = 1'b1,
  parameter int unsigned DEPTH16 = 2048,
  parameter int unsigned GO_MAX  = 16
) (
  input  logic        wr_clk,
  input  logic        wr_rst_n,
  input  logic        wr_en,
  input  logic [31:0] wdata,      // WIDE: full word; else [16] = eof, [15:0] = data
  input  logic        wr_eof,     // WIDE only: this word ends the frame
  input  logic        go,         // WIDE only: start transmission command
  output logic        overflow,
  output logic        go_err,
  input  logic        rd_clk,
  input  logic        rd_rst_n,
  output mac_word_t   rd_word,
  output logic        rd_empty,
  input  logic        rd_pop,
  output logic        frame_ready,
  input  logic        go_take,
  output logic        underflow
);
  localparam int unsigned EW  = WIDE ? 33 : 17;
  localparam int unsigned AW  = WIDE ? $clog2(DEPTH16) - 1 : $clog2(DEPTH16);
  localparam int unsigned GW  = $clog2(GO_MAX) + 1;

  logic [EW-1:0] fifo_wdata, fifo_rdata;
  logic          fifo_wr, fifo_rd, fifo_empty, fifo_full;
  logic          half;         // WIDE: 1 while the low half is at the output
  logic          go_req;
  logic [GW-1:0] go_wr, go_rd, go_wr_at_rd, go_rd_at_wr;

  // ---------------------------------------------------------------- write side
  always_comb begin
    if (WIDE) begin
      fifo_wdata = EW'({wr_eof, wdata});
      go_req     = go;
    end else begin
      fifo_wdata = EW'(wdata[16:0]);
      go_req     = wr_en && wdata[16] && !fifo_full;
    end
  end
  assign fifo_wr = wr_en;

  always_ff @(posedge wr_clk or negedge wr_rst_n)
    if (!wr_rst_n) begin
      go_wr  <= '0;
      go_err <= 1'b0;
    end else begin
      go_err <= 1'b0;
      if (go_req) begin
        if ((go_wr - go_rd_at_wr) >= GW'(GO_MAX)) go_err <= 1'b1;
        else                                       go_wr  <= go_wr + 1'b1;
      end
    end

  async_fifo #(.WIDTH(EW), .AW(AW)) u_fifo (
    .wr_clk(wr_clk), .wr_rst_n(wr_rst_n), .wr_en(fifo_wr), .wdata(fifo_wdata),
    .full(fifo_full), .overflow(overflow), .wr_count(),
    .rd_clk(rd_clk), .rd_rst_n(rd_rst_n), .rd_en(fifo_rd), .rdata(fifo_rdata),
    .empty(fifo_empty), .underflow());

  gray_sync #(.W(GW)) u_go_w2r (.src_clk(wr_clk), .src_rst_n(wr_rst_n), .src_bin(go_wr),
                                .dst_clk(rd_clk), .dst_rst_n(rd_rst_n), .dst_bin(go_wr_at_rd));
  gray_sync #(.W(GW)) u_go_r2w (.src_clk(rd_clk), .src_rst_n(rd_rst_n), .src_bin(go_rd),
                                .dst_clk(wr_clk), .dst_rst_n(wr_rst_n), .dst_bin(go_rd_at_wr));

  // ----------------------------------------------------------------- read side
  assign rd_empty    = fifo_empty;
  assign frame_ready = (go_wr_at_rd != go_rd);

  if (WIDE) begin : g_wide
    assign rd_word = half ? mac_word_t'({fifo_rdata[EW-1], fifo_rdata[15:0]})
                          : mac_word_t'({1'b0, fifo_rdata[EW-2 -: 16]});
    assign fifo_rd = rd_pop && half;
  end else begin : g_narrow
    assign rd_word = mac_word_t'(fifo_rdata[16:0]);
    assign fifo_rd = rd_pop;
  end

  always_ff @(posedge rd_clk or negedge rd_rst_n)
    if (!rd_rst_n) begin
      half      <= 1'b0;
      go_rd     <= '0;
      underflow <= 1'b0;
    end else begin
      underflow <= rd_pop && fifo_empty;
      if (WIDE && rd_pop && !fifo_empty) half <= !half;
      if (go_take && frame_ready) go_rd <= go_rd + 1'b1;
    end
endmodule
