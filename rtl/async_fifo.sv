// Dual-clock first-in first-out buffer.
//
// 2^AW entries of WIDTH bits in a memory array, with one extra pointer bit to tell
// full from empty. Each side sees the other side's pointer through a gray_sync, so
// 'full' and 'empty' are conservative for a few clocks after the other side moves.
// The read side is first-word-fall-through: rdata shows the oldest entry while
// 'empty' is low, and rd_en removes it. A write while full is dropped and pulses
// 'overflow'; a read while empty pulses 'underflow'. wr_count is the fill level as
// seen from the write side. The transmit queues and the receive queues use it to
// cross between the 2^26 Hz converter clock and the 62.5 MHz uplink clock.
module async_fifo #(
  parameter int unsigned WIDTH = 17,
  parameter int unsigned AW    = 11
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  output logic             overflow,
  output logic [AW:0]      wr_count,
  input  logic             rd_clk,
  input  logic             rd_rst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             underflow
);
  logic [WIDTH-1:0] mem [2**AW];
  logic [AW:0] wptr, rptr, wptr_rd, rptr_wr;

  assign full     = (wptr - rptr_wr) == (AW+1)'(2**AW);
  assign wr_count = wptr - rptr_wr;
  assign empty    = (wptr_rd == rptr);
  assign rdata    = mem[rptr[AW-1:0]];

  always_ff @(posedge wr_clk)
    if (wr_en && !full) mem[wptr[AW-1:0]] <= wdata;

  always_ff @(posedge wr_clk or negedge wr_rst_n)
    if (!wr_rst_n) begin
      wptr     <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= wr_en && full;
      if (wr_en && !full) wptr <= wptr + 1'b1;
    end

  always_ff @(posedge rd_clk or negedge rd_rst_n)
    if (!rd_rst_n) begin
      rptr      <= '0;
      underflow <= 1'b0;
    end else begin
      underflow <= rd_en && empty;
      if (rd_en && !empty) rptr <= rptr + 1'b1;
    end

  gray_sync #(.W(AW+1)) u_w2r (.src_clk(wr_clk), .src_rst_n(wr_rst_n), .src_bin(wptr),
                               .dst_clk(rd_clk), .dst_rst_n(rd_rst_n), .dst_bin(wptr_rd));
  gray_sync #(.W(AW+1)) u_r2w (.src_clk(rd_clk), .src_rst_n(rd_rst_n), .src_bin(rptr),
                               .dst_clk(wr_clk), .dst_rst_n(wr_rst_n), .dst_bin(rptr_wr));
endmodule
