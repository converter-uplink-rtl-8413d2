// Receive engine of one uplink port.
//
// The rx_arbiter, in the uplink clock domain, sorts received frames: data words of
// accepted converter data frames go into one of four 32-bit queue FIFOs (A to D),
// configuration and status frames go whole into the low priority (LP) FIFO, 16 bits
// and an end-of-frame bit per entry. All FIFOs cross into the 2^26 Hz converter clock.
// There, per queue, a cycle_trigger fires 128 clocks (one sampling period, 1.91 us)
// ahead of each output cycle; queues that fire together run their microcode one after
// the other, A first, each copying words from its FIFO to DAC addresses through the
// shared dac_output_map. The arbiter's time window uses the time counter carried into
// the uplink clock through a Gray-coded synchroniser.
//
// IO space (byte offsets, 32-bit words, converter clock, read data one clock later):
//   0x00-0x0C ATRIG..DTRIG  0x10-0x1C AMASK..DMASK  0x20-0x2C AENDM..DENDM
//   0x30-0x3C ALEN..DLEN (expected data length field, in bytes)
//   0x40-0x68 statistics: A..D discarded, A..D missing, frame type, frame length,
//             decoder errors
//   0xF8 ReceiveStatus: bit 0 LP data ready (live); bits 1-4 out-of-sync frame on
//        A..D; 5 frame type error; 6 frame length error; 15 decoder error; 16-19 queue
//        A..D empty at the start of the first output cycle of a processing cycle.
//        Error bits are sticky and cleared by reading the word.
//   0xFC read: next LP FIFO entry, bit 16 = end of frame; zero when the FIFO is empty
// Memory space: queue q microcode at byte offset q*0x4000, 128 words, read data two
// clocks after the request. Register offsets and bits follow the uplink description;
// sticky status bits, the 'missing' test on first output cycles only, zero on an
// empty LP read, and skipping a whole processing cycle (no microcode run, DAC outputs
// hold their values) for a queue that is empty at its first output cycle are this
// design's choices. The skip keeps the words of one frame inside the processing cycle
// named by its stamp: without it, a frame arriving while the queue is idle would be
// consumed by the remaining output cycles of the current processing cycle.
module rx_engine
  import uplink_pkg::*;
#(
  parameter int unsigned N_DAC   = 16,
  parameter int unsigned HP_AW   = 10,   // 1024 words per data queue
  parameter int unsigned LP_AW   = 11    // 2048 16-bit entries
) (
  input  logic        clk,
  input  logic        rst_n,
  input  cnt_t        cnt,
  input  time_t       now,
  input  logic        io_we,
  input  logic        io_re,
  input  logic [7:0]  io_addr,
  input  logic [31:0] io_wdata,
  output logic [31:0] io_rdata,
  input  logic        mem_we,
  input  logic [15:0] mem_addr,
  input  logic [31:0] mem_wdata,
  output logic [31:0] mem_rdata,
  input  logic        clk_up,
  input  logic        rst_up_n,
  input  logic        rx_valid,
  input  logic [15:0] rx_data,
  input  logic        rx_last,
  output logic [31:0] dac_filt [N_DAC],
  output logic [31:0] dac_byp  [N_DAC],
  output logic [N_DAC-1:0] filt_upd,
  output logic [N_DAC-1:0] byp_upd,
  output logic [NQ-1:0] out_go
);
  // ------------------------------------------------------------ configuration
  logic [31:0] trig [NQ];
  logic [31:0] mask [NQ];
  logic [31:0] endm [NQ];
  logic [31:0] len  [NQ];
  logic [31:0] status, status_live;
  logic [31:0] stat_cnt [11];
  logic [NQ-1:0] en;
  mac_word_t   lp_rword;
  logic        lp_empty, lp_pop;

  assign lp_pop = io_re && io_addr == 8'hFC && !lp_empty;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int q = 0; q < int'(NQ); q++) begin
        trig[q] <= '0;  mask[q] <= '0;  endm[q] <= '0;  len[q] <= '0;
      end
    end else if (io_we) begin
      unique case (io_addr[7:4])
        4'h0: trig[io_addr[3:2]] <= io_wdata;
        4'h1: mask[io_addr[3:2]] <= io_wdata;
        4'h2: endm[io_addr[3:2]] <= io_wdata;
        4'h3: len[io_addr[3:2]]  <= io_wdata;
        default: ;
      endcase
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) io_rdata <= '0;
    else if (io_re) begin
      unique casez (io_addr)
        8'h0?:   io_rdata <= trig[io_addr[3:2]];
        8'h1?:   io_rdata <= mask[io_addr[3:2]];
        8'h2?:   io_rdata <= endm[io_addr[3:2]];
        8'h3?:   io_rdata <= len[io_addr[3:2]];
        8'h40, 8'h44, 8'h48, 8'h4C, 8'h50, 8'h54, 8'h58, 8'h5C, 8'h60, 8'h64, 8'h68:
                 io_rdata <= stat_cnt[4'((io_addr - 8'h40) >> 2)];
        8'hF8:   io_rdata <= status_live;
        8'hFC:   io_rdata <= lp_empty ? 32'h0 : 32'(lp_rword);
        default: io_rdata <= '0;
      endcase
    end

  // ------------------------------------------------------------ arbiter side
  time_t         now_up;
  logic [NQ-1:0] hp_wr, oos_up, oos;
  logic [31:0]   hp_wdata;
  logic          lp_wr, ftype_up, flen_up, ftype, flen;
  mac_word_t     lp_wdata;

  for (genvar q = 0; q < int'(NQ); q++) begin : g_en
    assign en[q] = trig[q][0];
  end

  gray_sync #(.W(TIME_W)) u_time (.src_clk(clk), .src_rst_n(rst_n), .src_bin(now),
                                  .dst_clk(clk_up), .dst_rst_n(rst_up_n), .dst_bin(now_up));

  rx_arbiter u_arb (
    .clk(clk_up), .rst_n(rst_up_n), .now(now_up), .q_en(en), .trig(trig), .mask(mask),
    .endm(endm), .len(len), .rx_valid(rx_valid), .rx_data(rx_data), .rx_last(rx_last),
    .hp_wr(hp_wr), .hp_wdata(hp_wdata), .lp_wr(lp_wr), .lp_wdata(lp_wdata),
    .oos_err(oos_up), .ftype_err(ftype_up), .flen_err(flen_up));

  for (genvar q = 0; q < int'(NQ); q++) begin : g_oos
    pulse_sync u_ps (.src_clk(clk_up), .src_rst_n(rst_up_n), .src_pulse(oos_up[q]),
                     .dst_clk(clk), .dst_rst_n(rst_n), .dst_pulse(oos[q]));
  end
  pulse_sync u_ps_ft (.src_clk(clk_up), .src_rst_n(rst_up_n), .src_pulse(ftype_up),
                      .dst_clk(clk), .dst_rst_n(rst_n), .dst_pulse(ftype));
  pulse_sync u_ps_fl (.src_clk(clk_up), .src_rst_n(rst_up_n), .src_pulse(flen_up),
                      .dst_clk(clk), .dst_rst_n(rst_n), .dst_pulse(flen));

  async_fifo #(.WIDTH(17), .AW(LP_AW)) u_lp (
    .wr_clk(clk_up), .wr_rst_n(rst_up_n), .wr_en(lp_wr), .wdata(lp_wdata),
    .full(), .overflow(), .wr_count(),
    .rd_clk(clk), .rd_rst_n(rst_n), .rd_en(lp_pop), .rdata(lp_rword),
    .empty(lp_empty), .underflow());

  // ------------------------------------------------------------ queues and microcode
  logic [31:0]   q_rdata [NQ];
  logic [NQ-1:0] q_empty, q_rd;
  logic [NQ-1:0] go, first, last, pending, first_q, last_q, busy, done, start, cpu_we;
  logic [NQ-1:0] missing, sm_we, hold, run, sm_start;
  logic [11:0]   sm_addr [NQ];
  logic [31:0]   sm_data [NQ];
  logic [31:0]   cpu_rdata [NQ];
  logic [1:0]    pick, mem_q;
  logic          launch;

  for (genvar q = 0; q < int'(NQ); q++) begin : g_q
    async_fifo #(.WIDTH(32), .AW(HP_AW)) u_fifo (
      .wr_clk(clk_up), .wr_rst_n(rst_up_n), .wr_en(hp_wr[q]), .wdata(hp_wdata),
      .full(), .overflow(), .wr_count(),
      .rd_clk(clk), .rd_rst_n(rst_n), .rd_en(q_rd[q]), .rdata(q_rdata[q]),
      .empty(q_empty[q]), .underflow());

    cycle_trigger #(.ADVANCE(SAMPLE_CLKS)) u_trig (
      .cnt(cnt), .trig(trig[q]), .mask(mask[q]), .endm(endm[q]),
      .go(go[q]), .first(first[q]), .last(last[q]));

    assign cpu_we[q] = mem_we && mem_addr[15:14] == 2'(q);

    rx_microcode_sm u_sm (
      .clk(clk), .rst_n(rst_n), .enable(en[q]), .start(sm_start[q]),
      .first(first_q[q]), .last(last_q[q]),
      .cpu_we(cpu_we[q]), .cpu_idx(mem_addr[8:2]), .cpu_wdata(mem_wdata),
      .cpu_rdata(cpu_rdata[q]),
      .fifo_rdata(q_rdata[q]), .fifo_empty(q_empty[q]), .fifo_rd(q_rd[q]),
      .dac_we(sm_we[q]), .dac_addr(sm_addr[q]), .dac_data(sm_data[q]),
      .busy(busy[q]), .done(done[q]));
  end
  assign out_go = go;

  always_comb begin
    pick = '0;
    for (int q = int'(NQ) - 1; q >= 0; q--) if (pending[q]) pick = 2'(q);
    launch = (|pending) && !(|busy);
    start  = launch ? NQ'(1) << pick : '0;
    // a queue found empty at its first output cycle sits out the whole processing
    // cycle, so that a late frame is never spread over two processing cycles
    for (int q = 0; q < int'(NQ); q++) run[q] = first_q[q] ? !q_empty[q] : !hold[q];
    sm_start = start & run;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pending <= '0;  first_q <= '0;  last_q <= '0;  missing <= '0;  hold <= '1;
      mem_q <= '0;  mem_rdata <= '0;
    end else begin
      missing <= '0;
      mem_q     <= mem_addr[15:14];
      mem_rdata <= cpu_rdata[mem_q];
      for (int q = 0; q < int'(NQ); q++) begin
        if (start[q]) begin
          pending[q] <= 1'b0;
          missing[q] <= first_q[q] && q_empty[q];
          if (first_q[q]) hold[q] <= q_empty[q];
        end
        if (go[q]) begin
          pending[q] <= 1'b1;
          first_q[q] <= first[q];
          last_q[q]  <= last[q];
        end
      end
    end

  // shared DAC bus: only one state machine runs at a time
  logic        bus_we;
  logic [11:0] bus_addr;
  logic [31:0] bus_data;
  logic        dac_dec_err;

  always_comb begin
    bus_we = 1'b0;  bus_addr = '0;  bus_data = '0;
    for (int q = 0; q < int'(NQ); q++)
      if (sm_we[q]) begin
        bus_we = 1'b1;  bus_addr = sm_addr[q];  bus_data = sm_data[q];
      end
  end

  dac_output_map #(.N_DAC(N_DAC)) u_dac (
    .clk(clk), .rst_n(rst_n), .dac_we(bus_we), .dac_addr(bus_addr), .dac_data(bus_data),
    .dac_filt(dac_filt), .dac_byp(dac_byp), .filt_upd(filt_upd), .byp_upd(byp_upd),
    .decode_err(dac_dec_err));

  // ------------------------------------------------------------ status and counters
  logic [31:0] ev;
  logic [10:0] cnt_ev;
  always_comb begin
    ev = '0;
    ev[4:1]   = oos;
    ev[5]     = ftype;
    ev[6]     = flen;
    ev[15]    = dac_dec_err;
    ev[19:16] = missing;
    cnt_ev = {dac_dec_err, flen, ftype, missing, oos};
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) status <= '0;
    else        status <= ((io_re && io_addr == 8'hF8) ? 32'h0 : status) | ev;

  assign status_live = {status[31:1], !lp_empty};

  edge_counter #(.N(11)) u_stats (.clk(clk), .rst_n(rst_n), .ev(cnt_ev), .count(stat_cnt));

  a_one_dac_writer: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sm_we));
endmodule
