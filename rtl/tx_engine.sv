// Transmit engine of one uplink port.
//
// Four microcode queues (A to D) turn converter samples into Ethernet frames; a fifth,
// low priority (LP) queue carries frames written word by word by the management
// processor. Per data queue a cycle_trigger decides from TRIG/MASK/ENDM when an
// acquisition cycle starts and whether it is the first or last of the processing
// cycle; the engine latches those flags and the time of the cycle start (the GPS time
// stamp of the frame). The four state machines share one data source multiplexer, so
// the queues whose cycles start together run one after the other, A first; the grant
// passes on in the clock after a program's end instruction. Each state machine writes
// 32-bit words into its tx_queue_fifo, which crosses into the uplink clock, where the
// tx_arbiter sends complete frames to the MAC in the order A, B, C, D, LP, the LP
// queue only inside the window of equation (1) computed from cnt and LPStart/LPStop/
// LPMask.
//
// IO space (byte offsets, 32-bit words, converter clock, read data one clock later):
//   0x00-0x0C ATRIG..DTRIG   0x10-0x1C AMASK..DMASK   0x20-0x2C AENDM..DENDM
//   0x30 LPStart  0x34 LPStop  0x38 LPMask
//   0x3C read: TransmitStatus; write: bits 16..0 go into the LP queue
//   0x40-0x58 statistics: A..D FIFO errors, LP FIFO errors, arbiter errors, decoder
// TransmitStatus bits 3q, 3q+1, 3q+2 = overflow, underflow, too many gos of queue q
// (A..D, LP), bit 15 = arbiter transmit error, bit 16 = microcode decoder error.
// Status bits are sticky and cleared by reading the status word; each counter
// counts error events as they happen (both choices of this design).
// Memory space (byte offsets): queue q microcode at q*0x4000, its data pool at
// q*0x4000 + 0x2000, 128 words each; read data two clocks after the request.
module tx_engine
  import uplink_pkg::*;
#(
  parameter int unsigned N_ADC   = 16,
  parameter int unsigned DEPTH16 = 2048
) (
  input  logic        clk,
  input  logic        rst_n,
  input  cnt_t        cnt,
  input  logic [31:0] sec,
  input  logic [31:0] adc_filt [N_ADC],
  input  logic [31:0] adc_raw  [N_ADC],
  // management processor, IO space
  input  logic        io_we,
  input  logic        io_re,
  input  logic [7:0]  io_addr,
  input  logic [31:0] io_wdata,
  output logic [31:0] io_rdata,
  // management processor, memory space
  input  logic        mem_we,
  input  logic [15:0] mem_addr,
  input  logic [31:0] mem_wdata,
  output logic [31:0] mem_rdata,
  // uplink clock domain, towards the MAC
  input  logic        clk_up,
  input  logic        rst_up_n,
  output logic        mac_valid,
  output logic [15:0] mac_data,
  output logic        mac_last,
  input  logic        mac_ready,
  output logic        mac_abort,
  // events, for observation (converter clock)
  output logic [NQ-1:0] acq_go
);
  // ------------------------------------------------------------ configuration
  logic [31:0] trig [NQ];
  logic [31:0] mask [NQ];
  logic [31:0] endm [NQ];
  logic [31:0] lp_start, lp_stop, lp_mask;
  logic [31:0] status;
  logic [31:0] stat_cnt [7];
  logic        lp_wr;

  assign lp_wr = io_we && io_addr == 8'h3C;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int q = 0; q < int'(NQ); q++) begin
        trig[q] <= '0;
        mask[q] <= '0;
        endm[q] <= '0;
      end
      lp_start <= '0;
      lp_stop  <= '0;
      lp_mask  <= '0;
    end else if (io_we) begin
      unique case (io_addr[7:4])
        4'h0: trig[io_addr[3:2]] <= io_wdata;
        4'h1: mask[io_addr[3:2]] <= io_wdata;
        4'h2: endm[io_addr[3:2]] <= io_wdata;
        4'h3: unique case (io_addr[3:2])
          2'd0: lp_start <= io_wdata;
          2'd1: lp_stop  <= io_wdata;
          2'd2: lp_mask  <= io_wdata;
          default: ;                       // 0x3C: LP queue write
        endcase
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
        8'h30:   io_rdata <= lp_start;
        8'h34:   io_rdata <= lp_stop;
        8'h38:   io_rdata <= lp_mask;
        8'h3C:   io_rdata <= status;
        8'h40, 8'h44, 8'h48, 8'h4C, 8'h50, 8'h54, 8'h58:
                 io_rdata <= stat_cnt[3'((io_addr - 8'h40) >> 2)];
        default: io_rdata <= '0;
      endcase
    end

  // ------------------------------------------------------- triggers, sequencer
  logic [NQ-1:0] go, first, last, pending, first_q, last_q, busy, done, start, en;
  logic [31:0]   st_sec [NQ];
  logic [31:0]   st_frac[NQ];
  logic [1:0]    active, sel, sel_q, pick;
  logic          any_busy, pick_any, launch, src_live;

  for (genvar q = 0; q < int'(NQ); q++) begin : g_trig
    assign en[q] = trig[q][0];
    cycle_trigger u_trig (.cnt(cnt), .trig(trig[q]), .mask(mask[q]), .endm(endm[q]),
                          .go(go[q]), .first(first[q]), .last(last[q]));
  end
  assign acq_go = go;

  always_comb begin
    any_busy = |busy;
    pick_any = |pending;
    pick     = '0;
    for (int q = int'(NQ) - 1; q >= 0; q--) if (pending[q]) pick = 2'(q);
    launch = pick_any && !any_busy;
    start  = launch ? NQ'(1) << pick : '0;
    sel    = launch ? pick : active;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pending <= '0;
      first_q <= '0;
      last_q  <= '0;
      active  <= '0;
      sel_q   <= '0;
      src_live <= 1'b0;
      for (int q = 0; q < int'(NQ); q++) begin
        st_sec[q]  <= '0;
        st_frac[q] <= '0;
      end
    end else begin
      sel_q    <= sel;
      src_live <= launch || any_busy;
      if (launch) active <= pick;
      for (int q = 0; q < int'(NQ); q++) begin
        if (start[q]) pending[q] <= 1'b0;
        if (go[q]) begin
          pending[q] <= 1'b1;
          first_q[q] <= first[q];
          last_q[q]  <= last[q];
          st_sec[q]  <= sec;
          st_frac[q] <= {cnt, 6'b0};
        end
      end
    end

  // ------------------------------------------------------- state machines
  logic [11:0] src_addr   [NQ];
  logic [31:0] pool_rdata [NQ];
  logic [31:0] cpu_rdata  [NQ];
  logic [31:0] fifo_wdata [NQ];
  logic [31:0] src_data;
  logic [NQ-1:0] fifo_wr, fifo_eof, start_tx, cpu_we;
  logic        decode_err;
  logic [1:0]  mem_q;

  for (genvar q = 0; q < int'(NQ); q++) begin : g_sm
    assign cpu_we[q] = mem_we && mem_addr[15:14] == 2'(q);
    tx_microcode_sm u_sm (
      .clk(clk), .rst_n(rst_n), .enable(en[q]), .start(start[q]),
      .first(first_q[q]), .last(last_q[q]),
      .cpu_we(cpu_we[q]), .cpu_pool(mem_addr[13]), .cpu_idx(mem_addr[8:2]),
      .cpu_wdata(mem_wdata), .cpu_rdata(cpu_rdata[q]),
      .src_addr(src_addr[q]), .pool_rdata(pool_rdata[q]), .src_data(src_data),
      .fifo_wr(fifo_wr[q]), .fifo_wdata(fifo_wdata[q]), .fifo_eof(fifo_eof[q]),
      .start_tx(start_tx[q]), .busy(busy[q]), .done(done[q]));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      mem_q     <= '0;
      mem_rdata <= '0;
    end else begin
      mem_q     <= mem_addr[15:14];
      mem_rdata <= cpu_rdata[mem_q];
    end

  tx_source_mux #(.N_ADC(N_ADC)) u_mux (
    .clk(clk), .rst_n(rst_n), .addr(src_addr[sel]), .pool_rdata(pool_rdata[sel_q]),
    .adc_filt(adc_filt), .adc_raw(adc_raw), .gps_sec(st_sec[sel]), .gps_frac(st_frac[sel]),
    .data(src_data), .decode_err(decode_err));

  // ------------------------------------------------------- queues and arbiter
  localparam int unsigned NQUEUE = NQ + 1;
  mac_word_t           q_word [NQUEUE];
  logic [NQUEUE-1:0]   q_empty, q_pop, frame_ready, go_take;
  logic [NQUEUE-1:0]   ovf, unf_up, unf, go_err;
  logic                tx_err_up, tx_err, lp_ok_conv;
  logic [1:0]          lp_ok_sync;

  for (genvar q = 0; q < int'(NQUEUE); q++) begin : g_fifo
    if (q < int'(NQ)) begin : g_data
      tx_queue_fifo #(.WIDE(1'b1), .DEPTH16(DEPTH16)) u_q (
        .wr_clk(clk), .wr_rst_n(rst_n), .wr_en(fifo_wr[q]), .wdata(fifo_wdata[q]),
        .wr_eof(fifo_eof[q]), .go(start_tx[q]), .overflow(ovf[q]), .go_err(go_err[q]),
        .rd_clk(clk_up), .rd_rst_n(rst_up_n), .rd_word(q_word[q]), .rd_empty(q_empty[q]),
        .rd_pop(q_pop[q]), .frame_ready(frame_ready[q]), .go_take(go_take[q]),
        .underflow(unf_up[q]));
    end else begin : g_lp
      tx_queue_fifo #(.WIDE(1'b0), .DEPTH16(DEPTH16)) u_q (
        .wr_clk(clk), .wr_rst_n(rst_n), .wr_en(lp_wr), .wdata(io_wdata),
        .wr_eof(1'b0), .go(1'b0), .overflow(ovf[q]), .go_err(go_err[q]),
        .rd_clk(clk_up), .rd_rst_n(rst_up_n), .rd_word(q_word[q]), .rd_empty(q_empty[q]),
        .rd_pop(q_pop[q]), .frame_ready(frame_ready[q]), .go_take(go_take[q]),
        .underflow(unf_up[q]));
    end
    pulse_sync u_unf (.src_clk(clk_up), .src_rst_n(rst_up_n), .src_pulse(unf_up[q]),
                      .dst_clk(clk), .dst_rst_n(rst_n), .dst_pulse(unf[q]));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) lp_ok_conv <= 1'b0;
    else        lp_ok_conv <= lp_window_valid(32'(cnt), lp_start, lp_stop, lp_mask);

  always_ff @(posedge clk_up or negedge rst_up_n)
    if (!rst_up_n) lp_ok_sync <= '0;
    else           lp_ok_sync <= {lp_ok_sync[0], lp_ok_conv};

  tx_arbiter #(.NQUEUE(NQUEUE)) u_arb (
    .clk(clk_up), .rst_n(rst_up_n), .lp_ok(lp_ok_sync[1]), .frame_ready(frame_ready),
    .q_empty(q_empty), .q_word(q_word), .q_pop(q_pop), .go_take(go_take),
    .mac_valid(mac_valid), .mac_data(mac_data), .mac_last(mac_last), .mac_ready(mac_ready),
    .mac_abort(mac_abort), .tx_err(tx_err_up));

  pulse_sync u_terr (.src_clk(clk_up), .src_rst_n(rst_up_n), .src_pulse(tx_err_up),
                     .dst_clk(clk), .dst_rst_n(rst_n), .dst_pulse(tx_err));

  // ------------------------------------------------------- status and counters
  logic [16:0] ev;
  logic        dec_ev;
  logic [6:0]  cnt_ev;

  assign dec_ev = decode_err && src_live;
  always_comb begin
    ev = '0;
    for (int q = 0; q < int'(NQUEUE); q++) begin
      ev[3*q]   = ovf[q];
      ev[3*q+1] = unf[q];
      ev[3*q+2] = go_err[q];
    end
    ev[15] = tx_err;
    ev[16] = dec_ev;
    for (int q = 0; q < int'(NQUEUE); q++) cnt_ev[q] = |ev[3*q +: 3];
    cnt_ev[5] = tx_err;
    cnt_ev[6] = dec_ev;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) status <= '0;
    else        status <= ((io_re && io_addr == 8'h3C) ? 32'h0 : status) | 32'(ev);

  edge_counter #(.N(7)) u_stats (.clk(clk), .rst_n(rst_n), .ev(cnt_ev), .count(stat_cnt));
endmodule
