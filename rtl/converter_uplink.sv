// Converter uplink: the Ethernet interface of a converter (ADC/DAC) unit.
//
// N_PORTS independent uplink ports, each a transmit engine (converter samples out as
// Ethernet frames, driven by per-queue microcode) and a receive engine (Ethernet frames
// in, copied to DAC outputs by per-queue microcode). All ports share one time base,
// which counts the 2^26 Hz master clock aligned to the 1PPS pulse and gives every queue
// its acquisition or output cycle, and they share the ADC inputs. Each port's DAC
// outputs are brought out separately. The MAC of each port is outside this design: the
// port's 16-bit valid/ready streams and its own uplink clock (62.5 MHz) are ports of
// this module.
//
// Management processor access, converter clock, one request per clock:
//   IO space (io_*, 24-bit byte address, read data one clock after io_re)
//     0x100008 GPS seconds, 0x10000C GPS fraction (read only)
//     0x200000 + 0x100000*p  transmit engine p     0x280000 + 0x100000*p  receive engine p
//   memory space (mem_*, 32-bit byte address, read data two clocks after the request)
//     0x80000000 + 0x10000000*p  transmit microcode / data pools of port p
//     0x88000000 + 0x10000000*p  receive microcode of port p
// Memory reads are requested with mem_re. The offsets are those of the uplink
// description for ports 0 and 1. Other blocks of its IO map (EMAC host interface, ADC
// and DAC configuration, board identification) belong to parts outside this design.
module converter_uplink
  import uplink_pkg::*;
#(
  parameter int unsigned N_PORTS = 2,
  parameter int unsigned N_ADC   = 16,
  parameter int unsigned N_DAC   = 16
) (
  input  logic        clk,          // 2^26 Hz master clock
  input  logic        rst_n,
  input  logic        pps,
  input  logic        sec_load,
  input  logic [31:0] sec_value,
  input  logic [31:0] adc_filt [N_ADC],
  input  logic [31:0] adc_raw  [N_ADC],
  // management processor
  input  logic        io_we,
  input  logic        io_re,
  input  logic [23:0] io_addr,
  input  logic [31:0] io_wdata,
  output logic [31:0] io_rdata,
  input  logic        mem_we,
  input  logic        mem_re,
  input  logic [31:0] mem_addr,
  input  logic [31:0] mem_wdata,
  output logic [31:0] mem_rdata,
  // per port: uplink clock and MAC streams
  input  logic [N_PORTS-1:0] clk_up,
  input  logic [N_PORTS-1:0] rst_up_n,
  output logic [N_PORTS-1:0] tx_valid,
  output logic [15:0]        tx_data [N_PORTS],
  output logic [N_PORTS-1:0] tx_last,
  input  logic [N_PORTS-1:0] tx_ready,
  output logic [N_PORTS-1:0] tx_abort,
  input  logic [N_PORTS-1:0] rx_valid,
  input  logic [15:0]        rx_data [N_PORTS],
  input  logic [N_PORTS-1:0] rx_last,
  // per port: DAC outputs
  output logic [31:0] dac_filt [N_PORTS][N_DAC],
  output logic [31:0] dac_byp  [N_PORTS][N_DAC],
  output logic [N_DAC-1:0] dac_filt_upd [N_PORTS],
  output logic [N_DAC-1:0] dac_byp_upd  [N_PORTS],
  // observation: acquisition / output cycle starts per port and queue
  output logic [NQ-1:0] acq_go [N_PORTS],
  output logic [NQ-1:0] out_go [N_PORTS],
  output logic          sample_stb
);
  cnt_t        cnt;
  logic [31:0] sec;
  time_t       now;

  timing_base u_time (.clk(clk), .rst_n(rst_n), .pps(pps), .sec_load(sec_load),
                      .sec_value(sec_value), .cnt(cnt), .sec(sec), .now(now),
                      .sample_stb(sample_stb));

  // ---------------------------------------------------------------- address decode
  // io_addr[23:19]: 0x04+2p = transmit p, 0x05+2p = receive p (0x200000 + 0x80000*k)
  logic [N_PORTS-1:0] tx_io, rx_io, tx_mem, rx_mem;
  logic [31:0] tx_io_rdata [N_PORTS];
  logic [31:0] rx_io_rdata [N_PORTS];
  logic [31:0] tx_mem_rdata[N_PORTS];
  logic [31:0] rx_mem_rdata[N_PORTS];
  logic [N_PORTS-1:0] tx_io_q, rx_io_q, tx_mem_q, rx_mem_q, tx_mem_qq, rx_mem_qq;
  logic [1:0]  tim_q;
  logic [31:0] tim_rdata;

  always_comb
    for (int p = 0; p < int'(N_PORTS); p++) begin
      tx_io[p]  = io_addr[23:19] == 5'(4 + 2*p);
      rx_io[p]  = io_addr[23:19] == 5'(5 + 2*p);
      tx_mem[p] = mem_addr[31:27] == 5'(16 + 2*p);
      rx_mem[p] = mem_addr[31:27] == 5'(17 + 2*p);
    end

  for (genvar p = 0; p < int'(N_PORTS); p++) begin : g_port
    tx_engine #(.N_ADC(N_ADC)) u_tx (
      .clk(clk), .rst_n(rst_n), .cnt(cnt), .sec(sec), .adc_filt(adc_filt), .adc_raw(adc_raw),
      .io_we(io_we && tx_io[p]), .io_re(io_re && tx_io[p]), .io_addr(io_addr[7:0]),
      .io_wdata(io_wdata), .io_rdata(tx_io_rdata[p]),
      .mem_we(mem_we && tx_mem[p]), .mem_addr(mem_addr[15:0]), .mem_wdata(mem_wdata),
      .mem_rdata(tx_mem_rdata[p]),
      .clk_up(clk_up[p]), .rst_up_n(rst_up_n[p]),
      .mac_valid(tx_valid[p]), .mac_data(tx_data[p]), .mac_last(tx_last[p]),
      .mac_ready(tx_ready[p]), .mac_abort(tx_abort[p]), .acq_go(acq_go[p]));

    rx_engine #(.N_DAC(N_DAC)) u_rx (
      .clk(clk), .rst_n(rst_n), .cnt(cnt), .now(now),
      .io_we(io_we && rx_io[p]), .io_re(io_re && rx_io[p]), .io_addr(io_addr[7:0]),
      .io_wdata(io_wdata), .io_rdata(rx_io_rdata[p]),
      .mem_we(mem_we && rx_mem[p]), .mem_addr(mem_addr[15:0]), .mem_wdata(mem_wdata),
      .mem_rdata(rx_mem_rdata[p]),
      .clk_up(clk_up[p]), .rst_up_n(rst_up_n[p]),
      .rx_valid(rx_valid[p]), .rx_data(rx_data[p]), .rx_last(rx_last[p]),
      .dac_filt(dac_filt[p]), .dac_byp(dac_byp[p]),
      .filt_upd(dac_filt_upd[p]), .byp_upd(dac_byp_upd[p]), .out_go(out_go[p]));
  end

  // ---------------------------------------------------------------- read data
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      tx_io_q <= '0;  rx_io_q <= '0;  tx_mem_q <= '0;  rx_mem_q <= '0;
      tx_mem_qq <= '0;  rx_mem_qq <= '0;  tim_q <= '0;  tim_rdata <= '0;
    end else begin
      tx_io_q   <= io_re ? tx_io : '0;
      rx_io_q   <= io_re ? rx_io : '0;
      tx_mem_q  <= mem_re ? tx_mem : '0;
      rx_mem_q  <= mem_re ? rx_mem : '0;
      tx_mem_qq <= tx_mem_q;
      rx_mem_qq <= rx_mem_q;
      tim_q     <= '0;
      if (io_re && io_addr == 24'h100008) begin
        tim_q <= 2'b01;  tim_rdata <= sec;
      end
      if (io_re && io_addr == 24'h10000C) begin
        tim_q <= 2'b10;  tim_rdata <= {cnt, 6'b0};
      end
    end

  always_comb begin
    io_rdata  = (tim_q != '0) ? tim_rdata : '0;
    mem_rdata = '0;
    for (int p = 0; p < int'(N_PORTS); p++) begin
      if (tx_io_q[p])   io_rdata  = tx_io_rdata[p];
      if (rx_io_q[p])   io_rdata  = rx_io_rdata[p];
      if (tx_mem_qq[p]) mem_rdata = tx_mem_rdata[p];
      if (rx_mem_qq[p]) mem_rdata = rx_mem_rdata[p];
    end
  end
endmodule
