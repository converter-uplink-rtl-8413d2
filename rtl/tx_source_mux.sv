// Data source of the transmit microcode: turns a 12-bit microcode address into the
// 32-bit word that a later instruction writes into the queue FIFO.
//
// Address map (bit 11 clear = converters, bit 11 set = everything else):
//   0x000-0x003  ADC 1..4 after the decimation filter
//   0x004-0x007  ADC 1..4 bypassing the filter
//   0x008/0x009  ADC2 - ADC1 (filtered)      0x00A/0x00B  ADC4 - ADC3 (filtered)
//   0x00C-0x00F  ADC4 - ADC3 + ADC2 - ADC1 (filtered)
//   0x010-0x03F  the same for ADCs 5-8, 9-12 and 13-16
//   0x800-0x87F  data pool of the running state machine
//   0xA00 / 0xB00  GPS time stamp, seconds / fraction    0xF00  all zeros
// Any other address reads zero and pulses decode_err. Differences are two's
// complement and wrap at 32 bits.
//
// Timing: the address presented in clock t gives its data in clock t+2 (the two-clock
// pipeline delay of the address field). The pool is a synchronous RAM inside the state
// machine, so pool_rdata must arrive in clock t+1. The address map and the delay are
// the uplink description's; the width of the difference channels and the error on
// unmapped addresses are this design's choice.
module tx_source_mux #(
  parameter int unsigned N_ADC = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [11:0] addr,
  input  logic [31:0] pool_rdata,
  input  logic [31:0] adc_filt [N_ADC],
  input  logic [31:0] adc_raw  [N_ADC],
  input  logic [31:0] gps_sec,
  input  logic [31:0] gps_frac,
  output logic [31:0] data,
  output logic        decode_err
);
  typedef enum logic [1:0] {SRC_ZERO, SRC_ADC, SRC_POOL, SRC_GPS} src_e;

  localparam int unsigned NGRP = (N_ADC + 3) / 4;

  src_e        sel, sel_q;
  logic [31:0] conv, conv_q, gps_q_in, gps_q;
  logic        bad;

  function automatic logic [31:0] adc_f(input logic [31:0] v [N_ADC], input int unsigned i);
    return (i < N_ADC) ? v[i] : 32'h0;
  endfunction

  always_comb begin
    int unsigned base;
    logic [3:0]  sub;
    sel      = SRC_ZERO;
    conv     = '0;
    gps_q_in = '0;
    bad      = 1'b0;
    base     = 4 * int'(addr[9:4]);
    sub      = addr[3:0];
    if (!addr[11]) begin
      if (addr[10:4] < 7'(NGRP)) begin
        sel = SRC_ADC;
        unique case (sub) inside
          [4'h0:4'h3]: conv = adc_f(adc_filt, base + int'(sub[1:0]));
          [4'h4:4'h7]: conv = adc_f(adc_raw,  base + int'(sub[1:0]));
          [4'h8:4'h9]: conv = adc_f(adc_filt, base + 1) - adc_f(adc_filt, base);
          [4'hA:4'hB]: conv = adc_f(adc_filt, base + 3) - adc_f(adc_filt, base + 2);
          default:     conv = adc_f(adc_filt, base + 3) - adc_f(adc_filt, base + 2)
                            + adc_f(adc_filt, base + 1) - adc_f(adc_filt, base);
        endcase
      end else begin
        bad = 1'b1;
      end
    end else if (addr[10:7] == 4'b0000) begin
      sel = SRC_POOL;
    end else if (addr == 12'hA00) begin
      sel = SRC_GPS;  gps_q_in = gps_sec;
    end else if (addr == 12'hB00) begin
      sel = SRC_GPS;  gps_q_in = gps_frac;
    end else if (addr != 12'hF00) begin
      bad = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sel_q      <= SRC_ZERO;
      conv_q     <= '0;
      gps_q      <= '0;
      data       <= '0;
      decode_err <= 1'b0;
    end else begin
      sel_q      <= sel;
      conv_q     <= conv;
      gps_q      <= gps_q_in;
      decode_err <= bad;
      unique case (sel_q)
        SRC_ADC:  data <= conv_q;
        SRC_POOL: data <= pool_rdata;
        SRC_GPS:  data <= gps_q;
        default:  data <= '0;
      endcase
    end
endmodule
