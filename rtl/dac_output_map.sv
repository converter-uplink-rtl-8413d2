// DAC output registers of one receive engine, addressed by the receive microcode.
//
// Address map of a write (dac_we, dac_addr, dac_data), for DACs 4g+1..4g+4 at
// addresses 0x10*g + sub:
//   sub 0-3    DAC 1..4 through the filter          sub 4-7  DAC 1..4 bypassing it
//   sub 8/9    DAC2 <- v, DAC1 <- -v (filtered)     sub A/B  DAC4 <- v, DAC3 <- -v
//   sub C-F    DAC4, DAC2 <- v and DAC3, DAC1 <- -v (filtered)
// The pair and quad addresses drive the DACs in anti-phase from one word. Addresses
// with bit 11 set never reach here; other addresses beyond the N_DAC converters pulse
// decode_err and change nothing. Outputs are registered and update one clock after
// the write; dac_upd marks which filtered/bypass outputs changed. The address map is
// the uplink description's; negation is two's complement (this design's choice).
module dac_output_map #(
  parameter int unsigned N_DAC = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        dac_we,
  input  logic [11:0] dac_addr,
  input  logic [31:0] dac_data,
  output logic [31:0] dac_filt [N_DAC],
  output logic [31:0] dac_byp  [N_DAC],
  output logic [N_DAC-1:0] filt_upd,
  output logic [N_DAC-1:0] byp_upd,
  output logic        decode_err
);
  localparam int unsigned NGRP = (N_DAC + 3) / 4;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      dac_filt   <= '{default: '0};
      dac_byp    <= '{default: '0};
      filt_upd   <= '0;
      byp_upd    <= '0;
      decode_err <= 1'b0;
    end else begin
      filt_upd   <= '0;
      byp_upd    <= '0;
      decode_err <= 1'b0;
      if (dac_we) begin
        if (dac_addr[11:4] >= 8'(NGRP)) begin
          decode_err <= 1'b1;
        end else begin
          automatic int unsigned b = 4 * int'(dac_addr[9:4]);
          automatic logic [31:0] v = dac_data;
          automatic logic [31:0] n = -dac_data;
          unique case (dac_addr[3:0]) inside
            [4'h0:4'h3]: begin
              dac_filt[b + int'(dac_addr[1:0])] <= v;  filt_upd[b + int'(dac_addr[1:0])] <= 1'b1;
            end
            [4'h4:4'h7]: begin
              dac_byp[b + int'(dac_addr[1:0])]  <= v;  byp_upd[b + int'(dac_addr[1:0])]  <= 1'b1;
            end
            [4'h8:4'h9]: begin
              dac_filt[b+1] <= v;  dac_filt[b] <= n;
              filt_upd[b +: 2] <= 2'b11;
            end
            [4'hA:4'hB]: begin
              dac_filt[b+3] <= v;  dac_filt[b+2] <= n;
              filt_upd[b+2 +: 2] <= 2'b11;
            end
            default: begin
              dac_filt[b+3] <= v;  dac_filt[b+1] <= v;
              dac_filt[b+2] <= n;  dac_filt[b]   <= n;
              filt_upd[b +: 4] <= 4'b1111;
            end
          endcase
        end
      end
    end
endmodule
