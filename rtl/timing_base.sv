// Time base of the converter unit, in the 2^26 Hz master clock domain.
//
// cnt counts master clocks from 0 to 2^26-1 and is forced back to 0 by the rising
// edge of the 1PPS pulse, so it is the position within the current GPS second. The
// seconds counter advances once per second: on the 1PPS edge when cnt is in the
// second half of its range, or on a natural wrap of cnt. A 1PPS edge that arrives
// just after a wrap therefore does not count the second twice. The seconds can be
// loaded (sec_load) from the timing system. sample_stb marks the start of each
// sampling period, every 128 clocks (2^19 Hz), aligned to the 1PPS.
//
// The 1PPS input passes through two synchronising flip-flops, so cnt is 0 three
// clocks after the pulse rises; this latency is this design's choice. The counter
// range, the sampling rate and the 1PPS alignment are those of the uplink
// description.
module timing_base
  import uplink_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pps,
  input  logic        sec_load,
  input  logic [31:0] sec_value,
  output cnt_t        cnt,
  output logic [31:0] sec,
  output time_t       now,
  output logic        sample_stb
);
  logic [2:0] pps_q;
  logic       pps_rise;

  assign pps_rise   = pps_q[1] && !pps_q[2];
  assign now        = {sec, cnt};
  assign sample_stb = (cnt[6:0] == '0);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pps_q <= '0;
      cnt   <= '0;
      sec   <= '0;
    end else begin
      pps_q <= {pps_q[1:0], pps};
      if (pps_rise) begin
        cnt <= '0;
        if (cnt[CNT_W-1]) sec <= sec + 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
        if (&cnt) sec <= sec + 1'b1;
      end
      if (sec_load) sec <= sec_value;
    end
endmodule
