// Carries single-clock event pulses from one clock domain into another.
//
// Each source pulse flips a toggle flip-flop; the destination synchronises the toggle
// through two flip-flops and emits a one-clock pulse per observed change. Source
// pulses must be at least three destination clocks apart to be seen separately;
// error events of the uplink are far rarer than that.
module pulse_sync (
  input  logic src_clk,
  input  logic src_rst_n,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst_n,
  output logic dst_pulse
);
  logic tog;
  logic [2:0] q;

  always_ff @(posedge src_clk or negedge src_rst_n)
    if (!src_rst_n)     tog <= 1'b0;
    else if (src_pulse) tog <= !tog;

  always_ff @(posedge dst_clk or negedge dst_rst_n)
    if (!dst_rst_n) q <= '0;
    else            q <= {q[1:0], tog};

  assign dst_pulse = q[2] ^ q[1];
endmodule
