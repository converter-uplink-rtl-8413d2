// Bank of 32-bit statistics counters.
//
// Counter i adds one on every low-to-high transition of ev[i], so a status bit that
// stays high for several clocks is counted once. Counters wrap at 2^32 and are
// cleared only by reset. Both engines use one bank for the error counters of their
// IO space, clocked by the 2^26 Hz converter clock.
module edge_counter #(
  parameter int unsigned N = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N-1:0]     ev,
  output logic [31:0]      count [N]
);
  logic [N-1:0] ev_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ev_q <= '0;
      for (int i = 0; i < int'(N); i++) count[i] <= '0;
    end else begin
      ev_q <= ev;
      for (int i = 0; i < int'(N); i++)
        if (ev[i] && !ev_q[i]) count[i] <= count[i] + 1'b1;
    end
endmodule
