// Start condition of an acquisition (transmit) or output (receive) cycle.
//
// The TRIG, MASK and ENDM configuration words carry 26-bit values in their bits
// 31..6; bit 0 of TRIG enables the queue. With t = cnt + ADVANCE:
//   go    = (t & MASK) == ((TRIG+1) & MASK)        start of an acquisition cycle
//   last  = (t & ENDM) == ((TRIG+1) & ENDM)        that cycle ends the processing cycle
//   first = (t & ENDM) == ((TRIG+1+MASK+1) & ENDM) that cycle opens the processing cycle
// The go and last equations are the ones of the uplink description; 'first' is
// derived here as the cycle one acquisition period after the last one, which gives
// the markings of the description's worked example. When ENDM equals MASK every
// cycle is both first and last. ADVANCE lets the receive side start its state
// machine a fixed number of clocks before the output cycle. All outputs are
// combinational and valid in the clock where go is high.
module cycle_trigger
  import uplink_pkg::*;
#(
  parameter int unsigned ADVANCE = 0
) (
  input  cnt_t        cnt,
  input  logic [31:0] trig,
  input  logic [31:0] mask,
  input  logic [31:0] endm,
  output logic        go,
  output logic        first,
  output logic        last
);
  cnt_t t, tp1, m, e, first_phase;

  always_comb begin
    t   = cnt + CNT_W'(ADVANCE);
    m   = mask[31:6];
    e   = endm[31:6];
    tp1 = trig[31:6] + 1'b1;
    first_phase = tp1 + m + 1'b1;
    go    = trig[0] && ((t & m) == (tp1 & m));
    last  = go && ((t & e) == (tp1 & e));
    first = go && ((t & e) == (first_phase & e));
  end
endmodule
