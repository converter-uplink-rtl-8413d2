// Shared types and constants of the converter uplink.
//
// Time is kept as a 58-bit clock count {seconds[31:0], cnt[25:0]}: cnt counts the
// 2^26 Hz master clock from 0 to 2^26-1 between two 1PPS pulses, so the pair is a
// plain binary counter. A GPS time stamp in frames is {seconds, fraction in 2^-32 s};
// its fraction is cnt shifted left by 6 bits.
//
// Constants below follow the uplink description: 4 data queues (A to D) plus one
// low priority queue, 128-entry microcode and data pools, 12-bit microcode
// addresses, the experimental ethertype 0x88B5 and protocol version 0.
package uplink_pkg;

  localparam int unsigned CNT_W    = 26;   // master clock counter, 2^26 Hz
  localparam int unsigned SEC_W    = 32;   // GPS seconds
  localparam int unsigned TIME_W   = SEC_W + CNT_W;
  localparam int unsigned NQ       = 4;    // data queues A..D
  localparam int unsigned UC_DEPTH = 128;  // microcode / data pool entries
  localparam int unsigned UC_AW    = 7;
  localparam int unsigned SAMPLE_CLKS = 128; // 2^26 / 2^19 master clocks per sample

  localparam logic [15:0] ETHERTYPE     = 16'h88B5;
  localparam logic [15:0] PROTO_VERSION = 16'h0000;

  typedef logic [CNT_W-1:0]  cnt_t;
  typedef logic [TIME_W-1:0] time_t;

  // Transmit microcode word (32 bits)
  typedef struct packed {
    logic        end_prog;    // 31
    logic [12:0] unused30_18; // 30..18
    logic        start_tx;    // 17
    logic        fifo_wr;     // 16
    logic        ign_last;    // 15
    logic        ign_mid;     // 14
    logic        ign_first;   // 13
    logic        unused12;    // 12
    logic [11:0] addr;        // 11..0
  } tx_ucode_t;

  // Receive microcode word (32 bits)
  typedef struct packed {
    logic        end_prog;    // 31
    logic [13:0] unused30_17; // 30..17
    logic        dac_wr;      // 16
    logic        ign_last;    // 15
    logic        ign_mid;     // 14
    logic        ign_first;   // 13
    logic        unused12;    // 12
    logic [11:0] addr;        // 11..0
  } rx_ucode_t;

  // One 16-bit word on the EMAC side with its end-of-frame mark (the 17th bit).
  typedef struct packed {
    logic        eof;
    logic [15:0] data;
  } mac_word_t;

  // An instruction is ignored on a cycle whose first/last flags it names.
  function automatic logic ucode_ignored(input logic ign_last, input logic ign_mid,
                                         input logic ign_first, input logic first,
                                         input logic last);
    return (ign_last && last) || (ign_first && first) || (ign_mid && !first && !last);
  endfunction

  // Low priority transmit window, equation (1): masked counter strictly after
  // LPStart and not after LPStop.
  function automatic logic lp_window_valid(input logic [31:0] cnt, input logic [31:0] lp_start,
                                           input logic [31:0] lp_stop, input logic [31:0] lp_mask);
    return ((cnt & lp_mask) > (lp_start & lp_mask)) && ((cnt & lp_mask) <= (lp_stop & lp_mask));
  endfunction

endpackage
