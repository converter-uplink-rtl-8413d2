// Transmit arbiter: picks the next frame among the five transmit queues and streams
// it, 16 bits per clock, to the Ethernet MAC. Runs in the uplink clock domain.
//
// Queue 0..3 are the data queues A to D, queue 4 is the low priority (LP) queue.
// When idle the arbiter starts the lowest-numbered queue that has a stacked 'go'
// (A before B, C, D and LP); the LP queue is considered only while lp_ok is high,
// i.e. inside the low priority window of equation (1). Starting a frame consumes one
// go; the frame is then sent word by word until the word carrying the end-of-frame
// bit has been accepted, and only then is the next frame chosen. Frames are never
// interleaved.
//
// MAC side: a valid/ready stream (mac_valid, mac_data, mac_last, mac_ready). If the
// active queue runs empty in the middle of a frame the MAC cannot be held, so the
// arbiter pops the empty queue (the queue then reports underflow), raises mac_abort
// for one clock, pulses tx_err (the 'arbiter transmit error' status bit) and throws
// away what is left of that frame as it arrives, up to its end-of-frame mark.
// The priority order and the LP window follow the uplink description; the stream
// handshake and the abort behaviour are this design's choice.
module tx_arbiter
  import uplink_pkg::*;
#(
  parameter int unsigned NQUEUE = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               lp_ok,
  input  logic [NQUEUE-1:0]  frame_ready,
  input  logic [NQUEUE-1:0]  q_empty,
  input  mac_word_t          q_word [NQUEUE],
  output logic [NQUEUE-1:0]  q_pop,
  output logic [NQUEUE-1:0]  go_take,
  output logic               mac_valid,
  output logic [15:0]        mac_data,
  output logic               mac_last,
  input  logic               mac_ready,
  output logic               mac_abort,
  output logic               tx_err
);
  typedef enum logic [1:0] {IDLE, SEND, DROP} state_e;
  state_e state;
  logic [$clog2(NQUEUE)-1:0] cur;
  logic [NQUEUE-1:0] eligible;
  logic              pick_any;
  logic [$clog2(NQUEUE)-1:0] pick;
  mac_word_t         head;
  logic              head_empty;

  always_comb begin
    eligible = frame_ready;
    eligible[NQUEUE-1] = frame_ready[NQUEUE-1] && lp_ok;
    pick_any = |eligible;
    pick     = '0;
    for (int i = int'(NQUEUE) - 1; i >= 0; i--)
      if (eligible[i]) pick = ($clog2(NQUEUE))'(i);
  end

  assign head       = q_word[cur];
  assign head_empty = q_empty[cur];

  always_comb begin
    q_pop     = '0;
    go_take   = '0;
    mac_valid = 1'b0;
    mac_data  = head.data;
    mac_last  = head.eof;
    unique case (state)
      IDLE: if (pick_any) go_take[pick] = 1'b1;
      SEND: begin
        mac_valid = !head_empty;
        if (head_empty || mac_ready) q_pop[cur] = 1'b1;
      end
      DROP: if (!head_empty) q_pop[cur] = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state     <= IDLE;
      cur       <= '0;
      mac_abort <= 1'b0;
      tx_err    <= 1'b0;
    end else begin
      mac_abort <= 1'b0;
      tx_err    <= 1'b0;
      unique case (state)
        IDLE: if (pick_any) begin
          cur   <= pick;
          state <= SEND;
        end
        SEND: begin
          if (head_empty) begin
            mac_abort <= 1'b1;
            tx_err    <= 1'b1;
            state     <= DROP;
          end else if (mac_ready && head.eof) begin
            state <= IDLE;
          end
        end
        DROP: if (!head_empty && head.eof) state <= IDLE;
        default: state <= IDLE;
      endcase
    end

  // A frame is only ever taken from a queue that has a go waiting.
  a_take_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                 (go_take & ~frame_ready) == '0);
endmodule
