// Receive arbiter of one uplink port, in the uplink clock domain.
//
// It watches the 16-bit word stream from the MAC (rx_valid/rx_data/rx_last, one frame
// after another, destination address first) and decodes the header word by word:
//   words 0-5 addresses, 6 frame type, 7 protocol subtype, 8 protocol version,
//   9 data length in bytes, 10-11 GPS seconds, 12-13 GPS fraction, then data.
// A frame type other than 0x88B5 is dropped and counted as a frame type error. A
// subtype with all four high bits clear is a configuration or status frame and goes,
// whole and unchanged, to the low priority (LP) queue. A subtype with exactly one of
// the four high bits set is a data frame for queue A (bit 15), B, C or D (bit 12); a
// data frame is dropped with a frame type error if its version is not 0, with a
// frame length error if its length differs from the queue's LEN word or the frame
// ends inside the header, and as out of sync if its time stamp S does not name the
// first output cycle of a processing cycle or if it arrives outside that cycle's
// window. With a = arrival time (end of the stamp), T = processing cycle length
// (ENDM+1) and W = WINDOW_LEAD clocks, the window is  W < S - a <= T + W, i.e. it
// opens W clocks before one first output cycle and lasts one processing cycle, and
// the stamp names the first output cycle that follows. Accepted data words are
// paired into 32-bit words, most significant half first, and written to the queue's
// FIFO; words past the LEN bytes (Ethernet padding) are ignored. A data frame that
// ends early is a frame length error, and the missing words are filled with zeros so
// that the queue stays aligned to its microcode (words that arrive during the fill are
// lost).
//
// All frames pass through a DELAY_WORDS deep delay buffer; the head of a frame is only
// let out once its class is known, into the LP queue for LP frames and nowhere for all
// others. The decoding rules, the 14-word buffer and the window are those of the uplink
// description; the zero fill, the exact window bounds in clocks and the moment the
// arrival time is taken are this design's choices. The configuration inputs come
// from the converter clock domain and must be stable while a queue is enabled.
module rx_arbiter
  import uplink_pkg::*;
#(
  parameter int unsigned WINDOW_LEAD = 288,  // 4.29 us at 2^26 Hz
  parameter int unsigned DELAY_WORDS = 14
) (
  input  logic          clk,
  input  logic          rst_n,
  input  time_t         now,
  input  logic [NQ-1:0] q_en,
  input  logic [31:0]   trig [NQ],
  input  logic [31:0]   mask [NQ],
  input  logic [31:0]   endm [NQ],
  input  logic [31:0]   len  [NQ],
  input  logic          rx_valid,
  input  logic [15:0]   rx_data,
  input  logic          rx_last,
  output logic [NQ-1:0] hp_wr,
  output logic [31:0]   hp_wdata,
  output logic          lp_wr,
  output mac_word_t     lp_wdata,
  output logic [NQ-1:0] oos_err,
  output logic          ftype_err,
  output logic          flen_err
);
  typedef enum logic [2:0] {HDR, DATA, SKIP, PAD} state_e;
  typedef enum logic [1:0] {C_NONE, C_LP, C_DATA, C_DROP} class_e;

  state_e      state;
  class_e      cls;
  logic [4:0]  widx;          // header word index, saturates at 16
  logic [1:0]  q;             // data queue of the current frame
  logic [15:0] hi_half;
  logic [31:0] st_sec;
  logic [15:0] st_frac_hi;
  logic [13:0] words_left;    // 32-bit data words still expected
  logic        odd;           // a high half is waiting
  logic        decided;       // class of the current frame sent to the delay buffer

  // ---------------------------------------------------------------- time window
  logic [15:0] st_frac_lo;
  time_t       s_clk, d;
  cnt_t        e, m, fp, tlen;
  logic        in_window;

  always_comb begin
    s_clk = {st_sec, st_frac_hi, st_frac_lo[15:6]};
    d     = s_clk - now;
    e     = endm[q][31:6];
    m     = mask[q][31:6];
    fp    = trig[q][31:6] + 1'b1 + m + 1'b1;
    tlen  = e + 1'b1;
    in_window = (st_frac_lo[5:0] == '0) &&
                ((s_clk[CNT_W-1:0] & e) == (fp & e)) &&
                (d > TIME_W'(WINDOW_LEAD)) &&
                (d <= TIME_W'(WINDOW_LEAD) + TIME_W'(tlen)) &&
                (d[TIME_W-1] == 1'b0);
  end

  // ------------------------------------------------------------- header decode
  logic        w;             // a word is being received
  logic [3:0]  hib;
  logic        one_hot_hi;
  assign w = rx_valid;
  assign hib = rx_data[15:12];
  assign one_hot_hi = (hib != '0) && ((hib & (hib - 1'b1)) == '0);

  // class decision handed to the delay buffer
  logic   dec_push, dec_keep;

  logic        acc;
  logic [13:0] left;

  // a data word is taken; words still expected after it
  assign acc  = (state == DATA) && w && (widx != 5'd14 || in_window);
  assign left = words_left - 14'(acc && odd);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= HDR;  cls <= C_NONE;  widx <= '0;  q <= '0;
      hi_half <= '0; st_sec <= '0; st_frac_hi <= '0; st_frac_lo <= '0;
      words_left <= '0; odd <= 1'b0; decided <= 1'b0;
      hp_wr <= '0; hp_wdata <= '0; oos_err <= '0; ftype_err <= 1'b0; flen_err <= 1'b0;
      dec_push <= 1'b0; dec_keep <= 1'b0;
    end else begin
      hp_wr <= '0;  oos_err <= '0;  ftype_err <= 1'b0;  flen_err <= 1'b0;
      dec_push <= 1'b0;
      unique case (state)
        HDR: if (w) begin
          if (widx != 5'd16) widx <= widx + 1'b1;
          unique case (widx)
            5'd6: if (rx_data != ETHERTYPE) begin
                    cls <= C_DROP;  ftype_err <= 1'b1;
                  end
            5'd7: begin
              if (cls != C_DROP) begin
                if (hib == '0) cls <= C_LP;
                else if (one_hot_hi) begin
                  cls <= C_DATA;
                  q   <= hib[3] ? 2'd0 : hib[2] ? 2'd1 : hib[1] ? 2'd2 : 2'd3;
                end else begin
                  cls <= C_DROP;  ftype_err <= 1'b1;
                end
              end
              dec_push <= 1'b1;
              dec_keep <= (cls != C_DROP) && (hib == '0);
              decided  <= 1'b1;
            end
            5'd8: if (cls == C_DATA && rx_data != PROTO_VERSION) begin
                    cls <= C_DROP;  ftype_err <= 1'b1;
                  end
            5'd9: if (cls == C_DATA) begin
                    if (!q_en[q]) cls <= C_DROP;
                    else if (32'(rx_data) != len[q]) begin
                      cls <= C_DROP;  flen_err <= 1'b1;
                    end
                    words_left <= 14'((rx_data - 16'd8) >> 2);
                  end
            5'd10: st_sec[31:16]     <= rx_data;
            5'd11: st_sec[15:0]      <= rx_data;
            5'd12: st_frac_hi  <= rx_data;
            5'd13: st_frac_lo        <= rx_data;
            default: ;
          endcase
          if (rx_last) begin
            // frame ends here
            if (!decided) begin
              dec_push <= 1'b1;  dec_keep <= 1'b0;
            end
            if (cls == C_DATA) flen_err <= 1'b1;
            state <= HDR;  cls <= C_NONE;  widx <= '0;  decided <= 1'b0;
          end else if (widx == 5'd13) begin
            state <= SKIP;
            if (cls == C_DATA) begin
              odd <= 1'b0;
              state <= (words_left == '0) ? SKIP : DATA;
            end
          end
        end
        DATA: begin
          // the time check is made once, in the clock after the stamp arrived
          if (widx == 5'd14) begin
            widx <= 5'd15;
            if (!in_window) begin
              oos_err[q] <= 1'b1;
              if (w && rx_last) begin
                state <= HDR;  cls <= C_NONE;  widx <= '0;  decided <= 1'b0;
              end else begin
                state <= SKIP;
              end
            end
          end
          if (acc) begin
            if (odd) begin
              hp_wr[q] <= 1'b1;
              hp_wdata <= {hi_half, rx_data};
            end else begin
              hi_half <= rx_data;
            end
            odd        <= !odd;
            words_left <= left;
            if (left == '0) begin
              if (rx_last) begin
                state <= HDR;  cls <= C_NONE;  widx <= '0;  decided <= 1'b0;
              end else begin
                state <= SKIP;
              end
            end else if (rx_last) begin
              flen_err <= 1'b1;
              state    <= PAD;  cls <= C_NONE;  widx <= '0;  decided <= 1'b0;
            end
          end
        end
        PAD: begin
          if (words_left == '0) state <= HDR;
          else begin
            hp_wr[q]   <= 1'b1;
            hp_wdata   <= '0;
            words_left <= words_left - 1'b1;
          end
        end
        SKIP: if (w && rx_last) begin
          state <= HDR;  cls <= C_NONE;  widx <= '0;  decided <= 1'b0;
        end
        default: state <= HDR;
      endcase
    end

  // --------------------------------------------------------------- delay buffer
  localparam int unsigned PW = $clog2(DELAY_WORDS + 1);
  mac_word_t   dbuf [DELAY_WORDS];
  logic [PW-1:0] dw, dr;
  logic [PW:0]   dcount;
  logic [1:0]    cq_keep;      // class queue: at most two frames known at a time
  logic [1:0]    cq_count;
  logic          head_keep, pop;

  assign head_keep = cq_keep[0];
  assign pop       = (dcount != '0) && (cq_count != '0);

  always_ff @(posedge clk) begin
    if (w) dbuf[dw] <= mac_word_t'({rx_last, rx_data});
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      dw <= '0;  dr <= '0;  dcount <= '0;  cq_keep <= '0;  cq_count <= '0;
      lp_wr <= 1'b0;  lp_wdata <= '0;
    end else begin
      lp_wr <= 1'b0;
      if (w)   dw <= (dw == PW'(DELAY_WORDS - 1)) ? '0 : dw + 1'b1;
      if (pop) dr <= (dr == PW'(DELAY_WORDS - 1)) ? '0 : dr + 1'b1;
      dcount <= dcount + (PW+1)'(w) - (PW+1)'(pop);
      if (pop) begin
        lp_wr    <= head_keep;
        lp_wdata <= dbuf[dr];
      end
      // class queue: pop on the end-of-frame word, push on a decision
      begin
        logic [1:0] k;
        logic [1:0] c;
        k = cq_keep;  c = cq_count;
        if (pop && dbuf[dr].eof) begin
          k = {1'b0, k[1]};  c = c - 1'b1;
        end
        if (dec_push) begin
          k[c[0]] = dec_keep;  c = c + 1'b1;
        end
        cq_keep <= k;  cq_count <= c;
      end
    end

  a_delay_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                        !(w && dcount == (PW+1)'(DELAY_WORDS) && !pop));
endmodule
