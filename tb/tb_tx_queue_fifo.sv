// Self-checking test of tx_queue_fifo with unrelated write (converter) and read
// (uplink) clocks. A 32-bit queue gets frames of random words; the read side must
// see each word as two 16-bit halves, most significant first, with the end-of-frame
// bit only on the last half, and one stacked go per frame. Then: 17 gos without
// reading (the 17th is an error), writing past the capacity (overflow), popping an
// empty queue (underflow), and a 17-bit low priority queue whose end-of-frame entry
// is its own go.
module tb_tx_queue_fifo;
  import uplink_pkg::*;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  // wide queue
  logic        wr_en = 0, wr_eof = 0, go = 0, overflow, go_err;
  logic [31:0] wdata = 0;
  mac_word_t   rd_word;
  logic        rd_empty, rd_pop = 0, frame_ready, go_take = 0, underflow;
  // narrow (LP) queue
  logic        lwr_en = 0, loverflow, lgo_err;
  logic [31:0] lwdata = 0;
  mac_word_t   lrd_word;
  logic        lrd_empty, lrd_pop = 0, lframe_ready, lgo_take = 0, lunderflow;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_goerr = 0, n_unf = 0;

  tx_queue_fifo #(.WIDE(1'b1), .DEPTH16(64)) dut (
    .wr_clk(wclk), .wr_rst_n(wrst_n), .wr_en(wr_en), .wdata(wdata), .wr_eof(wr_eof), .go(go),
    .overflow(overflow), .go_err(go_err), .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_word(rd_word),
    .rd_empty(rd_empty), .rd_pop(rd_pop), .frame_ready(frame_ready), .go_take(go_take),
    .underflow(underflow));
  tx_queue_fifo #(.WIDE(1'b0), .DEPTH16(64)) dut_lp (
    .wr_clk(wclk), .wr_rst_n(wrst_n), .wr_en(lwr_en), .wdata(lwdata), .wr_eof(1'b0), .go(1'b0),
    .overflow(loverflow), .go_err(lgo_err), .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_word(lrd_word),
    .rd_empty(lrd_empty), .rd_pop(lrd_pop), .frame_ready(lframe_ready), .go_take(lgo_take),
    .underflow(lunderflow));

  always #7.45 wclk = !wclk;   // ~67.1 MHz
  always #8    rclk = !rclk;   // 62.5 MHz

  // outputs are undefined until the first clock of reset: count only out of reset
  always @(posedge wclk) if (wrst_n) begin n_ovf += overflow; n_goerr += go_err; end
  always @(posedge rclk) if (rrst_n) n_unf += underflow;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr_word(input logic [31:0] d, input logic eof, input logic g);
    @(negedge wclk);
    wr_en = 1;  wdata = d;  wr_eof = eof;  go = g;
    @(negedge wclk);
    wr_en = 0;  wr_eof = 0;  go = 0;
  endtask

  task automatic rd_half(output mac_word_t w);
    @(negedge rclk);
    while (rd_empty) @(negedge rclk);
    w = rd_word;
    rd_pop = 1;
    @(negedge rclk);
    rd_pop = 0;
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] frame [$];
    mac_word_t w;
    repeat (3) @(posedge wclk);
    wrst_n = 1;  rrst_n = 1;
    // three frames of 1..5 words
    for (int f = 0; f < 3; f++) begin
      int n;
      n = 1 + f * 2;
      frame = {};
      for (int i = 0; i < n; i++) begin
        frame.push_back($urandom);
        wr_word(frame[i], i == n - 1, i == 0);
      end
      repeat (6) @(posedge rclk);
      check(frame_ready, "go reached the read side");
      @(negedge rclk) go_take = 1;
      @(negedge rclk) go_take = 0;
      for (int i = 0; i < n; i++) begin
        rd_half(w);
        check(w.data == frame[i][31:16] && !w.eof, "high half first, no end mark");
        rd_half(w);
        check(w.data == frame[i][15:0] && w.eof == (i == n - 1), "low half, end mark on last");
      end
      repeat (6) @(posedge rclk);
      check(!frame_ready && rd_empty, "queue empty after the frame");
    end
    // 17 gos stacked: the 17th is an error
    for (int i = 0; i < 17; i++) wr_word(32'(i), 1'b1, 1'b1);
    repeat (4) @(posedge wclk);
    check(n_goerr == 1, "seventeenth stacked go flagged");
    // drain: 16 frames of one word each
    for (int f = 0; f < 16; f++) begin
      @(negedge rclk);
      while (!frame_ready) @(negedge rclk);
      go_take = 1;
      @(negedge rclk) go_take = 0;
      rd_half(w);
      rd_half(w);
      check(w.data == 16'(f) && w.eof, "stacked frame order");
    end
    // the 17th word is still in the queue without a go
    repeat (6) @(posedge rclk);
    check(!frame_ready && !rd_empty, "word of the rejected go is still queued");
    rd_half(w);  rd_half(w);
    // overflow: capacity 32 words
    for (int i = 0; i < 33; i++) wr_word(32'(i), 1'b0, 1'b0);
    repeat (4) @(posedge wclk);
    check(n_ovf == 1, "33rd word overflows a 32-word queue");
    for (int i = 0; i < 64; i++) rd_half(w);
    repeat (6) @(posedge rclk);
    // underflow
    @(negedge rclk) rd_pop = 1;
    @(negedge rclk) rd_pop = 0;
    repeat (2) @(posedge rclk);
    check(n_unf == 1, "pop of an empty queue flags underflow");
    // LP queue: entries of 17 bits, end bit is the go
    for (int i = 0; i < 4; i++) begin
      @(negedge wclk);
      lwr_en = 1;  lwdata = {15'h0, i == 3, 16'hA000 + 16'(i)};
    end
    @(negedge wclk) lwr_en = 0;
    repeat (6) @(posedge rclk);
    check(lframe_ready, "LP end-of-frame entry gives a go");
    @(negedge rclk) lgo_take = 1;
    @(negedge rclk) lgo_take = 0;
    for (int i = 0; i < 4; i++) begin
      @(negedge rclk);
      check(!lrd_empty && lrd_word.data == 16'hA000 + 16'(i) && lrd_word.eof == (i == 3),
            "LP entry order and end mark");
      lrd_pop = 1;
      @(negedge rclk) lrd_pop = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
