// Self-checking test of rx_arbiter. Frames are built here word by word (header,
// GPS stamp, data, Ethernet padding) and sent back to back with a free-running time
// counter. Queue A expects 4 data words per 1024-clock processing cycle (MASK = ENDM =
// 0x3FF, first output cycle at multiples of 1024 clocks). Checks: an on-time data frame
// (words paired most significant half first, padding ignored), a configuration frame
// passed whole to the LP queue through the delay buffer, a wrong frame type, a wrong
// version, a wrong length, stamps one cycle too far ahead, in the past, off the first
// output cycle and less than the 288-clock lead ahead (out of sync), a frame for
// a disabled queue, a data frame cut short (length error and zero fill) and back-to-
// back frames of mixed classes.
module tb_rx_arbiter;
  import uplink_pkg::*;
  logic clk = 0, rst_n = 0;
  time_t now = '0;
  logic [3:0]  q_en = 4'b0001;
  logic [31:0] trig [4];
  logic [31:0] mask [4];
  logic [31:0] endm [4];
  logic [31:0] len  [4];
  logic        rx_valid = 0, rx_last = 0;
  logic [15:0] rx_data = 0;
  logic [3:0]  hp_wr, oos_err;
  logic [31:0] hp_wdata;
  logic        lp_wr, ftype_err, flen_err;
  mac_word_t   lp_wdata;
  int checks = 0, failures = 0;
  int n_oos = 0, n_ft = 0, n_fl = 0;
  logic [31:0] hp [$];
  mac_word_t   lp [$];

  rx_arbiter dut (.*);
  always #8 clk = !clk;
  always @(posedge clk) begin
    now <= now + 1'b1;
    if (rst_n) begin   // outputs are undefined until the first clock of reset
      if (hp_wr[0]) hp.push_back(hp_wdata);
      if (lp_wr) lp.push_back(lp_wdata);
      n_oos += oos_err[0];  n_ft += ftype_err;  n_fl += flen_err;
    end
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // stamp of the first output cycle that an arrival in about 'lead' clocks may carry
  function automatic time_t next_first(input time_t a);
    time_t s;
    s = ((a + 288) & ~time_t'(1023)) + 1024;
    return s;
  endfunction

  task automatic send(input logic [15:0] w [$]);
    foreach (w[i]) begin
      @(negedge clk);
      rx_valid = 1;  rx_data = w[i];  rx_last = (i == w.size() - 1);
    end
    @(negedge clk);
    rx_valid = 0;  rx_last = 0;
  endtask

  function automatic void build(ref logic [15:0] w [$], input logic [15:0] ftype,
                                input logic [15:0] sub, input logic [15:0] ver,
                                input logic [15:0] length, input time_t stamp,
                                input logic [31:0] data [$], input int cut);
    logic [31:0] frac;
    w = '{16'h0013, 16'h2004, 16'h4ED1, 16'hDEAD, 16'hFACE, 16'h0001, ftype, sub, ver, length};
    frac = {stamp[CNT_W-1:0], 6'b0};
    w.push_back(stamp[TIME_W-1:CNT_W+16]);  w.push_back(stamp[CNT_W+15:CNT_W]);
    w.push_back(frac[31:16]);  w.push_back(frac[15:0]);
    foreach (data[i]) begin w.push_back(data[i][31:16]); w.push_back(data[i][15:0]); end
    while (w.size() < 30) w.push_back(16'h0);
    if (cut > 0) w = w[0:cut-1];
  endfunction

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] w [$];
    logic [31:0] d [$];
    time_t s;
    for (int q = 0; q < 4; q++) begin
      trig[q] = {26'h3FF, 6'h3F};  mask[q] = {26'h3FF, 6'h3F};
      endm[q] = {26'h3FF, 6'h3F};  len[q] = 32'd24;
    end
    trig[0][0] = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    now = {32'd5, 26'd100};
    d = '{32'h11112222, 32'h33334444, 32'h55556666, 32'h77778888};
    // 1. on-time data frame
    s = next_first(now + 16);
    build(w, 16'h88B5, 16'h8000, 16'h0000, 16'd24, s, d, 0);
    send(w);
    repeat (4) @(posedge clk);
    check(hp.size() == 4, $sformatf("four data words to queue A (got %0d)", hp.size()));
    foreach (d[i]) if (i < hp.size()) check(hp[i] == d[i], "data word order and halves");
    check(lp.size() == 0 && n_oos == 0 && n_ft == 0 && n_fl == 0, "no errors, nothing to LP");
    // 2. configuration frame to LP
    build(w, 16'h88B5, 16'h00C0, 16'h0000, 16'd8, '0, '{32'h0600_0004, 32'h0}, 0);
    send(w);
    repeat (20) @(posedge clk);
    check(lp.size() == w.size(), $sformatf("whole LP frame delivered (%0d of %0d)", lp.size(), w.size()));
    foreach (lp[i]) if (i < w.size())
      check(lp[i].data == w[i] && lp[i].eof == (i == w.size() - 1), "LP word and end mark");
    lp = {};  hp = {};
    // 3. wrong frame type
    build(w, 16'h0800, 16'h8000, 16'h0000, 16'd24, next_first(now + 16), d, 0);
    send(w);
    // 4. wrong version
    build(w, 16'h88B5, 16'h8000, 16'h0001, 16'd24, next_first(now + 16), d, 0);
    send(w);
    // 5. two high subtype bits
    build(w, 16'h88B5, 16'hC000, 16'h0000, 16'd24, next_first(now + 16), d, 0);
    send(w);
    repeat (20) @(posedge clk);
    check(n_ft == 3 && hp.size() == 0 && lp.size() == 0, "frame type errors dropped");
    // 6. wrong length
    build(w, 16'h88B5, 16'h8000, 16'h0000, 16'd28, next_first(now + 16), d, 0);
    send(w);
    repeat (4) @(posedge clk);
    check(n_fl == 1 && hp.size() == 0, "length error dropped");
    // 7. stamp one processing cycle too far ahead, and one in the past
    build(w, 16'h88B5, 16'h8000, 16'h0000, 16'd24, next_first(now + 16) + 1024, d, 0);
    send(w);
    build(w, 16'h88B5, 16'h8000, 16'h0000, 16'd24, next_first(now + 16) - 1024, d, 0);
    send(w);
    // 8. stamp not on a first output cycle
    build(w, 16'h88B5, 16'h8000, 16'h0000, 16'd24, next_first(now + 16) + 128, d, 0);
    send(w);
    // 8b. stamp on the next first output cycle but less than 288 clocks ahead (late)
    wait ((now & 1023) == 1024 - 180);
    build(w, 16'h88B5, 16'h8000, 16'h0000, 16'd24, (now & ~time_t'(1023)) + 1024, d, 0);
    send(w);
    repeat (4) @(posedge clk);
    check(n_oos == 4 && hp.size() == 0, "out-of-sync frames dropped");
    // 9. disabled queue B
    build(w, 16'h88B5, 16'h4000, 16'h0000, 16'd24, next_first(now + 16), d, 0);
    send(w);
    repeat (4) @(posedge clk);
    check(hp.size() == 0 && n_oos == 4 && n_fl == 1, "frame for a disabled queue dropped");
    // 10. cut short after two data words
    build(w, 16'h88B5, 16'h8000, 16'h0000, 16'd24, next_first(now + 16), d, 18);
    send(w);
    repeat (6) @(posedge clk);
    check(n_fl == 2, "short data frame is a length error");
    check(hp.size() == 4 && hp[0] == d[0] && hp[1] == d[1] && hp[2] == 0 && hp[3] == 0,
          "short frame filled with zeros");
    hp = {};
    // 11. back to back: LP, data, LP
    begin
      logic [15:0] a [$], b [$], c [$], all [$];
      build(a, 16'h88B5, 16'h0080, 16'h0000, 16'd4, '0, '{32'hAAAA0001}, 0);
      build(b, 16'h88B5, 16'h8000, 16'h0000, 16'd24, next_first(now + 50), d, 0);
      build(c, 16'h88B5, 16'h0080, 16'h0000, 16'd4, '0, '{32'hCCCC0003}, 0);
      all = {a, b, c};
      foreach (all[i]) begin
        @(negedge clk);
        rx_valid = 1;  rx_data = all[i];
        rx_last = (i == a.size() - 1) || (i == a.size() + b.size() - 1) || (i == all.size() - 1);
      end
      @(negedge clk) rx_valid = 0;  rx_last = 0;
      repeat (20) @(posedge clk);
      check(hp.size() == 4 && hp[3] == d[3], "data frame between LP frames");
      check(lp.size() == a.size() + c.size(), "both LP frames whole");
      if (lp.size() == a.size() + c.size())
        check(lp[a.size() - 1].eof && lp[a.size()].data == c[0], "LP frame boundary kept");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
