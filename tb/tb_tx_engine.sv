// Self-checking test of tx_engine. The processor interface loads queue A with the
// worked example (header words in the data pool, 13-instruction program sending the
// header, GPS stamp and ADC 1-4) and queue B with a shorter program, both at 16384 Hz
// (MASK = ENDM = TRIG = 0xFFF, i.e. a cycle every 4096 clocks). Frames are collected at
// the MAC side in the uplink clock and compared with words computed here. Also checked:
// A's frame leaves before B's in every cycle, one frame per queue per acquisition
// cycle, the time stamp equals the cycle start, a low priority frame written through
// offset 0x3C leaves only inside its window (LPMask 0xFFF, LPStart 0x800, LPStop 0xA00),
// a decoder error on queue C is counted and shown in the status word, and register
// read-back.
module tb_tx_engine;
  import uplink_pkg::*;
  logic clk = 0, rst_n = 0, clk_up = 0, rst_up_n = 0;
  cnt_t cnt = '0;
  logic [31:0] sec = 32'd77;
  logic [31:0] adc_filt [16];
  logic [31:0] adc_raw  [16];
  logic io_we = 0, io_re = 0, mem_we = 0, mac_ready = 1;
  logic [7:0]  io_addr = 0;
  logic [31:0] io_wdata = 0, io_rdata, mem_wdata = 0, mem_rdata;
  logic [15:0] mem_addr = 0;
  logic        mac_valid, mac_last, mac_abort;
  logic [15:0] mac_data;
  logic [3:0]  acq_go;
  int checks = 0, failures = 0;
  logic [15:0] cur [$];
  logic [15:0] frames [$][$];
  int          frame_cnt [$];
  int          n_go_a = 0, n_abort = 0;

  tx_engine dut (.*);
  always #7.45 clk = !clk;
  always #8    clk_up = !clk_up;
  always @(posedge clk) begin
    if (rst_n) cnt <= cnt + 1'b1;
    n_go_a += acq_go[0];
  end
  cnt_t cnt_up;
  always @(posedge clk_up) begin
    cnt_up <= cnt;
    n_abort += mac_abort;
    if (mac_valid && mac_ready) begin
      if (cur.size() == 0) frame_cnt.push_back(int'(cnt_up));
      cur.push_back(mac_data);
      if (mac_last) begin frames.push_back(cur); cur = {}; end
    end
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic io_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);  io_we = 1;  io_addr = a;  io_wdata = d;
    @(negedge clk);  io_we = 0;
  endtask
  task automatic io_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);  io_re = 1;  io_addr = a;
    @(negedge clk);  io_re = 0;  d = io_rdata;
  endtask
  task automatic mem_write(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);  mem_we = 1;  mem_addr = a;  mem_wdata = d;
    @(negedge clk);  mem_we = 0;
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] pool_a [5] = '{32'h00132004, 32'h4ED1DEAD, 32'hFACE0001, 32'h88B58000, 32'h00000018};
    logic [31:0] prog_a [13] = '{32'h00000800, 32'h00000801, 32'h00010802, 32'h00030803,
                                 32'h00010804, 32'h00010A00, 32'h00010B00, 32'h00010000,
                                 32'h00010001, 32'h00010002, 32'h00010003, 32'h00010F00,
                                 32'h80010F00};
    // queue B: two pool words then the ADC 2-1 difference, end
    logic [31:0] prog_b [5] = '{32'h00000800, 32'h00000801, 32'h00030008, 32'h00010F00, 32'h80010F00};
    logic [31:0] r;
    logic [15:0] lp_frame [$];
    int nframes_before;
    for (int i = 0; i < 16; i++) begin adc_filt[i] = 32'hA0000000 + 32'(i * 3); adc_raw[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;  rst_up_n = 1;
    foreach (pool_a[i]) mem_write(16'h2000 + 16'(4 * i), pool_a[i]);
    foreach (prog_a[i]) mem_write(16'h0000 + 16'(4 * i), prog_a[i]);
    mem_write(16'h6000, 32'hB0B0_0001);
    mem_write(16'h6004, 32'hB0B0_0002);
    foreach (prog_b[i]) mem_write(16'h4000 + 16'(4 * i), prog_b[i]);
    mem_write(16'h8000, 32'h0000_0900);         // queue C: unmapped address
    mem_write(16'h8004, 32'h8000_0F00);
    // rates: MASK = ENDM = 0xFFF, TRIG = 0xFFF | enable
    for (int q = 0; q < 3; q++) begin
      io_write(8'h10 + 8'(4 * q), {26'hFFF, 6'h3F});
      io_write(8'h20 + 8'(4 * q), {26'hFFF, 6'h3F});
    end
    io_write(8'h30, 32'h800);  io_write(8'h34, 32'hA00);  io_write(8'h38, 32'hFFF);
    io_read(8'h14, r);  check(r == {26'hFFF, 6'h3F}, "BMASK read back");
    io_read(8'h34, r);  check(r == 32'hA00, "LPStop read back");
    // enable A, B, C after the second boundary is past
    wait (cnt == 26'd5000);
    io_write(8'h00, {26'hFFF, 6'h3F});
    io_write(8'h04, {26'hFFF, 6'h3F});
    io_write(8'h08, {26'hFFF, 6'h3F});
    // low priority frame of 6 entries, written right after a cycle start
    wait (cnt == 26'd8200);
    for (int i = 0; i < 6; i++) begin
      lp_frame.push_back(16'hE000 + 16'(i));
      io_write(8'h3C, {15'h0, i == 5, 16'hE000 + 16'(i)});
    end
    wait (cnt == 26'd8192 + 4 * 4096 - 10);
    repeat (400) @(posedge clk);
    // cycles at 8192 ... 24576 -> 5 frames each from A and B
    check(n_go_a == 5, $sformatf("five acquisition cycles (%0d)", n_go_a));
    check(frames.size() == 11, $sformatf("5 x A + 5 x B + 1 LP frames (%0d)", frames.size()));
    begin
      int na = 0, nb = 0, nlp = 0;
      foreach (frames[f]) begin
        if (frames[f].size() == 22) begin
          logic [31:0] stamp;
          na++;
          for (int i = 0; i < 5; i++)
            check({frames[f][2*i], frames[f][2*i+1]} == pool_a[i], "A header word");
          check({frames[f][10], frames[f][11]} == 32'd77, "A GPS seconds");
          stamp = {frames[f][12], frames[f][13]};
          check(stamp[31:6] % 4096 == 0 && stamp[5:0] == 0, "A stamp is the cycle start");
          for (int i = 0; i < 4; i++)
            check({frames[f][14+2*i], frames[f][15+2*i]} == adc_filt[i], "A ADC word");
          check(f + 1 < frames.size() && frames[f+1].size() == 6 &&
                frames[f+1][0] == 16'hB0B0, "B frame follows A frame");
        end else if (frames[f].size() == 6 && frames[f][0] == 16'hB0B0) begin
          nb++;
          check({frames[f][4], frames[f][5]} == adc_filt[1] - adc_filt[0], "B difference word");
        end else if (frames[f].size() == 6 && frames[f][0] == 16'hE000) begin
          nlp++;
          foreach (lp_frame[i]) check(frames[f][i] == lp_frame[i], "LP frame content");
          check((frame_cnt[f] & 'hFFF) > 'h800 && (frame_cnt[f] & 'hFFF) <= 'hA10,
                $sformatf("LP frame inside its window (%03h)", frame_cnt[f] & 'hFFF));
        end
      end
      check(na == 5 && nb == 5 && nlp == 1, $sformatf("frame mix %0d/%0d/%0d", na, nb, nlp));
    end
    check(n_abort == 0, "no aborted frame");
    io_read(8'h58, r);  check(r >= 1, $sformatf("decoder errors counted (%0d)", r));
    io_read(8'h3C, r);  check(r[16] == 1'b1 && r[15:0] == 0, "status: decoder error only");
    io_read(8'h3C, r);  check(r == 0 || r == 32'h10000, "status read clears it");
    io_read(8'h40, r);  check(r == 0, "no FIFO errors on queue A");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
