// End-to-end test of converter_uplink at its default sizes (two ports, 16 ADCs,
// 16 DACs). The testbench plays the management processor and the computer on the
// other end of the links.
//
// Port 0 runs a servo loop. Transmit queue A acquires ADC 1 four times per 4096-clock
// processing cycle (MASK 0x3FF, ENDM 0xFFF, TRIG 0xBFF: last acquisition 3072 clocks
// into the cycle) and uses the ignore-on-condition bits so that the header and stamp
// are written only on the first acquisition, one sample on each acquisition, and the
// end mark and the start command only on the last. The computer checks each frame
// (header, stamp, the four samples), and answers with a data frame for receive queue
// A carrying the four samples negated, stamped with the next first output cycle.
// Receive queue A outputs one word per output cycle (same rates) to DAC 1, so DAC 1
// must step through the negated samples. Transmit queue B sends one sample of ADC 2
// per processing cycle at the same phase as A's last acquisition; since the queues
// run one after the other, A first, B's frame must always follow A's. Also on port 0: cycles before the first
// answer count as missing, one answer with a stale stamp is discarded.
// Port 1 carries management traffic only: a low priority frame written by the
// processor must leave inside its window, a configuration frame received must be
// readable by the processor. The 1PPS input realigns the time base once.
// Each mechanism is counted and must have happened at least once.
module tb_converter_uplink;
  import uplink_pkg::*;
  logic clk = 0, rst_n = 0, pps = 0, sec_load = 0;
  logic [31:0] sec_value = 32'd1000;
  logic [31:0] adc_filt [16];
  logic [31:0] adc_raw  [16];
  logic io_we = 0, io_re = 0, mem_we = 0, mem_re = 0;
  logic [23:0] io_addr = 0;
  logic [31:0] io_wdata = 0, io_rdata, mem_addr = 0, mem_wdata = 0, mem_rdata;
  logic [1:0]  clk_up = 0, rst_up_n = 0, tx_valid, tx_last, tx_ready = 2'b11, tx_abort;
  logic [15:0] tx_data [2];
  logic [1:0]  rx_valid = 0, rx_last = 0;
  logic [15:0] rx_data [2] = '{16'h0, 16'h0};
  logic [31:0] dac_filt [2][16];
  logic [31:0] dac_byp  [2][16];
  logic [15:0] dac_filt_upd [2];
  logic [15:0] dac_byp_upd  [2];
  logic [3:0]  acq_go [2];
  logic [3:0]  out_go [2];
  logic        sample_stb;
  int checks = 0, failures = 0;
  // mechanism counters
  int m_acq = 0, m_out = 0, m_frame = 0, m_dac = 0, m_missing = 0, m_oos = 0;
  int m_lp_tx = 0, m_lp_rx = 0, m_pps = 0, m_seq = 0;

  converter_uplink dut (.*);

  always #7.45 clk = !clk;            // 2^26 Hz master clock (~67.1 MHz)
  always #8    clk_up[0] = !clk_up[0]; // 62.5 MHz
  always #8.1  clk_up[1] = !clk_up[1]; // second link, independent clock

  wire [25:0] cnt = dut.cnt;
  always @(posedge clk) begin
    m_acq += acq_go[0][0];
    m_out += out_go[0][0];
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic io_write(input logic [23:0] a, input logic [31:0] d);
    @(negedge clk);  io_we = 1;  io_addr = a;  io_wdata = d;
    @(negedge clk);  io_we = 0;
  endtask
  task automatic io_read(input logic [23:0] a, output logic [31:0] d);
    @(negedge clk);  io_re = 1;  io_addr = a;
    @(negedge clk);  io_re = 0;  d = io_rdata;
  endtask
  task automatic mem_write(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);  mem_we = 1;  mem_addr = a;  mem_wdata = d;
    @(negedge clk);  mem_we = 0;
  endtask
  task automatic mem_read(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk);  mem_re = 1;  mem_addr = a;
    @(negedge clk);  mem_re = 0;
    @(negedge clk);  d = mem_rdata;
  endtask

  // ----------------------------------------------------------- the computer, port 0
  logic [15:0] txf [$];
  logic [15:0] frames0 [$][$];
  logic [25:0] frame_end_cnt [$];
  logic [15:0] txf1 [$];
  logic [15:0] frames1 [$][$];
  logic [25:0] frame1_cnt [$];
  logic [15:0] order0 [$];          // subtype of each frame sent on port 0, in order
  logic [15:0] framesB [$][$];
  always @(posedge clk_up[0]) if (tx_valid[0] && tx_ready[0]) begin
    txf.push_back(tx_data[0]);
    if (tx_last[0]) begin
      order0.push_back(txf[7]);
      if (txf[7] == 16'h4000) framesB.push_back(txf);
      else begin frames0.push_back(txf); frame_end_cnt.push_back(cnt); end
      txf = {};
    end
  end
  always @(posedge clk_up[1]) if (tx_valid[1] && tx_ready[1]) begin
    if (txf1.size() == 0) frame1_cnt.push_back(cnt);
    txf1.push_back(tx_data[1]);
    if (tx_last[1]) begin frames1.push_back(txf1); txf1 = {}; end
  end

  // DAC 1 updates seen, and the updates the answers should cause
  logic [25:0] upd_t [$];
  logic [31:0] upd_v [$];
  logic [25:0] exp_t [$];
  logic [31:0] exp_v [$];
  always @(posedge clk) if (dac_filt_upd[0][0]) begin
    upd_t.push_back(cnt);  upd_v.push_back(dac_filt[0][0]);
  end

  task automatic send(input int p, input logic [15:0] sub, input logic [31:0] sec,
                      input logic [25:0] scnt, input logic [31:0] d [$]);
    logic [15:0] w [$];
    logic [31:0] frac;
    frac = {scnt, 6'b0};
    w = '{16'h0013, 16'h2004, 16'h4ED1, 16'hDEAD, 16'hFACE, 16'h0001, 16'h88B5, sub, 16'h0,
          16'(8 + 4 * d.size()), sec[31:16], sec[15:0], frac[31:16], frac[15:0]};
    foreach (d[i]) begin w.push_back(d[i][31:16]); w.push_back(d[i][15:0]); end
    while (w.size() < 30) w.push_back(16'h0);
    foreach (w[i]) begin
      @(negedge clk_up[p]);
      rx_valid[p] = 1;  rx_data[p] = w[i];  rx_last[p] = (i == w.size() - 1);
    end
    @(negedge clk_up[p]);
    rx_valid[p] = 0;  rx_last[p] = 0;
  endtask

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ADC 1 changes every sampling period so that the four samples differ
  always @(posedge clk) if (sample_stb) adc_filt[0] <= adc_filt[0] + 32'd7;

  initial begin
    logic [31:0] r;
    logic [31:0] pool [5] = '{32'h00132004, 32'h4ED1DEAD, 32'hFACE0001, 32'h88B58000, 32'h00000018};
    // transmit program of queue A: ignore bits 15 last, 14 in between, 13 first
    logic [31:0] prog [11] = '{
      32'h0000_0800, 32'h0000_0801,
      32'h0001_C802, 32'h0001_C803, 32'h0001_C804, 32'h0001_CA00, 32'h0001_CB00,
      32'h0001_C000, 32'h0001_C000,   // GPS seconds, fraction; issue ADC 1 twice
      32'h0001_8F00,                  // ADC 1 on first and in-between cycles
      32'h8003_6F00};                 // ADC 1, end mark and start on the last cycle
    // queue B: one sample of ADC 2 per processing cycle, same phase as A's last cycle
    logic [31:0] poolb [5] = '{32'h00132004, 32'h4ED1DEAD, 32'hFACE0001, 32'h88B54000, 32'h0000000C};
    logic [31:0] progb [10] = '{
      32'h0000_0800, 32'h0000_0801, 32'h0001_0802, 32'h0001_0803, 32'h0001_0804,
      32'h0001_0A00, 32'h0001_0B00, 32'h0001_0001, 32'h0001_0F00, 32'h8003_0F00};
    int served = 0;
    bit bool_found;
    for (int i = 0; i < 16; i++) begin adc_filt[i] = 32'h0000_1000 * 32'(i + 1); adc_raw[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;  rst_up_n = 2'b11;
    sec_value = 32'd1000;  sec_load = 1;
    @(negedge clk) sec_load = 0;
    // ---- configuration through the processor bus
    foreach (pool[i]) mem_write(32'h8000_2000 + 32'(4 * i), pool[i]);
    foreach (prog[i]) mem_write(32'h8000_0000 + 32'(4 * i), prog[i]);
    foreach (poolb[i]) mem_write(32'h8000_6000 + 32'(4 * i), poolb[i]);
    foreach (progb[i]) mem_write(32'h8000_4000 + 32'(4 * i), progb[i]);
    mem_write(32'h8800_0000, 32'h8001_0000);           // receive: DAC 1, end
    mem_read(32'h8000_0028, r);  check(r == prog[10], "transmit microcode read back");
    mem_read(32'h8800_0000, r);  check(r == 32'h8001_0000, "receive microcode read back");
    io_write(24'h200010, {26'h3FF, 6'h3F});            // AMASK
    io_write(24'h200020, {26'hFFF, 6'h3F});            // AENDM
    io_write(24'h200014, {26'hFFF, 6'h3F});            // BMASK
    io_write(24'h200024, {26'hFFF, 6'h3F});            // BENDM
    io_write(24'h280010, {26'h3FF, 6'h3F});
    io_write(24'h280020, {26'hFFF, 6'h3F});
    io_write(24'h280030, 32'd24);                      // ALEN
    io_write(24'h300030, 32'h800);                     // port 1 LPStart
    io_write(24'h300034, 32'hA00);                     // LPStop
    io_write(24'h300038, 32'hFFF);                     // LPMask
    io_read(24'h280030, r);  check(r == 24, "receive ALEN read back");
    // ---- 1PPS realignment
    pps = 1;
    repeat (4) @(posedge clk);
    #1 check(cnt < 3, "1PPS restarts the clock counter");
    if (cnt < 3) m_pps++;
    pps = 0;
    io_read(24'h100008, r);  check(r == 1000, "GPS seconds readable");
    // ---- start both queues of port 0 between processing cycles
    wait (cnt[11:0] == 12'hD00);
    io_write(24'h200000, {26'hBFF, 6'h3F});            // transmit ATRIG, enabled
    io_write(24'h200004, {26'hBFF, 6'h3F});            // transmit BTRIG, enabled
    io_write(24'h280000, {26'hFFF, 6'h3F});            // receive ATRIG, enabled
    // ---- port 1: a low priority frame written by the processor
    for (int i = 0; i < 8; i++) io_write(24'h30003C, {15'h0, i == 7, 16'h5A00 + 16'(i)});
    // ---- serve the servo loop for several processing cycles
    while (served < 6) begin
      wait (frames0.size() > served);
      begin
        logic [15:0] f [$];
        logic [31:0] s [4];
        logic [31:0] neg [$];
        logic [31:0] stamp_sec, stamp_frac;
        logic [25:0] a, sc;
        f = frames0[served];
        neg = {};
        m_frame++;
        check(f.size() == 22, $sformatf("multi-sample frame length (%0d words)", f.size()));
        for (int i = 0; i < 5; i++) check({f[2*i], f[2*i+1]} == pool[i], "frame header word");
        stamp_sec  = {f[10], f[11]};
        stamp_frac = {f[12], f[13]};
        check(stamp_sec == 1000 && stamp_frac[5:0] == 0 && stamp_frac[31:6] % 4096 == 0,
              "stamp is the start of the processing cycle");
        for (int i = 0; i < 4; i++) s[i] = {f[14+2*i], f[15+2*i]};
        check(s[1] - s[0] == 32'd56 && s[2] - s[1] == 32'd56 && s[3] - s[2] == 32'd56,
              "samples 1024 clocks (8 sampling periods) apart");
        // answer: negated samples for the next first output cycle (phase 0x400)
        a  = cnt + 26'd40;
        sc = ((a + 26'd288 + 26'd3072) & ~26'hFFF) + 26'h400;
        if (sc - a <= 26'd288) sc += 26'h1000;
        foreach (s[i]) neg.push_back(-s[i]);
        if (served == 2) begin
          send(0, 16'h8000, 32'd1000, sc - 26'h2000, neg);   // stale stamp: discarded
          m_oos++;
        end else begin
          send(0, 16'h8000, 32'd1000, sc, neg);
          foreach (neg[k]) begin
            exp_t.push_back(sc + 26'(1024 * k));
            exp_v.push_back(neg[k]);
          end
        end
        served++;
      end
    end
    wait (cnt == exp_t[$] + 26'h100);
    // ---- DAC 1 must have taken each answered value during the sampling period
    //      before its output cycle (the receive microcode runs one period ahead)
    foreach (exp_t[j]) begin
      bool_found = 0;
      foreach (upd_t[u])
        if (exp_t[j] - upd_t[u] <= 26'd128 && upd_v[u] == exp_v[j]) bool_found = 1;
      check(bool_found, $sformatf("DAC 1 output at %07h = %08h", exp_t[j], exp_v[j]));
      if (bool_found) m_dac++;
    end
    check(exp_t.size() == 20, "five answered processing cycles");
    // ---- queues A and B fire in the same clock at phase 0xC00: A's program runs
    //      first, so its frame must precede B's on the link every time
    begin
      int pairs = 0;
      for (int i = 1; i < order0.size(); i++)
        if (order0[i] == 16'h4000) begin
          check(order0[i-1] == 16'h8000, "queue B frame follows the queue A frame");
          if (order0[i-1] == 16'h8000) pairs++;
        end
      check(framesB.size() >= 5, $sformatf("queue B frames sent (%0d)", framesB.size()));
      foreach (framesB[i]) begin
        check(framesB[i].size() == 16, "queue B frame length");
        check({framesB[i][14], framesB[i][15]} == adc_filt[1], "queue B carries ADC 2");
      end
      m_seq = pairs;
    end
    // ---- status of port 0 receive engine
    io_read(24'h280050, r);  check(r >= 1, $sformatf("A_MISSING counted (%0d)", r));
    if (r >= 1) m_missing++;
    io_read(24'h280040, r);  check(r == 1, $sformatf("A_DISCARD counted (%0d)", r));
    io_read(24'h200040, r);  check(r == 0, "no transmit FIFO errors");
    // ---- port 1: LP frame sent inside its window
    check(frames1.size() == 1 && frames1[0].size() == 8, "port 1 LP frame sent");
    if (frames1.size() == 1) begin
      check((frame1_cnt[0] & 'hFFF) > 'h800 && (frame1_cnt[0] & 'hFFF) <= 'hA10,
            $sformatf("LP frame inside its window (%03h)", frame1_cnt[0] & 'hFFF));
      for (int i = 0; i < 8; i++) check(frames1[0][i] == 16'h5A00 + 16'(i), "LP frame word");
      m_lp_tx++;
    end
    // ---- port 1: configuration frame received and read by the processor
    send(1, 16'h00C0, 0, 0, '{32'h0600_0004});
    repeat (40) @(posedge clk);
    io_read(24'h3800F8, r);  check(r[0], "port 1 LP data ready");
    io_read(24'h3800FC, r);  check(r[15:0] == 16'h0013 && !r[16], "first LP word read");
    for (int i = 1; i < 30; i++) io_read(24'h3800FC, r);
    check(r[16], "last LP word carries the end mark");
    if (r[16]) m_lp_rx++;
    // ---- mechanisms
    $display("mechanisms: acq=%0d out=%0d frames=%0d dac=%0d missing=%0d oos=%0d lp_tx=%0d lp_rx=%0d pps=%0d seq=%0d",
             m_acq, m_out, m_frame, m_dac, m_missing, m_oos, m_lp_tx, m_lp_rx, m_pps, m_seq);
    check(m_acq > 0, "acquisition cycles happened");
    check(m_out > 0, "output cycles happened");
    check(m_frame > 0, "multi-sample data frames happened");
    check(m_dac > 0, "DAC outputs from received frames happened");
    check(m_missing > 0, "missing-frame detection happened");
    check(m_oos > 0, "out-of-sync discard happened");
    check(m_lp_tx > 0, "low priority transmit in window happened");
    check(m_lp_rx > 0, "low priority receive happened");
    check(m_pps > 0, "1PPS realignment happened");
    check(m_seq > 0, "queue A then B sequencing happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
