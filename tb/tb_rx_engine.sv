// Self-checking test of rx_engine. Queue A runs one output cycle every 4096 clocks
// (MASK = ENDM = TRIG = 0xFFF) with a 4-word data frame (LEN 24) and a program that
// writes DAC 1, DAC 2 bypass, the pair address of DACs 7/8 and the quad address of
// DACs 13-16. A frame stamped with the next first output cycle is sent through the
// MAC stream; the DAC outputs must hold the expected values right after that cycle
// starts, and not before the state machine ran (128 clocks ahead of the cycle).
// Then: a cycle without a frame must show 'queue A empty' in the status word and the
// A_MISSING counter, a frame stamped one cycle too late must be discarded and counted,
// and a configuration frame must be readable word by word at offset 0xFC with the LP
// data ready bit set.
module tb_rx_engine;
  import uplink_pkg::*;
  logic clk = 0, rst_n = 0, clk_up = 0, rst_up_n = 0;
  cnt_t  cnt = '0;
  time_t now;
  logic io_we = 0, io_re = 0, mem_we = 0;
  logic [7:0]  io_addr = 0;
  logic [31:0] io_wdata = 0, io_rdata, mem_wdata = 0, mem_rdata;
  logic [15:0] mem_addr = 0;
  logic        rx_valid = 0, rx_last = 0;
  logic [15:0] rx_data = 0;
  logic [31:0] dac_filt [16];
  logic [31:0] dac_byp  [16];
  logic [15:0] filt_upd, byp_upd;
  logic [3:0]  out_go;
  int checks = 0, failures = 0;

  rx_engine dut (.*);
  assign now = {32'd9, cnt};
  always #7.45 clk = !clk;
  always #8    clk_up = !clk_up;
  always @(posedge clk) if (rst_n) cnt <= cnt + 1'b1;

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
  task automatic send(input logic [15:0] sub, input time_t stamp, input logic [31:0] d [$]);
    logic [15:0] w [$];
    logic [31:0] frac;
    frac = {stamp[CNT_W-1:0], 6'b0};
    w = '{16'h0013, 16'h2004, 16'h4ED1, 16'hDEAD, 16'hFACE, 16'h0001, 16'h88B5, sub, 16'h0,
          16'(8 + 4 * d.size()), stamp[57:42], stamp[41:26], frac[31:16], frac[15:0]};
    foreach (d[i]) begin w.push_back(d[i][31:16]); w.push_back(d[i][15:0]); end
    while (w.size() < 30) w.push_back(16'h0);
    foreach (w[i]) begin
      @(negedge clk_up);
      rx_valid = 1;  rx_data = w[i];  rx_last = (i == w.size() - 1);
    end
    @(negedge clk_up);
    rx_valid = 0;  rx_last = 0;
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d [$];
    logic [31:0] r;
    d = '{32'h0100_0001, 32'h0200_0002, 32'h0300_0003, 32'h0400_0004};
    repeat (3) @(posedge clk);
    rst_n = 1;  rst_up_n = 1;
    mem_write(16'h0000, 32'h0001_0000);
    mem_write(16'h0004, 32'h0001_0005);
    mem_write(16'h0008, 32'h0001_001A);
    mem_write(16'h000C, 32'h8001_003C);
    io_write(8'h10, {26'hFFF, 6'h3F});
    io_write(8'h20, {26'hFFF, 6'h3F});
    io_write(8'h30, 32'd24);
    io_write(8'h00, {26'hFFF, 6'h3F});
    io_read(8'h30, r);  check(r == 24, "ALEN read back");
    wait (cnt == 26'd1000);
    send(16'h8000, {32'd9, 26'd4096}, d);
    wait (cnt == 26'd3960);
    @(negedge clk);
    check(dac_filt[0] == 0 && dac_byp[1] == 0, "DACs untouched before the state machine ran");
    wait (cnt == 26'd4100);
    check(dac_filt[0] == d[0], "DAC 1 filtered");
    check(dac_byp[1] == d[1], "DAC 2 bypass");
    check(dac_filt[7] == d[2] && dac_filt[6] == -d[2], "DAC 8 / DAC 7 anti-phase pair");
    check(dac_filt[15] == d[3] && dac_filt[13] == d[3] && dac_filt[14] == -d[3] &&
          dac_filt[12] == -d[3], "DACs 13-16 quad");
    // no frame for the cycle at 8192
    wait (cnt == 26'd8300);
    io_read(8'hF8, r);  check(r[16] && r[4:1] == 0, "queue A empty at the start of its cycle");
    io_read(8'h50, r);  check(r == 1, $sformatf("A_MISSING counts one cycle (%0d)", r));
    // late frame: stamp names a cycle one processing cycle too far
    send(16'h8000, {32'd9, 26'd16384}, d);
    repeat (20) @(posedge clk);
    io_read(8'h40, r);  check(r == 1, $sformatf("A_DISCARD counts the frame (%0d)", r));
    io_read(8'hF8, r);  check(r[1], "out-of-sync bit for queue A");
    // configuration frame to LP
    send(16'h00C0, '0, '{32'h0600_0004});
    repeat (40) @(posedge clk);
    io_read(8'hF8, r);  check(r[0], "LP data ready");
    begin
      logic [15:0] exp [6] = '{16'h0013, 16'h2004, 16'h4ED1, 16'hDEAD, 16'hFACE, 16'h0001};
      for (int i = 0; i < 6; i++) begin
        io_read(8'hFC, r);
        check(r[15:0] == exp[i] && !r[16], "LP frame word read by the processor");
      end
      for (int i = 6; i < 30; i++) begin
        io_read(8'hFC, r);
        if (i == 29) check(r[16], "end mark on the last LP word");
      end
    end
    io_read(8'hF8, r);  check(!r[0], "LP queue drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
