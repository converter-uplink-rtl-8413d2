// Self-checking test of tx_microcode_sm with a tx_source_mux as its data source,
// running the worked example of the transmit microcode: a data pool holding the
// Ethernet header words (destination 00-13-20-04-4E-D1, source DE-AD-FA-CE-00-01,
// type 0x88B5, subtype 0x8000, version 0, length 0x18) and the 13-instruction
// program that sends the header, the GPS time stamp and four ADC words. Checks the
// eleven words written, the end mark on the last one, the start-transmission command
// together with the second word, the run length of 13 clocks, and the ignore-on-
// condition bits on a 'last' cycle.
module tb_tx_microcode_sm;
  import uplink_pkg::*;
  logic clk = 0, rst_n = 0, enable = 0, start = 0, first = 1, last = 1;
  logic cpu_we = 0, cpu_pool = 0;
  logic [6:0]  cpu_idx = 0;
  logic [31:0] cpu_wdata = 0, cpu_rdata, pool_rdata, src_data, fifo_wdata;
  logic [11:0] src_addr;
  logic        fifo_wr, fifo_eof, start_tx, busy, done, decode_err;
  logic [31:0] adc_filt [16];
  logic [31:0] adc_raw  [16];
  int checks = 0, failures = 0;
  logic [31:0] got [$];
  logic        got_eof [$];
  int          start_at [$];
  int          cyc = 0, done_cyc = 0, start_cyc = 0;

  tx_microcode_sm dut (.*);
  tx_source_mux u_mux (.clk(clk), .rst_n(rst_n), .addr(src_addr), .pool_rdata(pool_rdata),
                       .adc_filt(adc_filt), .adc_raw(adc_raw), .gps_sec(32'h4B3C_2D1E),
                       .gps_frac(32'h8000_0000), .data(src_data), .decode_err(decode_err));
  always #7 clk = !clk;

  always @(posedge clk) begin
    cyc++;
    if (fifo_wr) begin got.push_back(fifo_wdata); got_eof.push_back(fifo_eof); end
    if (start_tx) start_at.push_back(got.size());
    if (done) done_cyc = cyc;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cpu_write(input logic pool, input int idx, input logic [31:0] d);
    @(negedge clk);
    cpu_we = 1;  cpu_pool = pool;  cpu_idx = 7'(idx);  cpu_wdata = d;
    @(negedge clk) cpu_we = 0;
  endtask

  task automatic run();
    got = {};  got_eof = {};  start_at = {};
    @(negedge clk) start = 1;
    start_cyc = cyc + 1;
    @(negedge clk) start = 0;
    repeat (20) @(posedge clk);
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] pool_words [5] = '{32'h00132004, 32'h4ED1DEAD, 32'hFACE0001, 32'h88B58000,
                                    32'h00000018};
    logic [31:0] prog [13] = '{32'h00000800, 32'h00000801, 32'h00010802, 32'h00030803,
                               32'h00010804, 32'h00010A00, 32'h00010B00, 32'h00010000,
                               32'h00010001, 32'h00010002, 32'h00010003, 32'h00010F00,
                               32'h80010F00};
    logic [31:0] exp [$];
    for (int i = 0; i < 16; i++) begin adc_filt[i] = 32'h1000_0000 + 32'(i); adc_raw[i] = $urandom; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    foreach (pool_words[i]) cpu_write(1, i, pool_words[i]);
    foreach (prog[i]) cpu_write(0, i, prog[i]);
    @(negedge clk);  cpu_idx = 3;  cpu_pool = 0;
    @(negedge clk);  check(cpu_rdata == prog[3], "processor reads back microcode");
    cpu_pool = 1;
    @(negedge clk);  check(cpu_rdata == pool_words[3], "processor reads back data pool");
    @(negedge clk) enable = 1;
    repeat (10) @(posedge clk);
    check(got.size() == 0 && start_at.size() == 0, "idle instruction 0 writes nothing");
    run();
    exp = {};
    foreach (pool_words[i]) exp.push_back(pool_words[i]);
    exp.push_back(32'h4B3C_2D1E);  exp.push_back(32'h8000_0000);
    for (int i = 0; i < 4; i++) exp.push_back(adc_filt[i]);
    check(got.size() == 11, $sformatf("eleven words written (got %0d)", got.size()));
    foreach (exp[i]) if (i < got.size())
      check(got[i] == exp[i], $sformatf("word %0d = %08h (expected %08h)", i, got[i], exp[i]));
    foreach (got_eof[i]) check(got_eof[i] == (i == 10), "end of frame only on the last word");
    check(start_at.size() == 1 && start_at[0] == 2, "start command with the second word");
    check(done_cyc - start_cyc == 12, $sformatf("13 instructions in 13 clocks (%0d)", done_cyc - start_cyc));
    check(!busy, "idle after the end of program");
    // ignore on 'last': instruction 12 marked ignore-if-last; run as last, then as middle
    cpu_write(0, 12, 32'h80018F00);
    first = 0;  last = 1;
    run();
    check(got.size() == 10, "write ignored on a last cycle");
    first = 0;  last = 0;
    run();
    check(got.size() == 11, "write kept on an in-between cycle");
    cpu_write(0, 12, 32'h80014F00);
    run();
    check(got.size() == 10, "ignore-in-between bit");
    first = 1;  last = 0;
    cpu_write(0, 12, 32'h80012F00);
    run();
    check(got.size() == 10, "ignore-first bit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
