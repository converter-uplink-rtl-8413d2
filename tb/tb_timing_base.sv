// Self-checking test of timing_base: counter start, 1PPS realignment (3-clock
// latency), sampling strobe every 128 clocks, natural wrap after 2^26 clocks with a
// seconds increment, a late 1PPS just after the wrap that must not count the second
// twice, and loading of the seconds.
module tb_timing_base;
  import uplink_pkg::*;
  logic clk = 0, rst_n = 0, pps = 0, sec_load = 0;
  logic [31:0] sec_value = 0, sec;
  cnt_t  cnt;
  time_t now;
  logic  sample_stb;
  int checks = 0, failures = 0;

  timing_base dut (.*);
  always #5 clk = !clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cnt=%0d sec=%0d)", what, cnt, sec);
    end
  endtask

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int strobes;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (100) @(posedge clk);
    #1 check(cnt == 100, "counts one per clock from reset");
    // 1PPS in the first half of the second: realign, no new second
    pps = 1;
    repeat (3) @(posedge clk);
    #1 check(cnt == 0, "1PPS forces cnt to 0 after three clocks");
    check(sec == 0, "early 1PPS does not count a second");
    repeat (10) @(posedge clk);
    pps = 0;
    strobes = 0;
    for (int i = 0; i < 1024; i++) begin
      @(posedge clk); #1;
      if (sample_stb) begin
        strobes++;
        check(cnt[6:0] == 0, "sample strobe on a multiple of 128");
      end
    end
    check(strobes == 8, "eight sampling periods in 1024 clocks");
    // run to the natural wrap
    wait (cnt == CNT_W'(2**CNT_W - 2));
    @(posedge clk); #1;
    check(sec == 0, "no second before the wrap");
    @(posedge clk); #1;
    check(cnt == 0 && sec == 1, "wrap at 2^26 counts a second");
    check(now == {32'd1, 26'd0}, "now = {sec, cnt}");
    // late 1PPS: cnt small, second already counted
    pps = 1;
    repeat (3) @(posedge clk);
    #1 check(cnt == 0 && sec == 1, "late 1PPS realigns without a second increment");
    pps = 0;
    sec_value = 32'd1234;  sec_load = 1;
    @(posedge clk); #1 sec_load = 0;
    check(sec == 1234, "seconds load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
