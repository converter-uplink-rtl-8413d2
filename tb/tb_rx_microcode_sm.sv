// Self-checking test of rx_microcode_sm. A queue model (first-word-fall-through list)
// supplies 32-bit words; a five-instruction program writes DAC 1 filtered, DAC 2
// bypass, skips a clock, pops a word to an ignored address (bit 11 set) and ends with
// a write to the quad address 0x00C. Checks the DAC bus writes (address, data, order,
// two clocks after the instruction, which runs one clock after 'start'), the number of words popped, zero data from an
// empty queue, the ignore-on-condition bits and the idle machine leaving the queue
// alone.
module tb_rx_microcode_sm;
  import uplink_pkg::*;
  logic clk = 0, rst_n = 0, enable = 0, start = 0, first = 1, last = 0;
  logic cpu_we = 0;
  logic [6:0]  cpu_idx = 0;
  logic [31:0] cpu_wdata = 0, cpu_rdata, fifo_rdata, dac_data;
  logic        fifo_empty, fifo_rd, dac_we, busy, done;
  logic [11:0] dac_addr;
  logic [31:0] qm [$];
  int checks = 0, failures = 0, cyc = 0, start_cyc = 0;
  int          wr_cyc [$];
  logic [11:0] wr_addr [$];
  logic [31:0] wr_data [$];

  rx_microcode_sm dut (.*);
  always #7 clk = !clk;

  assign fifo_empty = qm.size() == 0;
  assign fifo_rdata = fifo_empty ? 32'hFFFF_FFFF : qm[0];

  // the queue model pops half a clock after the edge that took the word
  logic pop_q = 0;
  always @(negedge clk) if (pop_q && qm.size() > 0) void'(qm.pop_front());

  always @(posedge clk) begin
    cyc++;
    pop_q <= fifo_rd;
    if (dac_we) begin
      wr_cyc.push_back(cyc);  wr_addr.push_back(dac_addr);  wr_data.push_back(dac_data);
    end
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cpu_write(input int idx, input logic [31:0] d);
    @(negedge clk);
    cpu_we = 1;  cpu_idx = 7'(idx);  cpu_wdata = d;
    @(negedge clk) cpu_we = 0;
  endtask

  task automatic run();
    wr_cyc = {};  wr_addr = {};  wr_data = {};
    @(negedge clk) start = 1;
    start_cyc = cyc + 1;
    @(negedge clk) start = 0;
    repeat (12) @(posedge clk);
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    cpu_write(0, 32'h0001_0000);
    cpu_write(1, 32'h0001_0005);
    cpu_write(2, 32'h0000_0001);
    cpu_write(3, 32'h0001_0800);
    cpu_write(4, 32'h8001_000C);
    @(negedge clk) cpu_idx = 4;
    @(negedge clk) check(cpu_rdata == 32'h8001_000C, "processor reads back microcode");
    for (int i = 0; i < 6; i++) qm.push_back(32'hC0DE_0000 + 32'(i));
    enable = 1;
    repeat (10) @(posedge clk);
    check(qm.size() == 6, "idle machine leaves the queue alone");
    run();
    check(qm.size() == 2, "four words popped");
    check(wr_addr.size() == 3, "three DAC writes (bit 11 address skipped)");
    if (wr_addr.size() == 3) begin
      check(wr_addr[0] == 12'h000 && wr_data[0] == 32'hC0DE_0000, "first write to DAC 1");
      check(wr_addr[1] == 12'h005 && wr_data[1] == 32'hC0DE_0001, "second write to DAC 2 bypass");
      check(wr_addr[2] == 12'h00C && wr_data[2] == 32'hC0DE_0003, "last write to quad address");
      check(wr_cyc[0] - start_cyc == 3, $sformatf("write two clocks after its instruction (%0d)",
                                                   wr_cyc[0] - start_cyc));
      check(wr_cyc[2] - start_cyc == 7, "last write two clocks after the end instruction");
    end
    check(!busy, "idle after the program");
    // ignore-if-first on instruction 1
    cpu_write(1, 32'h0001_2005);
    run();
    check(wr_addr.size() == 2 && qm.size() == 0, "ignored instruction pops nothing");
    // empty queue gives zero
    run();
    check(wr_addr.size() == 2 && wr_data[0] == 0 && wr_data[1] == 0, "empty queue writes zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
