// Self-checking test of dac_output_map: every receive address for all 16 DACs,
// filtered and bypass, the anti-phase pairs and quads, against a reference model kept
// in the testbench; also an out-of-range address that must flag a decoder error and
// leave the outputs alone.
module tb_dac_output_map;
  logic clk = 0, rst_n = 0;
  logic        dac_we = 0;
  logic [11:0] dac_addr = 0;
  logic [31:0] dac_data = 0;
  logic [31:0] dac_filt [16];
  logic [31:0] dac_byp  [16];
  logic [15:0] filt_upd, byp_upd;
  logic        decode_err;
  logic [31:0] mf [16];
  logic [31:0] mb [16];
  int checks = 0, failures = 0;

  dac_output_map dut (.*);
  always #5 clk = !clk;

  task automatic model(input logic [11:0] a, input logic [31:0] v);
    int g, s;
    g = 4 * int'(a[5:4]);  s = int'(a[3:0]);
    if (s < 4) mf[g+s] = v;
    else if (s < 8) mb[g+s-4] = v;
    else if (s < 10) begin mf[g+1] = v; mf[g] = -v; end
    else if (s < 12) begin mf[g+3] = v; mf[g+2] = -v; end
    else begin mf[g+3] = v; mf[g+1] = v; mf[g+2] = -v; mf[g] = -v; end
  endtask

  task automatic compare(input string what);
    checks++;
    for (int i = 0; i < 16; i++)
      if (dac_filt[i] !== mf[i] || dac_byp[i] !== mb[i]) begin
        failures++;
        $display("FAIL: %s DAC %0d filt %08h/%08h byp %08h/%08h", what, i + 1,
                 dac_filt[i], mf[i], dac_byp[i], mb[i]);
        break;
      end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin mf[i] = 0; mb[i] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < 3; r++)
      for (int a = 0; a < 64; a++) begin
        logic [31:0] v;
        v = $urandom;
        @(negedge clk);
        dac_we = 1;  dac_addr = 12'(a);  dac_data = v;
        model(12'(a), v);
        @(negedge clk);
        dac_we = 0;
        compare($sformatf("address %03h", a));
        checks++;
        if (decode_err) begin failures++; $display("FAIL: unexpected decode error"); end
      end
    @(negedge clk);
    dac_we = 1;  dac_addr = 12'h040;  dac_data = 32'hDEAD_BEEF;
    @(negedge clk);
    dac_we = 0;
    checks++;
    if (!decode_err) begin failures++; $display("FAIL: no decode error at 0x040"); end
    compare("after unmapped address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
