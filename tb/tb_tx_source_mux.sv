// Self-checking test of tx_source_mux: every address class of the transmit address
// map (filtered, bypass, pair and quad differences for all four ADC groups, data
// pool, GPS seconds and fraction, zeros, unmapped addresses) with random converter
// values, the expected word computed here from the map, two clocks after the address.
module tb_tx_source_mux;
  logic clk = 0, rst_n = 0;
  logic [11:0] addr;
  logic [31:0] pool_rdata, gps_sec, gps_frac, data;
  logic [31:0] adc_filt [16];
  logic [31:0] adc_raw  [16];
  logic        decode_err;
  int checks = 0, failures = 0;

  tx_source_mux dut (.*);
  always #5 clk = !clk;

  function automatic logic [31:0] expect_of(input logic [11:0] a, output logic bad);
    int g, s;
    bad = 0;
    if (a < 12'h040) begin
      g = 4 * int'(a[5:4]);  s = int'(a[3:0]);
      if (s < 4)       return adc_filt[g+s];
      else if (s < 8)  return adc_raw[g+s-4];
      else if (s < 10) return adc_filt[g+1] - adc_filt[g];
      else if (s < 12) return adc_filt[g+3] - adc_filt[g+2];
      else             return adc_filt[g+3] - adc_filt[g+2] + adc_filt[g+1] - adc_filt[g];
    end
    if (a >= 12'h800 && a <= 12'h87F) return pool_rdata;
    if (a == 12'hA00) return gps_sec;
    if (a == 12'hB00) return gps_frac;
    if (a == 12'hF00) return 0;
    bad = 1;
    return 0;
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] list [$];
    for (int a = 0; a < 64; a++) list.push_back(12'(a));
    list.push_back(12'h800); list.push_back(12'h87F); list.push_back(12'hA00);
    list.push_back(12'hB00); list.push_back(12'hF00); list.push_back(12'h040);
    list.push_back(12'h7FF); list.push_back(12'h880); list.push_back(12'hC00);
    for (int i = 0; i < 16; i++) begin
      adc_filt[i] = $urandom;  adc_raw[i] = $urandom;
    end
    gps_sec = 32'h1234_5678;  gps_frac = 32'h9ABC_DEC0;  pool_rdata = 0;  addr = 12'hF00;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    foreach (list[i]) begin
      logic [31:0] exp;
      logic bad;
      @(negedge clk);
      addr = list[i];
      @(negedge clk);                  // pool data arrives one clock after the address
      pool_rdata = $urandom;
      addr = 12'hF00;
      exp = expect_of(list[i], bad);
      @(negedge clk);
      checks++;
      if (data !== exp || decode_err !== 1'b0) begin
        failures++;
        $display("FAIL: addr %03h data %08h expected %08h", list[i], data, exp);
      end
    end
    // decode error pulses
    @(negedge clk) addr = 12'h0C0;
    @(negedge clk) addr = 12'hF00;
    checks++;  if (decode_err !== 1'b1) begin failures++; $display("FAIL: no decode error"); end
    @(negedge clk);
    checks++;  if (decode_err !== 1'b0 || data !== 0) begin failures++; $display("FAIL: bad address data"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
