// Self-checking test of cycle_trigger against the two worked examples of the
// acquisition rate programming: 4 acquisitions of 1024 clocks in a 4096-clock
// processing cycle (MASK 0x3FF, ENDM 0xFFF, TRIG 0xBFF) and equal rates at 2048 Hz
// (MASK = ENDM = TRIG = 0x7FFF). Register words carry the 26-bit values shifted left
// by 6 with ones below, bit 0 of TRIG being the enable. The expected flags are
// computed here from the example text, and one advanced instance is checked too.
module tb_cycle_trigger;
  import uplink_pkg::*;
  cnt_t        cnt;
  logic [31:0] trig, mask, endm;
  logic        go, first, last, go_a, first_a, last_a;
  int checks = 0, failures = 0;

  cycle_trigger dut (.cnt(cnt), .trig(trig), .mask(mask), .endm(endm),
                     .go(go), .first(first), .last(last));
  cycle_trigger #(.ADVANCE(128)) dut_adv (.cnt(cnt), .trig(trig), .mask(mask), .endm(endm),
                     .go(go_a), .first(first_a), .last(last_a));

  function automatic logic [31:0] reg_of(input logic [25:0] v, input logic en);
    return {v, 5'b11111, en};
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s at cnt=%0h", what, cnt);
    end
  endtask

  initial begin
    int ngo, nfirst, nlast;
    // Example 1
    mask = reg_of(26'h3FF, 0);  endm = reg_of(26'hFFF, 0);  trig = reg_of(26'hBFF, 1);
    ngo = 0; nfirst = 0; nlast = 0;
    for (int c = 0; c < 16384; c++) begin
      cnt = CNT_W'(c);
      #1;
      check(go == (c % 1024 == 0), "example 1 go every 1024 clocks");
      check(last == (c % 4096 == 3072), "example 1 last at 45.8 us (clock 3072)");
      check(first == (c % 4096 == 0), "example 1 first at 0 us");
      check(go_a == ((c + 128) % 1024 == 0), "advanced go 128 clocks early");
      ngo += go;  nfirst += first;  nlast += last;
    end
    check(ngo == 16 && nfirst == 4 && nlast == 4, "example 1 counts");
    // disabled: nothing
    trig = reg_of(26'hBFF, 0);
    cnt = 0; #1 check(!go && !first && !last, "disabled queue never starts");
    // Example 2
    mask = reg_of(26'h7FFF, 0);  endm = reg_of(26'h7FFF, 0);  trig = reg_of(26'h7FFF, 1);
    ngo = 0;
    for (int c = 0; c < 3 * 32768; c += 64) begin
      cnt = CNT_W'(c);
      #1;
      check(go == (c % 32768 == 0), "example 2 go every 32768 clocks");
      check(go == last && go == first, "example 2 every cycle first and last");
      ngo += go;
    end
    check(ngo == 3, "example 2 count");
    // wrap of the counter at 2^26
    cnt = '1;  #1 check(!go, "no go at the last clock of the second");
    cnt = '0;  #1 check(go, "go at the start of the second");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
