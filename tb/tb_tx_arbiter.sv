// Self-checking test of tx_arbiter. Five queue models (first-word-fall-through lists
// of 16-bit words with end marks and a count of stacked gos) feed the arbiter.
// Checks: frames that are all ready at once come out in the order A, B, C, D, LP;
// the LP frame waits while the low priority window is closed; frames are never
// interleaved; MAC back-pressure holds the data; a queue that runs dry in the middle
// of a frame aborts it, flags the transmit error and the rest of that frame is
// discarded.
module tb_tx_arbiter;
  import uplink_pkg::*;
  logic clk = 0, rst_n = 0, lp_ok = 0, mac_ready = 1;
  logic [4:0] frame_ready, q_empty, q_pop, go_take;
  mac_word_t  q_word [5];
  logic       mac_valid, mac_last, mac_abort, tx_err;
  logic [15:0] mac_data;
  mac_word_t  qm [5][$];
  int         gos [5];
  int checks = 0, failures = 0, n_abort = 0, n_err = 0;
  mac_word_t  got [$];

  tx_arbiter dut (.*);
  always #8 clk = !clk;

  always_comb
    for (int q = 0; q < 5; q++) begin
      q_empty[q]     = qm[q].size() == 0;
      q_word[q]      = q_empty[q] ? mac_word_t'('0) : qm[q][0];
      frame_ready[q] = gos[q] > 0;
    end

  // queue models act half a clock after the edge that popped them
  logic [4:0] pop_q = 0, take_q = 0;
  always @(negedge clk)
    for (int q = 0; q < 5; q++) begin
      if (pop_q[q] && qm[q].size() > 0) void'(qm[q].pop_front());
      if (take_q[q]) gos[q]--;
    end

  always @(posedge clk) begin
    if (mac_valid && mac_ready) got.push_back(mac_word_t'({mac_last, mac_data}));
    pop_q  <= q_pop;
    take_q <= go_take;
    n_abort += mac_abort;
    n_err   += tx_err;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic put_frame(input int q, input int n);
    for (int i = 0; i < n; i++) qm[q].push_back(mac_word_t'({i == n - 1, 16'(q * 256 + i)}));
    gos[q]++;
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int q = 0; q < 5; q++) gos[q] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // all five ready at once, LP window closed
    @(negedge clk);
    put_frame(4, 3);  put_frame(3, 4);  put_frame(1, 5);  put_frame(2, 2);  put_frame(0, 6);
    repeat (60) @(posedge clk);
    check(got.size() == 17, "data queues sent, LP held back outside its window");
    @(negedge clk) lp_ok = 1;
    repeat (10) @(posedge clk);
    @(negedge clk) lp_ok = 0;
    check(got.size() == 20, "LP frame sent inside its window");
    begin
      int exp_q [5] = '{0, 1, 2, 3, 4};
      int exp_n [5] = '{6, 5, 2, 4, 3};
      int k = 0;
      foreach (exp_q[f])
        for (int i = 0; i < exp_n[f]; i++) begin
          check(got[k].data == 16'(exp_q[f] * 256 + i) && got[k].eof == (i == exp_n[f] - 1),
                $sformatf("word %0d of frame from queue %0d", i, exp_q[f]));
          k++;
        end
    end
    // back-pressure
    got = {};
    @(negedge clk);
    put_frame(1, 8);
    for (int i = 0; i < 30; i++) begin
      @(negedge clk) mac_ready = (i % 3 == 0);
    end
    mac_ready = 1;
    repeat (10) @(posedge clk);
    check(got.size() == 8, "whole frame under back-pressure");
    foreach (got[i]) check(got[i].data == 16'(256 + i), "order kept under back-pressure");
    // underflow: a go but only part of the frame present
    got = {};
    @(negedge clk);
    qm[2].push_back(mac_word_t'({1'b0, 16'h0200}));
    qm[2].push_back(mac_word_t'({1'b0, 16'h0201}));
    gos[2]++;
    repeat (10) @(posedge clk);
    check(n_abort == 1 && n_err == 1, "dry queue aborts the frame and flags the error");
    @(negedge clk);
    qm[2].push_back(mac_word_t'({1'b0, 16'h0202}));
    qm[2].push_back(mac_word_t'({1'b1, 16'h0203}));
    put_frame(3, 2);
    repeat (20) @(posedge clk);
    check(got.size() == 4 && got[2].data == 16'h0300, "rest of the aborted frame discarded");
    check(qm[2].size() == 0, "aborted queue drained to its end mark");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
