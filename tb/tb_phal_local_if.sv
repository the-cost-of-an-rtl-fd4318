// tb_phal_local_if: self-checking test of phal_local_if (16-word buffers).
// Random packet words go both ways with random valid on the senders and
// random ready on the receivers; every word must come out once, in order.
// With the far side stalled the transmit buffer must take exactly 16 words
// and then hold off the switch (back-pressure).
module tb_phal_local_if;
  import phal_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sw_tx_valid, sw_tx_ready, sw_rx_valid, sw_rx_ready;
  logic lnk_tx_valid, lnk_tx_ready, lnk_rx_valid, lnk_rx_ready;
  pkt_word_t sw_tx_word, sw_rx_word, lnk_tx_word, lnk_rx_word;
  int checks = 0, failures = 0;
  pkt_word_t q_tx[$], q_rx[$];
  int accepted;

  phal_local_if dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (sw_tx_valid && sw_tx_ready) q_tx.push_back(sw_tx_word);
    if (lnk_rx_valid && lnk_rx_ready) q_rx.push_back(lnk_rx_word);
    if (lnk_tx_valid && lnk_tx_ready) begin
      checks++;
      if (q_tx.size() == 0 || lnk_tx_word != q_tx[0]) begin failures++; $display("FAIL tx order"); end
      if (q_tx.size() > 0) void'(q_tx.pop_front());
    end
    if (sw_rx_valid && sw_rx_ready) begin
      checks++;
      if (q_rx.size() == 0 || sw_rx_word != q_rx[0]) begin failures++; $display("FAIL rx order"); end
      if (q_rx.size() > 0) void'(q_rx.pop_front());
    end
  end

  initial begin
    #400000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    sw_tx_valid = 0; sw_rx_ready = 0; lnk_tx_ready = 0; lnk_rx_valid = 0;
    sw_tx_word = '0; lnk_rx_word = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Back-pressure: link stalled, offer 20 words.
    accepted = 0;
    for (int k = 0; k < 20; k++) begin
      @(negedge clk);
      sw_tx_valid = 1; sw_tx_word = '{last: (k % 4 == 3), data: $urandom};
      #1 if (sw_tx_ready) accepted++;
    end
    @(negedge clk); sw_tx_valid = 0;
    chk(accepted == 16, "buffer holds 64 bytes");
    chk(!sw_tx_ready, "full buffer stalls the switch");
    // Random traffic both ways.
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      if (!(sw_tx_valid && !sw_tx_ready)) begin
        sw_tx_valid = $urandom_range(0, 1); sw_tx_word = '{last: 1'($urandom), data: $urandom};
      end
      if (!(lnk_rx_valid && !lnk_rx_ready)) begin
        lnk_rx_valid = $urandom_range(0, 1); lnk_rx_word = '{last: 1'($urandom), data: $urandom};
      end
      lnk_tx_ready = $urandom_range(0, 2) != 0;
      sw_rx_ready  = $urandom_range(0, 2) != 0;
    end
    @(negedge clk);
    sw_tx_valid = 0; lnk_rx_valid = 0; lnk_tx_ready = 1; sw_rx_ready = 1;
    repeat (40) @(negedge clk);
    chk(q_tx.size() == 0 && q_rx.size() == 0, "all words delivered");
    chk(checks > 2000, "enough traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
