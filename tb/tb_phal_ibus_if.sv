// tb_phal_ibus_if: self-checking test of phal_ibus_if.
// Master side: packets with next-hop addresses enter from the switch; a bus
// arbiter model grants after a random delay and holds the grant while m_req
// is high; the addressed slave model is randomly ready. Every bus word must
// carry its packet's address, arrive in order, appear only while granted, and
// m_req must drop after a last word unless a waiting packet follows. Slave side: words for this board and
// for other boards are offered; only the former are taken and reach the
// switch in order. A word per clock must be reached when nothing stalls.
// Packets already waiting when a packet ends may share its grant, at most
// four per grant; otherwise m_req must fall after the last word.
module tb_phal_ibus_if;
  import phal_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [LINK_W-1:0] board_addr = 4'd5;
  logic sw_tx_valid, sw_tx_ready, sw_rx_valid, sw_rx_ready;
  pkt_word_t sw_tx_word, sw_rx_word;
  logic [LINK_W-1:0] sw_tx_link;
  logic m_req, m_gnt, m_valid, m_last, m_ready;
  logic [LINK_W-1:0] m_addr, s_addr;
  logic [WORD_W-1:0] m_data, s_data;
  logic s_valid, s_last, s_ready;
  int checks = 0, failures = 0;

  phal_ibus_if dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  typedef struct packed { logic [LINK_W-1:0] a; pkt_word_t w; } ent_t;
  ent_t q_m[$];
  pkt_word_t q_s[$];
  int gnt_wait = 0, packets_m = 0, burst = 0, max_burst = 0, req_drop_ok = 0;
  logic last_seen, had_more;
  int pk_in_grant = 0, n_burst = 0;
  bit stall_free = 0;

  // Bus arbiter model.
  always @(posedge clk) begin
    if (!rst_n || !m_req) begin m_gnt <= 0; gnt_wait <= $urandom_range(0, 4); end
    else if (!m_gnt) begin
      if (gnt_wait == 0) m_gnt <= 1; else gnt_wait <= gnt_wait - 1;
    end
  end
  always @(negedge clk) m_ready <= stall_free ? 1'b1 : ($urandom_range(0, 3) != 0);

  always @(posedge clk) if (rst_n) begin
    if (sw_tx_valid && sw_tx_ready) q_m.push_back('{a: sw_tx_link, w: sw_tx_word});
    if (m_valid) begin
      checks++;
      if (!m_gnt) begin failures++; $display("FAIL valid without grant"); end
    end
    if (last_seen) begin
      checks++;
      // the bus is kept only for a packet that was already waiting, and for
      // at most four packets per grant
      if (m_req && (!had_more || pk_in_grant >= 4)) begin
        failures++; $display("FAIL request held after last word");
      end
      if (m_req) n_burst++;
    end
    if (!m_req) pk_in_grant = 0;
    last_seen <= m_valid && m_ready && m_last;
    had_more  <= (q_m.size() > 1) || (sw_tx_valid && sw_tx_ready && q_m.size() > 0);
    if (m_valid && m_ready && m_last) pk_in_grant++;
    if (m_valid && m_ready) begin
      checks++;
      if (q_m.size() == 0 || q_m[0] != '{a: m_addr, w: '{last: m_last, data: m_data}}) begin
        failures++; $display("FAIL master word");
      end
      if (q_m.size() > 0) void'(q_m.pop_front());
      if (m_last) packets_m++;
      burst++;
      if (burst > max_burst) max_burst = burst;
    end else burst = 0;
    if (s_valid && s_ready) begin
      checks++;
      if (s_addr != board_addr) begin failures++; $display("FAIL took a word for another board"); end
      q_s.push_back('{last: s_last, data: s_data});
    end
    if (sw_rx_valid && sw_rx_ready) begin
      checks++;
      if (q_s.size() == 0 || sw_rx_word != q_s[0]) begin failures++; $display("FAIL slave word"); end
      if (q_s.size() > 0) void'(q_s.pop_front());
    end
  end

  initial begin
    #400000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int foreign = 0;
    sw_tx_valid = 0; sw_tx_word = '0; sw_tx_link = '0; sw_rx_ready = 0;
    s_valid = 0; s_addr = 0; s_data = 0; s_last = 0; last_seen = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Master: 60 packets of 1..8 words.
    fork
      for (int p = 0; p < 60; p++) begin
        int len;
        logic [LINK_W-1:0] a;
        len = $urandom_range(1, 8); a = 4'($urandom);
        for (int k = 0; k < len; k++) begin
          @(negedge clk);
          sw_tx_valid = 1; sw_tx_link = a; sw_tx_word = '{last: (k == len - 1), data: $urandom};
          #1 while (!sw_tx_ready) begin @(negedge clk); #1; end
        end
        @(negedge clk); sw_tx_valid = 0;
      end
      for (int c = 0; c < 2000; c++) begin
        @(negedge clk);
        if (!(s_valid && !s_ready && s_addr == board_addr)) begin
          s_valid = $urandom_range(0, 1);
          s_addr  = ($urandom_range(0, 2) == 0) ? 4'($urandom) : board_addr;
          s_data  = $urandom; s_last = 1'($urandom);
          if (s_valid && s_addr != board_addr) foreign++;
        end
        sw_rx_ready = $urandom_range(0, 3) != 0;
      end
    join
    @(negedge clk); s_valid = 0; sw_rx_ready = 1;
    repeat (300) @(negedge clk);
    chk(packets_m == 60 && q_m.size() == 0, "all master packets sent");
    chk(q_s.size() == 0, "all slave words delivered");
    chk(foreign > 0, "foreign words offered");
    chk(n_burst > 0, "several packets sent in one grant");
    // Rate: a 16-word packet with the bus free and the slave always ready.
    stall_free = 1;
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      sw_tx_valid = 1; sw_tx_link = 4'd9; sw_tx_word = '{last: (k == 15), data: $urandom};
    end
    @(negedge clk); sw_tx_valid = 0;
    max_burst = 0;
    repeat (40) @(negedge clk);
    chk(max_burst >= 14, "one word per clock on the bus");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
