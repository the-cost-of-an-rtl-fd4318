// tb_phal_fir_stream: a filter's output stream through a node whose bus
// access is slow, at the node's default parameters.
//
// Scenario: a FIR filter object produces one sample per microsecond
// (1 Msample/s). The node runs at 25 MHz, so one 32-bit word per clock is
// 100 Mbyte/s of peak port bandwidth, and the filter offers a sample every
// 25 clocks. The samples go to a remote object over the inter-board bus.
// The bus arbiter model grants only 250 clocks (10 us) after each request,
// which models a round-robin bus shared by many boards. Everything that waited
// goes out in one grant (up to four packets).
// Checks: the filter is never held off (obj_in_ready stays high whenever a
// sample is offered); every sample reaches the bus once and in order, in
// well-formed packets addressed to the remote object; every bus grant waited
// the full latency. A packet only requests the bus once it is complete, so
// samples wait up to 8 us of packing plus 10 us of access, about 18 words
// with headers: more than one 64-byte buffer, so the test also checks that
// the two buffers on the path (object transmit, bus transmit) share the load
// and are never both full.
module tb_phal_fir_stream;
  import phal_pkg::*;
  localparam logic [7:0] NODE = 8'h80, OBJ = 8'h10, REM = 8'h20, NB = 8'h30;
  localparam int CLK_PER_SMP = 25;     // 25 MHz clock, 1 Msample/s
  localparam int BUS_LATENCY = 250;    // 10 us at 25 MHz
  localparam int N_SMP = 1200;

  logic clk = 0, rst_n = 0;
  logic [ID_W-1:0] node_id = NODE;
  logic [LINK_W-1:0] board_addr = 4'd5;
  logic obj_in_valid, obj_in_ready, obj_out_valid, obj_out_ready;
  logic [WORD_W-1:0] obj_in_data, obj_out_data;
  logic obj_par_we;
  logic [7:0] obj_par_addr, obj_par_raddr;
  logic [23:0] obj_par_wdata, obj_par_rdata;
  logic ibus_m_req, ibus_m_gnt, ibus_m_valid, ibus_m_last, ibus_m_ready;
  logic [LINK_W-1:0] ibus_m_addr, ibus_s_addr;
  logic [WORD_W-1:0] ibus_m_data, ibus_s_data;
  logic ibus_s_valid, ibus_s_last, ibus_s_ready;
  logic lnk_tx_valid, lnk_tx_ready, lnk_rx_valid, lnk_rx_ready;
  pkt_word_t lnk_tx_word, lnk_rx_word;
  logic sram_en, sram_we;
  logic [17:0] sram_addr;
  logic [WORD_W-1:0] sram_wdata, sram_rdata;
  logic slot_tick;
  logic [31:0] slot_num;
  logic [3:0] drop_evt;

  phal_node dut (.*);
  always #20 clk = ~clk;   // 40 ns period

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Unused sides of the node.
  assign obj_out_ready = 1'b1;
  assign obj_par_rdata = '0;
  assign ibus_s_valid = 1'b0;
  assign ibus_s_addr = '0;
  assign ibus_s_data = '0;
  assign ibus_s_last = 1'b0;
  assign lnk_tx_ready = 1'b1;
  assign sram_rdata = '0;

  // Configuration packets on the local link.
  pkt_word_t lrx_q[$];
  assign lnk_rx_valid = rst_n && lrx_q.size() > 0;
  assign lnk_rx_word  = (lrx_q.size() > 0) ? lrx_q[0] : '0;
  always @(posedge clk) if (rst_n) begin
    automatic bit f = lnk_rx_valid && lnk_rx_ready;
    #1 if (f) void'(lrx_q.pop_front());
  end

  // Filter model: one sample every CLK_PER_SMP clocks.
  logic [31:0] sent_q[$];
  int n_sent = 0, n_held = 0;
  bit streaming = 0;
  always @(posedge clk) if (rst_n) begin
    automatic bit f = obj_in_valid && obj_in_ready;
    if (obj_in_valid && !obj_in_ready) n_held++;
    #1;
    if (f) begin
      obj_in_valid <= 1'b0;
      n_sent++;
    end
  end
  initial begin
    obj_in_valid = 0; obj_in_data = 0;
    wait (streaming);
    for (int k = 0; k < N_SMP; k++) begin
      @(negedge clk);
      obj_in_valid = 1; obj_in_data = 32'(k * 7 + 3);
      sent_q.push_back(obj_in_data);
      repeat (CLK_PER_SMP - 1) @(negedge clk);
    end
  end

  // Bus arbiter with fixed access latency; the remote slave is always ready.
  int wait_cnt = 0, n_grants = 0, short_grants = 0;
  always @(posedge clk) begin
    if (!rst_n || !ibus_m_req) begin ibus_m_gnt <= 0; wait_cnt <= 0; end
    else if (!ibus_m_gnt) begin
      if (wait_cnt == BUS_LATENCY - 1) begin
        ibus_m_gnt <= 1; n_grants++;
      end
      wait_cnt <= wait_cnt + 1;
    end
  end
  assign ibus_m_ready = 1'b1;

  // Bus monitor: packet format and sample order.
  int remain = -1, n_pkts = 0, n_rx = 0, max_fill = 0;
  always @(posedge clk) if (rst_n) begin
    int fill;
    fill = int'(dut.u_obj.u_tx.count) + int'(dut.u_ibus.u_tx.count);
    if (fill > max_fill) max_fill = fill;
    if (ibus_m_valid && ibus_m_ready) begin
      checks++;
      if (ibus_m_addr != 4'd3) begin failures++; $display("FAIL bus address"); end
      if (remain < 0) begin
        pkt_hdr_t h;
        h = pkt_hdr_t'(ibus_m_data);
        checks++;
        if (h.dst != REM || h.src != OBJ || h.kind != PK_DATA || h.len == 0 || h.len > 8) begin
          failures++; $display("FAIL header %h", ibus_m_data);
        end
        remain = h.len;
        n_pkts++;
      end else begin
        if (sent_q.size() == 0 || ibus_m_data != sent_q[0]) begin failures++; $display("FAIL sample order"); end
        if (sent_q.size() > 0) void'(sent_q.pop_front());
        n_rx++;
        remain--;
        if ((remain == 0) != ibus_m_last) begin failures++; $display("FAIL last flag"); end
        if (remain == 0) remain = -1;
      end
    end
  end

  function automatic logic [31:0] rcfg(int idx, logic [7:0] id, int port, int link);
    route_cfg_t r;
    r = '0; r.valid = 1; r.idx = 4'(idx); r.obj_id = id; r.port = 4'(port); r.link = 4'(link);
    return r;
  endfunction
  task automatic send_loc(logic [7:0] dst, pkt_kind_e kind, logic [31:0] pay[$]);
    lrx_q.push_back('{last: (pay.size() == 0), data: mk_hdr(dst, NB, kind, 8'(pay.size()))});
    foreach (pay[k]) lrx_q.push_back('{last: (k == pay.size() - 1), data: pay[k]});
  endtask

  initial begin
    #((N_SMP * CLK_PER_SMP + 20000) * 40); failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] pay[$];
    repeat (4) @(negedge clk);
    rst_n = 1;
    pay = {rcfg(0, REM, P_IBUS, 3)};
    send_loc(NODE, PK_ROUTE_CFG, pay);
    pay = {32'({8'd8, REM, OBJ, 8'd0})};
    send_loc(NODE, PK_OBJ_CFG, pay);
    repeat (40) @(negedge clk);
    streaming = 1;
    repeat (N_SMP * CLK_PER_SMP + 2 * BUS_LATENCY + 2048) @(negedge clk);
    $display("samples sent=%0d received=%0d packets=%0d grants=%0d held=%0d deepest=%0d words",
             n_sent, n_rx, n_pkts, n_grants, n_held, max_fill);
    chk(n_sent == N_SMP && n_rx == N_SMP && sent_q.size() == 0, "every sample delivered once");
    chk(n_held == 0, "filter never held off");
    chk(n_grants > 10, "bus latency paid many times");
    chk(max_fill > 16 && max_fill < 32, "waiting data spread over both buffers, never both full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
