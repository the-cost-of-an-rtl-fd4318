// tb_phal_object_if: self-checking test of phal_object_if.
// A kernel model feeds samples and answers parameter reads with
// {addr, 16'hBEEF}. Checks: full packets of pkt_len samples leave with the
// configured header; a remainder waits until the slot tick and then leaves as
// a short packet; received data packets come out as samples in order;
// parameter writes strobe par_we with address and value; a parameter read
// returns a one-word reply to the requester; other kinds are discarded. A
// random phase streams samples with random back-pressure and slot ticks and
// checks that every sample leaves exactly once, in order.
module tb_phal_object_if;
  import phal_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [ID_W-1:0] own_id = 8'h21, dst_id = 8'h33;
  logic [7:0] pkt_len = 8'd4;
  logic slot_tick;
  logic smp_in_valid, smp_in_ready, smp_out_valid, smp_out_ready;
  logic [WORD_W-1:0] smp_in_data, smp_out_data;
  logic par_we;
  logic [7:0] par_addr, par_raddr;
  logic [23:0] par_wdata, par_rdata;
  logic net_tx_valid, net_tx_ready, net_rx_valid, net_rx_ready;
  pkt_word_t net_tx_word, net_rx_word;
  int checks = 0, failures = 0;

  phal_object_if dut (.*);
  always #5 clk = ~clk;
  assign par_rdata = {par_raddr, 16'hBEEF};

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Transmit monitor.
  logic [31:0] smp_q[$];      // samples the kernel handed over
  logic [31:0] rsp_q[$];      // expected reply payloads
  logic [7:0]  rsp_dst_q[$];
  int remain = -1;             // -1: expecting a header
  bit in_rsp = 0;
  int n_data_pkts = 0, n_short = 0, n_rsp = 0, n_tx_words = 0;
  pkt_hdr_t th;
  always @(posedge clk) if (rst_n) begin
    if (smp_in_valid && smp_in_ready) smp_q.push_back(smp_in_data);
    if (net_tx_valid && net_tx_ready) begin
      n_tx_words++;
      if (remain < 0) begin
        th = pkt_hdr_t'(net_tx_word.data);
        checks++;
        if (th.kind == PK_DATA) begin
          if (th.dst != dst_id || th.src != own_id || th.len == 0 || th.len > pkt_len || net_tx_word.last) begin
            failures++; $display("FAIL data header %h", net_tx_word.data);
          end
          n_data_pkts++;
          if (th.len < pkt_len) n_short++;
          remain = th.len; in_rsp = 0;
        end else if (th.kind == PK_PARAM_RSP) begin
          if (rsp_dst_q.size() == 0 || th.dst != rsp_dst_q[0] || th.src != own_id || th.len != 1) begin
            failures++; $display("FAIL reply header");
          end
          if (rsp_dst_q.size() > 0) void'(rsp_dst_q.pop_front());
          remain = 1; in_rsp = 1;
        end else begin
          failures++; $display("FAIL unexpected kind");
        end
      end else begin
        checks++;
        if (in_rsp) begin
          if (rsp_q.size() == 0 || net_tx_word.data != rsp_q[0]) begin failures++; $display("FAIL reply value"); end
          if (rsp_q.size() > 0) void'(rsp_q.pop_front());
          n_rsp++;
        end else begin
          if (smp_q.size() == 0 || net_tx_word.data != smp_q[0]) begin failures++; $display("FAIL sample order"); end
          if (smp_q.size() > 0) void'(smp_q.pop_front());
        end
        remain--;
        chk(net_tx_word.last == (remain == 0), "last flag");
        if (remain == 0) remain = -1;
      end
    end
  end

  // Receive side monitor.
  logic [31:0] out_q[$];
  logic [31:0] pw_q[$];
  always @(posedge clk) if (rst_n) begin
    if (smp_out_valid && smp_out_ready) begin
      checks++;
      if (out_q.size() == 0 || smp_out_data != out_q[0]) begin failures++; $display("FAIL rx sample"); end
      if (out_q.size() > 0) void'(out_q.pop_front());
    end
    if (par_we) begin
      checks++;
      if (pw_q.size() == 0 || {par_addr, par_wdata} != pw_q[0]) begin failures++; $display("FAIL param write"); end
      if (pw_q.size() > 0) void'(pw_q.pop_front());
    end
  end

  task automatic rx_word(logic [31:0] d, logic last);
    @(negedge clk);
    net_rx_valid = 1; net_rx_word = '{last: last, data: d};
    #1 while (!net_rx_ready) begin @(negedge clk); #1; end
    @(negedge clk); net_rx_valid = 0;
  endtask

  task automatic push_smp(logic [31:0] d);
    @(negedge clk);
    smp_in_valid = 1; smp_in_data = d;
    #1 while (!smp_in_ready) begin @(negedge clk); #1; end
    @(negedge clk); smp_in_valid = 0;
  endtask

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int w0;
    slot_tick = 0; smp_in_valid = 0; smp_in_data = 0; smp_out_ready = 1;
    net_tx_ready = 1; net_rx_valid = 0; net_rx_word = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Ten samples: two full packets now, two samples wait for the slot tick.
    for (int k = 0; k < 10; k++) push_smp(32'h1000 + k);
    repeat (20) @(negedge clk);
    chk(n_data_pkts == 2 && smp_q.size() == 2, "full packets sent, remainder held");
    w0 = n_tx_words;
    slot_tick = 1; @(negedge clk); slot_tick = 0;
    repeat (10) @(negedge clk);
    chk(n_data_pkts == 3 && n_short == 1 && smp_q.size() == 0, "slot tick flushes remainder");
    chk(n_tx_words - w0 == 3, "short packet of two samples");
    // Data packet in.
    rx_word(mk_hdr(8'h21, 8'h50, PK_DATA, 8'd5), 0);
    for (int k = 0; k < 5; k++) begin out_q.push_back(32'hA000 + k); rx_word(32'hA000 + k, k == 4); end
    // Parameter writes.
    rx_word(mk_hdr(8'h21, 8'h50, PK_PARAM_WR, 8'd2), 0);
    pw_q.push_back(32'h03_123456); rx_word(32'h03_123456, 0);
    pw_q.push_back(32'h09_00ABCD); rx_word(32'h09_00ABCD, 1);
    // Ignored kind.
    rx_word(mk_hdr(8'h21, 8'h50, PK_RAM_RSP, 8'd2), 0);
    rx_word(32'hDEAD, 0); rx_word(32'hBEEF, 1);
    // Parameter read from 0x44.
    rsp_dst_q.push_back(8'h44); rsp_q.push_back({8'h07, 8'h07, 16'hBEEF});
    rx_word(mk_hdr(8'h21, 8'h44, PK_PARAM_RD, 8'd1), 0);
    rx_word(32'h0700_0000, 1);
    repeat (20) @(negedge clk);
    chk(out_q.size() == 0 && pw_q.size() == 0, "receive side done");
    chk(n_rsp == 1 && rsp_q.size() == 0, "parameter read answered");
    // Random streaming with back-pressure and slot ticks.
    fork
      for (int k = 0; k < 300; k++) begin
        push_smp($urandom);
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      for (int c = 0; c < 1500; c++) begin
        @(negedge clk);
        net_tx_ready = $urandom_range(0, 2) != 0;
        slot_tick = ($urandom_range(0, 40) == 0);
      end
    join
    @(negedge clk); net_tx_ready = 1; slot_tick = 1; @(negedge clk); slot_tick = 0;
    repeat (60) @(negedge clk);
    chk(smp_q.size() == 0 && remain == -1, "every sample sent once");
    $display("data packets=%0d short=%0d", n_data_pkts, n_short);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
