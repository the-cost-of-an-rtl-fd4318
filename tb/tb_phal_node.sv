// tb_phal_node: end-to-end test of one P-HAL node at its default parameters
// (4-port switch, 16-entry routing table, 64-byte buffers, 1024-clock slots).
//
// The node (id 0x80, board 5) hosts object 0x10. Around it: a kernel model
// (sample sink/source and 256 parameters), an IBUS model (arbiter and a
// remote board 3 hosting object 0x20), a neighbouring FPGA on the local link
// hosting object 0x30, and an SRAM model behind the RAM interface (id 0x40).
// The test configures the node with control packets sent over the local
// link, then runs: kernel samples packed and sent to 0x20 over the IBUS,
// a remainder flushed by the slot tick, data from the IBUS delivered to the
// kernel, parameter writes and reads from 0x30, SRAM writes and reads from
// 0x30, forwarding between the link and the IBUS, a packet without route
// (dropped), two replies competing for the link while it is stalled, a time
// synchronisation, a routing change that moves 0x20 onto the local link, and
// a peak-rate check of one word per clock through the switch.
// Output packets are matched against expected ones regardless of order
// between sources; each mechanism is counted and must happen at least once.
module tb_phal_node;
  import phal_pkg::*;
  localparam logic [7:0] NODE = 8'h80, OBJ = 8'h10, REM = 8'h20, NB = 8'h30, RAM = 8'h40;
  localparam int SLOT = 1024;

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
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- mechanism counters ----------------
  int m_cfg = 0, m_sync = 0, m_to_ibus = 0, m_from_ibus = 0, m_to_loc = 0, m_from_loc = 0;
  int m_to_ram = 0, m_to_obj = 0, m_drop = 0, m_stall = 0, m_contend = 0, m_flush = 0;
  int m_parwr = 0, m_parrd = 0, m_ramwr = 0, m_ramrd = 0, m_reroute = 0, m_fwd = 0;

  // ---------------- kernel model ----------------
  logic [23:0] params [256];
  logic [31:0] smp_src[$], smp_exp[$];
  initial for (int k = 0; k < 256; k++) params[k] = 24'(k * 3);
  assign obj_par_rdata = params[obj_par_raddr];
  assign obj_in_valid  = rst_n && smp_src.size() > 0;
  assign obj_in_data   = (smp_src.size() > 0) ? smp_src[0] : '0;
  assign obj_out_ready = 1'b1;
  // Inputs driven from queues are advanced just after the clock edge.
  always @(posedge clk) if (rst_n) begin
    automatic bit f_smp = obj_in_valid && obj_in_ready;
    automatic bit f_ibs = ibus_s_valid && ibus_s_ready;
    automatic bit f_lrx = lnk_rx_valid && lnk_rx_ready;
    #1;
    if (f_smp) void'(smp_src.pop_front());
    if (f_ibs) void'(ibs_q.pop_front());
    if (f_lrx) void'(lrx_q.pop_front());
  end
  always @(posedge clk) if (rst_n) begin
    if (obj_par_we) begin params[obj_par_addr] <= obj_par_wdata; m_parwr++; end
    if (obj_out_valid && obj_out_ready) begin
      checks++;
      if (smp_exp.size() == 0 || obj_out_data != smp_exp[0]) begin failures++; $display("FAIL kernel sample"); end
      if (smp_exp.size() > 0) void'(smp_exp.pop_front());
    end
  end

  // ---------------- SRAM model ----------------
  logic [31:0] sram [logic [17:0]];
  always @(posedge clk) if (sram_en) begin
    if (sram_we) sram[sram_addr] = sram_wdata;
    else sram_rdata <= sram.exists(sram_addr) ? sram[sram_addr] : 32'h0;
  end

  // ---------------- packet helpers ----------------
  typedef pkt_word_t pkt_t[$];
  function automatic string pstr(pkt_t p);
    string s = "";
    foreach (p[k]) s = {s, $sformatf("%0d:%h ", p[k].last, p[k].data)};
    return s;
  endfunction
  function automatic pkt_t mkp(logic [7:0] dst, logic [7:0] src, pkt_kind_e kind, logic [31:0] pay[$]);
    pkt_t p;
    p.push_back('{last: (pay.size() == 0), data: mk_hdr(dst, src, kind, 8'(pay.size()))});
    foreach (pay[k]) p.push_back('{last: (k == pay.size() - 1), data: pay[k]});
    return p;
  endfunction

  // Expected output packets per port (matched in any order).
  string exp_ibus[$], exp_loc[$];
  pkt_word_t cur_ibus[$], cur_loc[$];
  logic [LINK_W-1:0] exp_ibus_link = 4'd3;

  function automatic bit take(ref string q[$], input string s);
    foreach (q[k]) if (q[k] == s) begin q.delete(k); return 1; end
    return 0;
  endfunction

  // ---------------- IBUS model ----------------
  pkt_word_t ibs_q[$];   // words a remote master sends to this board
  bit bus_busy_ext = 0;  // while set, the remote board holds the bus
  always @(posedge clk) begin
    if (!rst_n || !ibus_m_req) ibus_m_gnt <= 0;
    else if (!bus_busy_ext) ibus_m_gnt <= 1;
  end
  always @(negedge clk) ibus_m_ready <= $urandom_range(0, 3) != 0;
  assign ibus_s_valid = rst_n && ibs_q.size() > 0 && !ibus_m_gnt;
  assign ibus_s_addr  = board_addr;
  assign ibus_s_data  = (ibs_q.size() > 0) ? ibs_q[0].data : '0;
  assign ibus_s_last  = (ibs_q.size() > 0) ? ibs_q[0].last : 1'b0;

  // ---------------- local link model ----------------
  pkt_word_t lrx_q[$];
  int loc_burst = 0, loc_max_burst = 0;
  int loc_ready_pct = 80;
  always @(negedge clk) lnk_tx_ready <= $urandom_range(0, 99) < loc_ready_pct;
  assign lnk_rx_valid = rst_n && lrx_q.size() > 0;
  assign lnk_rx_word  = (lrx_q.size() > 0) ? lrx_q[0] : '0;

  always @(posedge clk) if (rst_n) begin
    if (ibus_m_valid && ibus_m_ready) begin
      cur_ibus.push_back('{last: ibus_m_last, data: ibus_m_data});
      chk(ibus_m_addr == exp_ibus_link, "IBUS next-hop address");
      if (ibus_m_last) begin
        checks++;
        if (!take(exp_ibus, pstr(cur_ibus))) begin failures++; $display("FAIL unexpected IBUS packet %s", pstr(cur_ibus)); end
        cur_ibus.delete();
      end
    end
    if (lnk_tx_valid && lnk_tx_ready) begin
      loc_burst++;
      if (loc_burst > loc_max_burst) loc_max_burst = loc_burst;
      cur_loc.push_back(lnk_tx_word);
      if (lnk_tx_word.last) begin
        checks++;
        if (!take(exp_loc, pstr(cur_loc))) begin failures++; $display("FAIL unexpected link packet %s", pstr(cur_loc)); end
        cur_loc.delete();
      end
    end else loc_burst = 0;
  end

  // ---------------- switch observation ----------------
  always @(posedge clk) if (rst_n) begin
    m_drop += $countones(drop_evt);
    for (int o = 0; o < 4; o++) begin
      if (dut.out_valid[o] && !dut.out_ready[o]) m_stall++;
      if (dut.out_valid[o] && dut.out_ready[o] && dut.out_word[o].last) begin
        case (o)
          0: m_to_obj++;
          1: m_to_ibus++;
          2: m_to_loc++;
          default: m_to_ram++;
        endcase
      end
    end
    for (int i = 0; i < 4; i++)
      if (dut.in_valid[i] && dut.in_ready[i] && dut.in_word[i].last) begin
        if (i == 1) m_from_ibus++;
        if (i == 2) m_from_loc++;
      end
    if (dut.ctl_valid && dut.ctl_ready && dut.ctl_word.last) m_cfg++;
    for (int o = 0; o < 5; o++) begin
      int n;
      n = 0;
      for (int i = 0; i < 4; i++) if (dut.u_switch.st[i] == 1 && int'(dut.u_switch.tgt[i]) == o) n++;
      if (n >= 2) m_contend++;
    end
  end

  task automatic send_loc(pkt_t p);
    foreach (p[k]) lrx_q.push_back(p[k]);
  endtask
  task automatic send_ibus(pkt_t p);
    foreach (p[k]) ibs_q.push_back(p[k]);
  endtask
  task automatic wait_idle(int max_cycles);
    for (int c = 0; c < max_cycles; c++) begin
      @(negedge clk);
      if (lrx_q.size() == 0 && ibs_q.size() == 0 && smp_src.size() == 0 && exp_ibus.size() == 0 &&
          exp_loc.size() == 0 && smp_exp.size() == 0) break;
    end
  endtask

  function automatic logic [31:0] rcfg(int idx, logic [7:0] id, int port, int link);
    route_cfg_t r;
    r = '0; r.valid = 1; r.idx = 4'(idx); r.obj_id = id; r.port = 4'(port); r.link = 4'(link);
    return r;
  endfunction

  initial begin
    #3000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] pay[$];
    pkt_t p;
    repeat (4) @(negedge clk);
    rst_n = 1;

    // 1. Configuration over the local link: routes, object, time.
    pay = {rcfg(0, OBJ, P_OBJ, 0), rcfg(1, REM, P_IBUS, 3), rcfg(2, NB, P_LOC, 0), rcfg(3, RAM, P_RAM, 0)};
    send_loc(mkp(NODE, NB, PK_ROUTE_CFG, pay));
    pay = {32'({8'd4, REM, OBJ, 8'd0})};
    send_loc(mkp(NODE, NB, PK_OBJ_CFG, pay));
    pay = {32'd100};
    send_loc(mkp(NODE, NB, PK_TIME_SYNC, pay));
    wait_idle(200);
    repeat (30) @(negedge clk);
    chk(slot_num == 100 || slot_num == 101, "time synchronised");
    if (slot_num == 100 || slot_num == 101) m_sync++;

    // 2. Kernel samples to 0x20 over the IBUS: two full packets.
    for (int k = 0; k < 8; k++) smp_src.push_back(32'h5000 + k);
    pay = {32'h5000, 32'h5001, 32'h5002, 32'h5003}; exp_ibus.push_back(pstr(mkp(REM, OBJ, PK_DATA, pay)));
    pay = {32'h5004, 32'h5005, 32'h5006, 32'h5007}; exp_ibus.push_back(pstr(mkp(REM, OBJ, PK_DATA, pay)));
    wait_idle(300);
    chk(exp_ibus.size() == 0, "full packets over the IBUS");

    // 3. Remainder of two samples leaves at the next slot tick.
    smp_src.push_back(32'h6000); smp_src.push_back(32'h6001);
    repeat (20) @(negedge clk);
    chk(dut.u_obj.tx_cnt == 2 || slot_tick, "remainder waits for the slot");
    pay = {32'h6000, 32'h6001}; exp_ibus.push_back(pstr(mkp(REM, OBJ, PK_DATA, pay)));
    for (int c = 0; c < SLOT + 10 && !slot_tick; c++) @(negedge clk);
    wait_idle(200);
    chk(exp_ibus.size() == 0, "slot tick flushed the remainder");
    if (exp_ibus.size() == 0) m_flush++;

    // 4. Data from the remote board to the kernel.
    pay = {32'h7000, 32'h7001, 32'h7002, 32'h7003, 32'h7004, 32'h7005};
    foreach (pay[k]) smp_exp.push_back(pay[k]);
    send_ibus(mkp(OBJ, REM, PK_DATA, pay));
    wait_idle(300);
    chk(smp_exp.size() == 0, "IBUS data reached the kernel");

    // 5. Parameters written and read from the neighbour.
    pay = {32'h05_00AAAA, 32'h06_00BBBB};
    send_loc(mkp(OBJ, NB, PK_PARAM_WR, pay));
    wait_idle(200);
    repeat (5) @(negedge clk);
    chk(params[5] == 24'h00AAAA && params[6] == 24'h00BBBB, "parameters written");
    pay = {32'h0600_0000};
    send_loc(mkp(OBJ, NB, PK_PARAM_RD, pay));
    pay = {32'h06_00BBBB}; exp_loc.push_back(pstr(mkp(NB, OBJ, PK_PARAM_RSP, pay)));
    m_parrd++;
    wait_idle(300);
    chk(exp_loc.size() == 0, "parameter read answered over the link");

    // 6. SRAM write then read from the neighbour.
    pay = {32'h200};
    for (int k = 0; k < 12; k++) pay.push_back(32'hC000 + k);
    send_loc(mkp(RAM, NB, PK_RAM_WR, pay)); m_ramwr++;
    wait_idle(200);
    repeat (5) @(negedge clk);
    pay = {32'h200, 32'd12};
    send_loc(mkp(RAM, NB, PK_RAM_RD, pay)); m_ramrd++;
    pay.delete();
    for (int k = 0; k < 12; k++) pay.push_back(32'hC000 + k);
    exp_loc.push_back(pstr(mkp(NB, RAM, PK_RAM_RSP, pay)));
    wait_idle(400);
    chk(exp_loc.size() == 0, "SRAM read back over the link");

    // 7. Forwarding: link -> IBUS and IBUS -> link.
    pay = {32'hF00D, 32'hF00E};
    send_loc(mkp(REM, NB, PK_DATA, pay));
    exp_ibus.push_back(pstr(mkp(REM, NB, PK_DATA, pay)));
    pay = {32'hBEE5};
    send_ibus(mkp(NB, REM, PK_DATA, pay));
    exp_loc.push_back(pstr(mkp(NB, REM, PK_DATA, pay)));
    wait_idle(400);
    chk(exp_ibus.size() == 0 && exp_loc.size() == 0, "packets forwarded between boards and link");
    if (exp_ibus.size() == 0 && exp_loc.size() == 0) m_fwd++;

    // 8. No route: dropped, and the node keeps working.
    pay = {32'h1, 32'h2, 32'h3};
    send_ibus(mkp(8'h99, REM, PK_DATA, pay));
    wait_idle(200);
    repeat (5) @(negedge clk);
    chk(m_drop == 1, "unrouted packet dropped");

    // 9. Contention and stall: a 20-word SRAM reply and a parameter reply
    //    compete for the stalled link.
    pay = {32'h300};
    for (int k = 0; k < 20; k++) pay.push_back(32'hD000 + k);
    send_loc(mkp(RAM, NB, PK_RAM_WR, pay)); m_ramwr++;
    wait_idle(200);
    repeat (5) @(negedge clk);
    loc_ready_pct = 0;
    bus_busy_ext = 1;
    pay = {32'h300, 32'd20};
    send_ibus(mkp(RAM, NB, PK_RAM_RD, pay)); m_ramrd++;
    pay = {32'h0500_0000};
    send_ibus(mkp(OBJ, NB, PK_PARAM_RD, pay)); m_parrd++;
    pay.delete();
    for (int k = 0; k < 20; k++) pay.push_back(32'hD000 + k);
    exp_loc.push_back(pstr(mkp(NB, RAM, PK_RAM_RSP, pay)));
    pay = {32'h05_00AAAA}; exp_loc.push_back(pstr(mkp(NB, OBJ, PK_PARAM_RSP, pay)));
    bus_busy_ext = 0;
    repeat (150) @(negedge clk);
    loc_ready_pct = 50;
    wait_idle(600);
    chk(exp_loc.size() == 0, "both replies delivered after the stall");

    // 10. Routing change: 0x20 now reached over the local link.
    pay = {rcfg(1, REM, P_LOC, 0)};
    send_loc(mkp(NODE, NB, PK_ROUTE_CFG, pay));
    wait_idle(100);
    repeat (5) @(negedge clk);
    for (int k = 0; k < 4; k++) smp_src.push_back(32'h8000 + k);
    pay = {32'h8000, 32'h8001, 32'h8002, 32'h8003}; exp_loc.push_back(pstr(mkp(REM, OBJ, PK_DATA, pay)));
    wait_idle(300);
    chk(exp_loc.size() == 0, "rerouted packet on the link");
    if (exp_loc.size() == 0) m_reroute++;

    // 11. Streaming: 64 samples to 0x20 (now on the link) under random stalls.
    loc_ready_pct = 60;
    for (int k = 0; k < 64; k++) smp_src.push_back(32'h9000 + k);
    for (int k = 0; k < 16; k++) begin
      pay = {32'h9000 + 4 * k, 32'h9001 + 4 * k, 32'h9002 + 4 * k, 32'h9003 + 4 * k};
      exp_loc.push_back(pstr(mkp(REM, OBJ, PK_DATA, pay)));
    end
    wait_idle(2000);
    chk(exp_loc.size() == 0 && smp_src.size() == 0, "stream of 64 samples delivered");

    // 12. Peak rate: a 16-word packet turned around on the link moves one
    //     32-bit word (4 bytes) per clock once it flows.
    loc_ready_pct = 100;
    repeat (5) @(negedge clk);
    pay.delete();
    for (int k = 0; k < 15; k++) pay.push_back(32'hE000 + k);
    send_loc(mkp(NB, NB, PK_DATA, pay));
    exp_loc.push_back(pstr(mkp(NB, NB, PK_DATA, pay)));
    loc_max_burst = 0;
    wait_idle(200);
    repeat (10) @(negedge clk);
    chk(exp_loc.size() == 0 && loc_max_burst == 16, "16 words in 16 consecutive clocks");

    repeat (20) @(negedge clk);
    chk(exp_ibus.size() == 0 && exp_loc.size() == 0 && smp_exp.size() == 0, "nothing left over");
    $display("mechanisms: cfg=%0d sync=%0d to_ibus=%0d from_ibus=%0d to_loc=%0d from_loc=%0d to_ram=%0d to_obj=%0d",
             m_cfg, m_sync, m_to_ibus, m_from_ibus, m_to_loc, m_from_loc, m_to_ram, m_to_obj);
    $display("mechanisms: drop=%0d stall=%0d contention=%0d flush=%0d parwr=%0d parrd=%0d ramwr=%0d ramrd=%0d fwd=%0d reroute=%0d",
             m_drop, m_stall, m_contend, m_flush, m_parwr, m_parrd, m_ramwr, m_ramrd, m_fwd, m_reroute);
    chk(m_cfg >= 4, "control packets executed");
    chk(m_sync > 0, "time sync happened");
    chk(m_to_ibus > 0 && m_from_ibus > 0, "IBUS both ways");
    chk(m_to_loc > 0 && m_from_loc > 0, "local link both ways");
    chk(m_to_ram > 0 && m_to_obj > 0, "RAM and object ports used");
    chk(m_drop > 0, "drop happened");
    chk(m_stall > 0, "back-pressure stall happened");
    chk(m_contend > 0, "output contention happened");
    chk(m_flush > 0, "slot flush happened");
    chk(m_parwr > 0 && m_parrd > 0, "parameter write and read happened");
    chk(m_ramwr > 0 && m_ramrd > 0, "SRAM write and read happened");
    chk(m_fwd > 0 && m_reroute > 0, "forwarding and rerouting happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
