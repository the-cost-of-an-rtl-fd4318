// tb_phal_switch: self-checking test of phal_switch with four ports.
// A routing model answers the lookups. Directed part: one packet through an
// idle switch must reach the output two clocks after its header was offered
// and then move one word per clock. Random part: every input sends random
// packets to routed ports, to the node itself (control output) and to
// unknown identifiers (dropped), with random back-pressure on every output.
// Each output checks that packets arrive whole, uninterleaved, in order per
// input, with the right next-hop link; drops are counted against drop_evt.
// Contention (two inputs waiting for one output) must occur.
module tb_phal_switch;
  import phal_pkg::*;
  localparam int NP = 4, NO = NP + 1;
  localparam logic [7:0] NODE = 8'h80;

  logic clk = 0, rst_n = 0;
  logic [ID_W-1:0] node_id = NODE;
  logic      [NP-1:0] in_valid, in_ready, out_valid, out_ready;
  pkt_word_t [NP-1:0] in_word, out_word;
  logic [NP-1:0][LINK_W-1:0] out_link;
  logic ctl_valid, ctl_ready;
  pkt_word_t ctl_word;
  logic [NP-1:0][ID_W-1:0] lk_id;
  logic [NP-1:0] lk_hit;
  logic [NP-1:0][PORT_W-1:0] lk_port;
  logic [NP-1:0][LINK_W-1:0] lk_link;
  logic [NP-1:0] drop_evt;

  phal_switch #(.NPORTS(NP)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Routing model: ids 0..15 routed, port = id % 5 (port 4 is invalid -> drop), link = id.
  function automatic bit r_hit(logic [7:0] id); return id < 16 && (id % 5) != 4; endfunction
  always_comb
    for (int i = 0; i < NP; i++) begin
      lk_hit[i]  = (lk_id[i] < 16);
      lk_port[i] = PORT_W'(lk_id[i] % 5);
      lk_link[i] = LINK_W'(lk_id[i]);
    end

  // Sources and expected traffic.
  pkt_word_t src_q[NP][$];
  int        src_out[NP][$];   // output of each queued packet (-1: dropped)
  pkt_word_t exp_q[NO][NP][$];
  logic [LINK_W-1:0] exp_link[NO][NP][$];
  int exp_drops = 0, got_drops = 0, contention = 0, delivered = 0;
  bit rand_mode = 0;
  int ready_pct = 100;

  task automatic make_pkt(int i, logic [7:0] dst, int len);
    int o;
    pkt_word_t w;
    o = (dst == NODE) ? NP : (r_hit(dst) ? int'(dst % 5) : -1);
    for (int k = 0; k <= len; k++) begin
      w.last = (k == len);
      w.data = (k == 0) ? mk_hdr(dst, 8'(i), PK_DATA, 8'(len)) : $urandom;
      src_q[i].push_back(w);
      if (o >= 0) exp_q[o][i].push_back(w);
    end
    src_out[i].push_back(o);
    if (o >= 0) exp_link[o][i].push_back((dst == NODE) ? '0 : LINK_W'(dst));
    else exp_drops++;
  endtask

  // Source driving: valid holds until accepted.
  always @(posedge clk) begin
    automatic logic [NP-1:0] f = in_valid & in_ready;
    #1;
    for (int i = 0; i < NP; i++)
      if (f[i]) begin
        if (src_q[i][0].last) void'(src_out[i].pop_front());
        void'(src_q[i].pop_front());
      end
  end
  always_comb
    for (int i = 0; i < NP; i++) begin
      in_valid[i] = rst_n && src_q[i].size() > 0;
      in_word[i]  = (src_q[i].size() > 0) ? src_q[i][0] : '0;
    end

  // Output readiness, changed at negedge.
  always @(negedge clk) begin
    for (int o = 0; o < NP; o++) out_ready[o] <= ($urandom_range(0, 99) < ready_pct);
    ctl_ready <= ($urandom_range(0, 99) < ready_pct);
  end

  // Output checking.
  int cur_in[NO];
  initial for (int o = 0; o < NO; o++) cur_in[o] = -1;
  always @(posedge clk) begin
    if (rst_n) begin
      got_drops += $countones(drop_evt);
      for (int o = 0; o < NO; o++) begin
        logic v, r; pkt_word_t w; logic [LINK_W-1:0] lk;
        v  = (o < NP) ? out_valid[o] : ctl_valid;
        r  = (o < NP) ? out_ready[o] : ctl_ready;
        w  = (o < NP) ? out_word[o]  : ctl_word;
        lk = (o < NP) ? out_link[o]  : '0;
        if (v && r) begin
          int i;
          if (cur_in[o] < 0) begin
            cur_in[o] = int'(w.data[23:16]);
            i = cur_in[o];
            checks++;
            if (i >= NP || exp_link[o][i].size() == 0) begin
              failures++; $display("FAIL unexpected packet at output %0d", o);
              cur_in[o] = -1;
              continue;
            end
            chk(lk == exp_link[o][i][0], "next-hop link");
            void'(exp_link[o][i].pop_front());
          end
          i = cur_in[o];
          checks++;
          if (exp_q[o][i].size() == 0 || w != exp_q[o][i][0]) begin
            failures++; $display("FAIL word mismatch out %0d from in %0d", o, i);
          end
          if (exp_q[o][i].size() > 0) void'(exp_q[o][i].pop_front());
          delivered++;
          if (w.last) cur_in[o] = -1;
        end
      end
      // contention: two inputs waiting on the same output
      for (int o = 0; o < NO; o++) begin
        int n;
        n = 0;
        for (int i = 0; i < NP; i++) if (in_valid[i] && !in_ready[i] && src_out[i].size() > 0 && src_out[i][0] == o) n++;
        if (n >= 2) contention++;
      end
    end
  end

  function automatic int pending();
    int n;
    n = 0;
    for (int o = 0; o < NO; o++) for (int i = 0; i < NP; i++) n += exp_q[o][i].size();
    for (int i = 0; i < NP; i++) n += src_q[i].size();
    return n;
  endfunction

  initial begin
    #2000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t0, t1, first, lastc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Directed: latency and rate of one 8-word packet, input 1 -> port 2 (id 7).
    @(negedge clk);
    make_pkt(1, 8'd7, 7);
    t0 = 0; first = -1; lastc = -1;
    for (int c = 0; c < 30; c++) begin
      @(posedge clk);
      if (out_valid[2] && out_ready[2]) begin
        if (first < 0) first = c;
        lastc = c;
      end
    end
    chk(first == 2, "header latency of two clocks");
    chk(lastc - first == 7, "one word per clock");
    // Random traffic.
    ready_pct = 70;
    for (int n = 0; n < 400; n++) begin
      int i, kind;
      logic [7:0] dst;
      i    = $urandom_range(0, NP - 1);
      kind = $urandom_range(0, 9);
      dst  = (kind == 0) ? NODE : (kind == 1) ? 8'($urandom_range(16, 60)) : 8'($urandom_range(0, 15));
      make_pkt(i, dst, $urandom_range(0, 12));
      if (n % 8 == 7) repeat ($urandom_range(0, 20)) @(negedge clk);
    end
    for (int c = 0; c < 100000 && pending() > 0; c++) @(negedge clk);
    repeat (5) @(negedge clk);
    chk(pending() == 0, "all packets delivered");
    chk(got_drops == exp_drops && exp_drops > 0, "drops counted");
    chk(contention > 0, "output contention happened");
    $display("delivered=%0d words drops=%0d/%0d contention_cycles=%0d", delivered, got_drops, exp_drops, contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
