// tb_phal_ctrl: self-checking test of phal_ctrl.
// Sends route-configuration packets (several entries per packet), a time
// synchronisation, an object configuration and a packet of an unrelated kind,
// with idle gaps between words, and checks every resulting strobe and
// register value one clock after the word that caused it.
module tb_phal_ctrl;
  import phal_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready;
  pkt_word_t in_word;
  logic rt_we, ts_load;
  logic [3:0] rt_idx;
  route_entry_t rt_entry;
  logic [31:0] ts_value;
  logic [ID_W-1:0] own_id, dst_id;
  logic [7:0] pkt_len;
  int checks = 0, failures = 0;
  int n_rt = 0, n_ts = 0;
  route_entry_t exp_rt[$];
  logic [3:0] exp_idx[$];
  logic [31:0] exp_ts[$];

  phal_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic send(logic [31:0] d, logic last);
    @(negedge clk);
    in_valid = 1; in_word = '{last: last, data: d};
    @(negedge clk);
    in_valid = 0;
    repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask

  always @(posedge clk) if (rst_n) begin
    if (rt_we) begin
      n_rt++;
      checks++;
      if (exp_rt.size() == 0 || rt_entry != exp_rt[0] || rt_idx != exp_idx[0]) begin
        failures++; $display("FAIL routing write");
      end else begin void'(exp_rt.pop_front()); void'(exp_idx.pop_front()); end
    end
    if (ts_load) begin
      n_ts++;
      checks++;
      if (exp_ts.size() == 0 || ts_value != exp_ts[0]) begin failures++; $display("FAIL time load"); end
      else void'(exp_ts.pop_front());
    end
  end

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    route_cfg_t rc;
    obj_cfg_t oc;
    in_valid = 0; in_word = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(pkt_len == 8 && own_id == 0, "reset configuration");
    chk(in_ready, "always ready");
    // Route configuration with three entries.
    send(mk_hdr(8'h80, 8'h01, PK_ROUTE_CFG, 8'd3), 0);
    for (int k = 0; k < 3; k++) begin
      rc = '0;
      rc.valid = (k != 1); rc.idx = 4'(k * 5); rc.link = 4'(k + 2); rc.port = 4'(k); rc.obj_id = 8'(8'h20 + k);
      exp_rt.push_back('{valid: rc.valid, obj_id: rc.obj_id, port: rc.port, link: rc.link});
      exp_idx.push_back(rc.idx);
      send(rc, k == 2);
    end
    // Time synchronisation.
    exp_ts.push_back(32'd12345);
    send(mk_hdr(8'h80, 8'h01, PK_TIME_SYNC, 8'd1), 0);
    send(32'd12345, 1);
    // Unrelated kind: ignored, payload that looks like a route word.
    send(mk_hdr(8'h80, 8'h01, PK_DATA, 8'd2), 0);
    send(32'hFFFF_FFFF, 0);
    send(32'hFFFF_FFFF, 1);
    // Header-only packet.
    send(mk_hdr(8'h80, 8'h01, PK_ROUTE_CFG, 8'd0), 1);
    // Object configuration.
    oc = '{pkt_len: 8'd5, dst_id: 8'h33, own_id: 8'h21, rsvd: 8'h0};
    send(mk_hdr(8'h80, 8'h01, PK_OBJ_CFG, 8'd1), 0);
    send(oc, 1);
    @(negedge clk);
    chk(own_id == 8'h21 && dst_id == 8'h33 && pkt_len == 8'd5, "object configuration");
    repeat (3) @(negedge clk);
    chk(n_rt == 3 && exp_rt.size() == 0, "three routing writes");
    chk(n_ts == 1 && exp_ts.size() == 0, "one time load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
