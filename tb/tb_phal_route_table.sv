// tb_phal_route_table: self-checking test of phal_route_table (16 entries,
// 4 lookup ports). Random entry writes (including invalid entries and
// duplicate identifiers) are mirrored in a model; random lookups on all ports
// are compared with the model's lowest-index match.
module tb_phal_route_table;
  import phal_pkg::*;
  localparam int E = 16, L = 4;
  logic clk = 0, rst_n = 0;
  logic wr_en;
  logic [3:0] wr_idx;
  route_entry_t wr_entry;
  logic [L-1:0][ID_W-1:0] lk_id;
  logic [L-1:0] lk_hit;
  logic [L-1:0][PORT_W-1:0] lk_port;
  logic [L-1:0][LINK_W-1:0] lk_link;
  int checks = 0, failures = 0, hits = 0, misses = 0;
  route_entry_t m[E];

  phal_route_table #(.ENTRIES(E), .NLOOK(L)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wr_en = 0; wr_idx = 0; wr_entry = '0; lk_id = '0;
    for (int e = 0; e < E; e++) m[e] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      wr_en = ($urandom_range(0, 3) == 0);
      wr_idx = 4'($urandom);
      wr_entry.valid  = ($urandom_range(0, 5) != 0);
      wr_entry.obj_id = 8'($urandom_range(0, 23));   // small id space: hits and duplicates
      wr_entry.port   = 4'($urandom);
      wr_entry.link   = 4'($urandom);
      for (int l = 0; l < L; l++) lk_id[l] = 8'($urandom_range(0, 23));
      #1;
      for (int l = 0; l < L; l++) begin
        bit h; route_entry_t r;
        h = 0; r = '0;
        for (int e = E - 1; e >= 0; e--) if (m[e].valid && m[e].obj_id == lk_id[l]) begin h = 1; r = m[e]; end
        chk(lk_hit[l] == h, "hit");
        if (h) begin
          hits++;
          chk(lk_port[l] == r.port && lk_link[l] == r.link, "port/link");
        end else misses++;
      end
      @(posedge clk);
      if (wr_en) m[wr_idx] = wr_entry;
    end
    chk(hits > 100 && misses > 100, "both hits and misses exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
