// tb_phal_ram_if: self-checking test of phal_ram_if with a synchronous SRAM
// model (one clock read latency). Writes blocks of words with PK_RAM_WR, reads
// them back with PK_RAM_RD and checks the reply header (addressed back to the
// requester), every data word and the last flag; a zero-length read must
// give a header-only reply; a read longer than the reply buffer under random
// back-pressure must still return every word; with no back-pressure the reply
// must stream at one word per clock. Packets of other kinds are discarded.
module tb_phal_ram_if;
  import phal_pkg::*;
  localparam int AW = 18;
  logic clk = 0, rst_n = 0;
  logic sw_tx_valid, sw_tx_ready, sw_rx_valid, sw_rx_ready;
  pkt_word_t sw_tx_word, sw_rx_word;
  logic sram_en, sram_we;
  logic [AW-1:0] sram_addr;
  logic [WORD_W-1:0] sram_wdata, sram_rdata;
  int checks = 0, failures = 0;

  phal_ram_if dut (.*);
  always #5 clk = ~clk;

  // SRAM model
  logic [31:0] mem [logic [AW-1:0]];
  int n_wr = 0;
  always @(posedge clk) if (sram_en) begin
    if (sram_we) begin mem[sram_addr] = sram_wdata; n_wr++; end
    else sram_rdata <= mem.exists(sram_addr) ? mem[sram_addr] : 32'h0;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  pkt_word_t exp_q[$];
  int burst = 0, max_burst = 0;
  always @(posedge clk) if (rst_n) begin
    if (sw_rx_valid && sw_rx_ready) begin
      checks++;
      if (exp_q.size() == 0 || sw_rx_word != exp_q[0]) begin
        failures++; $display("FAIL reply word %h", sw_rx_word.data);
      end
      if (exp_q.size() > 0) void'(exp_q.pop_front());
      burst++; if (burst > max_burst) max_burst = burst;
    end else burst = 0;
  end

  task automatic send(logic [31:0] d, logic last);
    @(negedge clk);
    sw_tx_valid = 1; sw_tx_word = '{last: last, data: d};
    #1 while (!sw_tx_ready) begin @(negedge clk); #1; end
    @(negedge clk); sw_tx_valid = 0;
  endtask

  logic [31:0] ref_mem [logic [AW-1:0]];
  task automatic ram_write(logic [AW-1:0] a, int n);
    send(mk_hdr(8'h40, 8'h21, PK_RAM_WR, 8'(n + 1)), 0);
    send(32'(a), n == 0);
    for (int k = 0; k < n; k++) begin
      logic [31:0] d;
      d = $urandom;
      ref_mem[a + AW'(k)] = d;
      send(d, k == n - 1);
    end
  endtask
  task automatic ram_read(logic [AW-1:0] a, int n);
    exp_q.push_back('{last: (n == 0), data: mk_hdr(8'h21, 8'h40, PK_RAM_RSP, 8'(n))});
    for (int k = 0; k < n; k++)
      exp_q.push_back('{last: (k == n - 1), data: ref_mem.exists(a + AW'(k)) ? ref_mem[a + AW'(k)] : 32'h0});
    send(mk_hdr(8'h40, 8'h21, PK_RAM_RD, 8'd2), 0);
    send(32'(a), 0);
    send(32'(n), 1);
  endtask

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    sw_tx_valid = 0; sw_tx_word = '0; sw_rx_ready = 1; sram_rdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    ram_write(18'h00100, 12);
    ram_write(18'h3FFF0, 40);  // wraps past the top address
    repeat (5) @(negedge clk);
    chk(n_wr == 52, "52 SRAM writes");
    // Ignored kind between commands.
    send(mk_hdr(8'h40, 8'h21, PK_DATA, 8'd2), 0); send(32'h1, 0); send(32'h2, 1);
    ram_read(18'h00100, 12);
    repeat (40) @(negedge clk);
    chk(exp_q.size() == 0, "12-word read returned");
    chk(max_burst >= 12, "reply streams one word per clock");
    ram_read(18'h00105, 0);
    repeat (10) @(negedge clk);
    chk(exp_q.size() == 0, "zero-length read");
    // Long read under back-pressure.
    fork
      ram_read(18'h3FFF0, 40);
      for (int c = 0; c < 400; c++) begin @(negedge clk); sw_rx_ready = $urandom_range(0, 2) == 0; end
    join
    sw_rx_ready = 1;
    repeat (40) @(negedge clk);
    chk(exp_q.size() == 0, "long read under back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
