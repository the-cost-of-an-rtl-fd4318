// tb_phal_fifo: self-checking test of phal_fifo at its default size.
// Random pushes and pops (also simultaneous, also at full and empty) are
// compared against a queue model: head word, count, full and empty after
// every cycle, and the order of every popped word.
module tb_phal_fifo;
  localparam int W = 33, D = 16;
  logic clk = 0, rst_n = 0;
  logic push, pop;
  logic [W-1:0] din, dout;
  logic full, empty;
  logic [4:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  int saw_full = 0;

  phal_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

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
    push = 0; pop = 0; din = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // phases: fill-biased, drain-biased, mixed
      push = ($urandom_range(0, 99) < ((cyc / 300) % 2 == 0 ? 80 : 25)) && (!full || pop);
      din  = {$urandom, $urandom}[W-1:0];
      pop  = ($urandom_range(0, 99) < ((cyc / 300) % 2 == 0 ? 25 : 80));
      #1;
      chk(count == q.size(), "count");
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == D), "full");
      if (q.size() > 0) chk(dout == q[0], "head");
      if (full) saw_full++;
      if (full && push && !pop) push = 0;
      @(posedge clk);
      if (pop && q.size() > 0) void'(q.pop_front());
      if (push && q.size() < D + 1) q.push_back(din);
    end
    chk(saw_full > 0, "reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
