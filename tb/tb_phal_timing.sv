// tb_phal_timing: self-checking test of phal_timing with 16-cycle slots.
// Checks that slot_tick comes exactly every SLOT_CYCLES clocks, that slot_num
// advances by one per slot, and that a synchronisation load restarts the slot
// at the loaded number.
module tb_phal_timing;
  localparam int SC = 16;
  logic clk = 0, rst_n = 0;
  logic load;
  logic [31:0] load_value, slot_num;
  logic slot_tick;
  int checks = 0, failures = 0;
  int last_tick, n;
  logic [31:0] exp_num;

  phal_timing #(.SLOT_CYCLES(SC)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    load = 0; load_value = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1;
    chk(slot_tick && slot_num == 0, "first slot after reset");
    last_tick = 0; n = 0; exp_num = 0;
    for (int c = 1; c <= 10 * SC; c++) begin
      @(negedge clk); #1;
      if (slot_tick) begin
        chk(c - last_tick == SC, "slot period");
        exp_num++;
        chk(slot_num == exp_num, "slot number");
        last_tick = c; n++;
      end
    end
    chk(n == 10, "ten slots");
    // synchronise in the middle of a slot
    repeat (5) @(negedge clk);
    load = 1; load_value = 32'd1000;
    @(negedge clk); load = 0; #1;
    chk(slot_tick && slot_num == 1000, "load restarts slot");
    for (int c = 1; c <= SC; c++) begin
      @(negedge clk); #1;
      chk(slot_tick == (c == SC), "period after load");
    end
    chk(slot_num == 1001, "count after load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
