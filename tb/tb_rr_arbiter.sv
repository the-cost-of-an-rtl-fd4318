// tb_rr_arbiter: self-checking test of rr_arbiter (N = 4).
// A reference pointer model predicts the grant for random request patterns;
// a fairness check holds all requests high and expects each input granted
// exactly once in every four consecutive grants.
module tb_rr_arbiter;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt;
  logic advance;
  int checks = 0, failures = 0;
  int ptr = 0;
  int cnt[N];

  rr_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [N-1:0] model(logic [N-1:0] r, int p);
    for (int k = 0; k < N; k++) if (r[(p + k) % N]) return N'(1) << ((p + k) % N);
    return '0;
  endfunction

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    req = '0; advance = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 1000; c++) begin
      @(negedge clk);
      req = N'($urandom);
      advance = $urandom_range(0, 1);
      #1;
      chk(gnt == model(req, ptr), "grant");
      @(posedge clk);
      if (advance && |req) for (int k = 0; k < N; k++) if (gnt[k]) ptr = (k + 1) % N;
    end
    // fairness under full load
    for (int k = 0; k < N; k++) cnt[k] = 0;
    for (int c = 0; c < 4 * N; c++) begin
      @(negedge clk); req = '1; advance = 1; #1;
      for (int k = 0; k < N; k++) if (gnt[k]) cnt[k]++;
      chk($countones(gnt) == 1, "one-hot");
    end
    for (int k = 0; k < N; k++) chk(cnt[k] == 4, "fair share");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
