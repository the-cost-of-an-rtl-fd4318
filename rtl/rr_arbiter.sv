// rr_arbiter: round-robin arbiter for one switch output.
//
// gnt is one-hot and combinational from req: the first requester at or after
// the rotating priority pointer wins. When 'advance' is high (the grant was
// taken) the pointer moves to the input after the winner, so every requester
// is served within N grants. The arbitration policy is this design's own.
module rr_arbiter #(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt
);

  localparam int IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] ptr;
  logic [IW-1:0] win;

  always_comb begin
    gnt = '0;
    win = '0;
    for (int k = N-1; k >= 0; k--) begin
      if (req[(int'(ptr) + k) % N]) begin
        gnt = '0;
        gnt[(int'(ptr) + k) % N] = 1'b1;
        win = IW'((int'(ptr) + k) % N);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) ptr <= '0;
    else if (advance && |req) ptr <= (win == IW'(N-1)) ? '0 : win + 1'b1;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) (|req) |-> $onehot(gnt));

endmodule
