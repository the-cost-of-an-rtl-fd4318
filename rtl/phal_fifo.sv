// phal_fifo: synchronous first-word-fall-through FIFO, the packet buffer of
// every P-HAL interface.
//
// DEPTH words of WIDTH bits held in a register array; the word at the head is
// visible on dout whenever empty is low, and pop removes it. One push and one
// pop may happen in the same cycle, also when full (the pop frees the slot).
// count gives the number of stored words. The default 16 x 32-bit words is the
// 64-byte buffer of each interface of the original platform; the
// implementation is this design's own.
module phal_fifo #(
  parameter int WIDTH = 33,
  parameter int DEPTH = 16,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             full,
  output logic             empty,
  output logic [AW:0]      count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;

  wire do_pop  = pop && !empty;
  wire do_push = push && (!full || do_pop);

  assign empty = (count == 0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign dout  = mem[rp];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_push) wp <= inc(wp);
      if (do_pop)  rp <= inc(rp);
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  // Writers must respect 'full' unless they pop in the same cycle.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop))
    else $error("phal_fifo: push while full");

endmodule
