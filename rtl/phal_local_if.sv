// phal_local_if: buffered point-to-point link to a neighbouring FPGA.
//
// Two independent FIFOs of DEPTH packet words: packets from the switch wait in
// the transmit buffer until the link accepts them, packets from the link wait
// in the receive buffer until the switch takes them. Both sides use
// valid/ready handshakes with a 'last' flag per word; a word moves when valid
// and ready are both high, one per clock per direction. The 64-byte buffer per
// interface is the original platform's; the link signalling is this design's
// own.
module phal_local_if
  import phal_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  // switch side
  input  logic      sw_tx_valid,   // switch -> link
  input  pkt_word_t sw_tx_word,
  output logic      sw_tx_ready,
  output logic      sw_rx_valid,   // link -> switch
  output pkt_word_t sw_rx_word,
  input  logic      sw_rx_ready,
  // link side
  output logic      lnk_tx_valid,
  output pkt_word_t lnk_tx_word,
  input  logic      lnk_tx_ready,
  input  logic      lnk_rx_valid,
  input  pkt_word_t lnk_rx_word,
  output logic      lnk_rx_ready
);

  localparam int AW = $clog2(DEPTH);
  logic tx_full, tx_empty, rx_full, rx_empty;
  logic [AW:0] tx_cnt, rx_cnt;

  phal_fifo #(.WIDTH($bits(pkt_word_t)), .DEPTH(DEPTH)) u_tx (
    .clk, .rst_n, .push(sw_tx_valid && !tx_full), .din(sw_tx_word),
    .pop(lnk_tx_ready), .dout(lnk_tx_word), .full(tx_full), .empty(tx_empty), .count(tx_cnt));
  assign sw_tx_ready  = !tx_full;
  assign lnk_tx_valid = !tx_empty;

  phal_fifo #(.WIDTH($bits(pkt_word_t)), .DEPTH(DEPTH)) u_rx (
    .clk, .rst_n, .push(lnk_rx_valid && !rx_full), .din(lnk_rx_word),
    .pop(sw_rx_ready), .dout(sw_rx_word), .full(rx_full), .empty(rx_empty), .count(rx_cnt));
  assign lnk_rx_ready = !rx_full;
  assign sw_rx_valid  = !rx_empty;

endmodule
