// phal_ibus_if: master/slave interface to the shared inter-board bus (IBUS).
//
// Master side: packets from the switch are stored in a DEPTH-word transmit
// buffer together with the next-hop board address the routing table gave. As
// soon as a word waits, m_req is raised; once the external bus arbiter answers
// with m_gnt, the packet is driven word by word (m_valid, m_addr = target
// board, m_data, m_last), each word moving when the addressed slave returns
// m_ready. Packets that are already waiting when a packet ends follow in the
// same grant, up to BURST_PKTS packets; then m_req falls for at least one
// cycle, so other masters get their turn. Sending all that waited in one
// access is what lets a small buffer ride out a long bus access latency. The
// arbiter must keep m_gnt while m_req is high.
// Slave side: a word with s_addr equal to board_addr is accepted into the
// DEPTH-word receive buffer whenever it has room (s_ready), and the switch
// reads packets from there. Peak rate is one 32-bit word per clock each way.
// The master/slave interface with 64-byte buffering is the original
// platform's; the bus signalling is this design's own.
module phal_ibus_if
  import phal_pkg::*;
#(
  parameter int DEPTH      = 16,
  parameter int BURST_PKTS = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [LINK_W-1:0] board_addr,
  // switch side
  input  logic              sw_tx_valid,
  input  pkt_word_t         sw_tx_word,
  input  logic [LINK_W-1:0] sw_tx_link,
  output logic              sw_tx_ready,
  output logic              sw_rx_valid,
  output pkt_word_t         sw_rx_word,
  input  logic              sw_rx_ready,
  // bus master
  output logic              m_req,
  input  logic              m_gnt,
  output logic              m_valid,
  output logic [LINK_W-1:0] m_addr,
  output logic [WORD_W-1:0] m_data,
  output logic              m_last,
  input  logic              m_ready,
  // bus slave
  input  logic              s_valid,
  input  logic [LINK_W-1:0] s_addr,
  input  logic [WORD_W-1:0] s_data,
  input  logic              s_last,
  output logic              s_ready
);

  localparam int AW = $clog2(DEPTH);

  typedef struct packed {
    logic [LINK_W-1:0] link;
    pkt_word_t         w;
  } tx_ent_t;

  typedef enum logic [1:0] {M_IDLE, M_REQ, M_XFER} m_state_e;
  m_state_e mst;
  logic [$clog2(BURST_PKTS+1)-1:0] n_pkts;   // packets sent in this grant

  tx_ent_t     tx_head;
  logic        tx_full, tx_empty, tx_pop;
  logic        rx_full, rx_empty;
  logic [AW:0] tx_cnt, rx_cnt;

  phal_fifo #(.WIDTH($bits(tx_ent_t)), .DEPTH(DEPTH)) u_tx (
    .clk, .rst_n, .push(sw_tx_valid && !tx_full), .din({sw_tx_link, sw_tx_word}),
    .pop(tx_pop), .dout(tx_head), .full(tx_full), .empty(tx_empty), .count(tx_cnt));
  assign sw_tx_ready = !tx_full;

  assign m_req   = (mst != M_IDLE);
  assign m_valid = (mst == M_XFER) && !tx_empty;
  assign m_addr  = tx_head.link;
  assign m_data  = tx_head.w.data;
  assign m_last  = tx_head.w.last;
  assign tx_pop  = m_valid && m_ready;

  // Another packet may follow in the same grant if its first word is already
  // in the buffer behind the last word leaving now.
  wire more = (tx_cnt > 1) && (int'(n_pkts) + 1 < BURST_PKTS);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mst <= M_IDLE; n_pkts <= '0;
    end else unique case (mst)
      M_IDLE: if (!tx_empty) mst <= M_REQ;
      M_REQ:  if (m_gnt) begin mst <= M_XFER; n_pkts <= '0; end
      M_XFER: if (tx_pop && m_last) begin
        if (more) n_pkts <= n_pkts + 1'b1;
        else      mst    <= M_IDLE;
      end
      default: mst <= M_IDLE;
    endcase
  end

  // Slave: accept words addressed to this board.
  wire s_hit = s_valid && (s_addr == board_addr);
  assign s_ready = s_hit && !rx_full;

  phal_fifo #(.WIDTH($bits(pkt_word_t)), .DEPTH(DEPTH)) u_rx (
    .clk, .rst_n, .push(s_hit && !rx_full), .din({s_last, s_data}),
    .pop(sw_rx_ready), .dout(sw_rx_word), .full(rx_full), .empty(rx_empty), .count(rx_cnt));
  assign sw_rx_valid = !rx_empty;

  a_gnt_held: assert property (@(posedge clk) disable iff (!rst_n)
    (mst == M_XFER) |-> m_gnt) else $error("phal_ibus_if: grant lost during a packet");

endmodule
