// phal_object_if: the interface between an algorithm kernel and the P-HAL node.
//
// The kernel sees only sample streams and a parameter bus; everything about
// packets, identifiers and routing stays here. Transmit: samples from the
// kernel (smp_in_*) wait in a DEPTH-word buffer. A data packet to dst_id is
// sent when pkt_len samples wait, or at a slot tick if any wait (such a tick is
// remembered until a packet starts), so data leave at least once per slot.
// Receive: packets from the switch wait in a DEPTH-word buffer and are taken
// apart by kind: PK_DATA payload is delivered as samples (smp_out_*);
// PK_PARAM_WR payload words {addr, value} become par_we strobes (monitoring
// and control: modify a parameter); PK_PARAM_RD asks for the parameter at
// {addr}: the value on par_rdata for par_raddr goes back in a one-word
// PK_PARAM_RSP packet to the requester (monitoring: observe a parameter).
// Replies are sent between data packets. All streams use valid/ready; one
// word moves per clock. The object interface and its 64-byte buffer are the
// original platform's; the packet rules above are this design's own.
module phal_object_if
  import phal_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration
  input  logic [ID_W-1:0]   own_id,
  input  logic [ID_W-1:0]   dst_id,
  input  logic [7:0]        pkt_len,
  input  logic              slot_tick,
  // kernel sample streams
  input  logic              smp_in_valid,
  input  logic [WORD_W-1:0] smp_in_data,
  output logic              smp_in_ready,
  output logic              smp_out_valid,
  output logic [WORD_W-1:0] smp_out_data,
  input  logic              smp_out_ready,
  // kernel parameter bus
  output logic              par_we,
  output logic [7:0]        par_addr,
  output logic [23:0]       par_wdata,
  output logic [7:0]        par_raddr,
  input  logic [23:0]       par_rdata,
  // switch side
  output logic              net_tx_valid,
  output pkt_word_t         net_tx_word,
  input  logic              net_tx_ready,
  input  logic              net_rx_valid,
  input  pkt_word_t         net_rx_word,
  output logic              net_rx_ready
);

  localparam int AW = $clog2(DEPTH);

  // ---------------- receive ----------------
  typedef enum logic [2:0] {R_HDR, R_DATA, R_PWR, R_PRD, R_SKIP} r_state_e;
  r_state_e    rst_q;
  pkt_word_t   rx_head;
  logic        rx_full, rx_empty, rx_pop;
  logic [AW:0] rx_cnt;
  pkt_hdr_t    rh;
  logic [ID_W-1:0] rx_src;

  logic            rsp_pend;
  logic [ID_W-1:0] rsp_dst;
  logic [7:0]      rsp_addr;

  phal_fifo #(.WIDTH($bits(pkt_word_t)), .DEPTH(DEPTH)) u_rx (
    .clk, .rst_n, .push(net_rx_valid && !rx_full), .din(net_rx_word),
    .pop(rx_pop), .dout(rx_head), .full(rx_full), .empty(rx_empty), .count(rx_cnt));
  assign net_rx_ready = !rx_full;
  assign rh = pkt_hdr_t'(rx_head.data);

  assign smp_out_valid = (rst_q == R_DATA) && !rx_empty;
  assign smp_out_data  = rx_head.data;
  assign par_we        = (rst_q == R_PWR) && !rx_empty;
  assign par_addr      = rx_head.data[31:24];
  assign par_wdata     = rx_head.data[23:0];

  logic rsp_take;   // a read request word is taken this cycle
  logic rsp_done;   // the reply left this cycle
  assign rsp_take = (rst_q == R_PRD) && !rx_empty && !rsp_pend;

  always_comb begin
    unique case (rst_q)
      R_HDR:   rx_pop = !rx_empty;
      R_DATA:  rx_pop = smp_out_valid && smp_out_ready;
      R_PWR:   rx_pop = !rx_empty;
      R_PRD:   rx_pop = rsp_take;
      default: rx_pop = !rx_empty;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rst_q <= R_HDR; rx_src <= '0;
    end else if (rx_pop) begin
      if (rst_q == R_HDR) begin
        rx_src <= rh.src;
        if (!rx_head.last) begin
          unique case (rh.kind)
            PK_DATA:     rst_q <= R_DATA;
            PK_PARAM_WR: rst_q <= R_PWR;
            PK_PARAM_RD: rst_q <= R_PRD;
            default:     rst_q <= R_SKIP;
          endcase
        end
      end else if (rx_head.last) begin
        rst_q <= R_HDR;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rsp_pend <= 1'b0; rsp_dst <= '0; rsp_addr <= '0;
    end else if (rsp_take) begin
      rsp_pend <= 1'b1; rsp_dst <= rx_src; rsp_addr <= rx_head.data[31:24];
    end else if (rsp_done) begin
      rsp_pend <= 1'b0;
    end
  end
  assign par_raddr = rsp_addr;

  // ---------------- transmit ----------------
  typedef enum logic [2:0] {T_IDLE, T_HDR, T_DATA, T_RHDR, T_RDATA} t_state_e;
  t_state_e    tst;
  logic [WORD_W-1:0] tx_head;
  logic        tx_full, tx_empty, tx_pop;
  logic [AW:0] tx_cnt;
  logic [7:0]  eff_len, cur_len, remain;
  logic        flush_req;
  logic        start_data;

  phal_fifo #(.WIDTH(WORD_W), .DEPTH(DEPTH)) u_tx (
    .clk, .rst_n, .push(smp_in_valid && !tx_full), .din(smp_in_data),
    .pop(tx_pop), .dout(tx_head), .full(tx_full), .empty(tx_empty), .count(tx_cnt));
  assign smp_in_ready = !tx_full;

  assign eff_len = (pkt_len == 0) ? 8'd1 : pkt_len;
  always_comb begin
    start_data = 1'b0;
    if (tst == T_IDLE && !rsp_pend && tx_cnt != 0)
      start_data = (8'(tx_cnt) >= eff_len) || flush_req || slot_tick;
  end

  always_comb begin
    net_tx_valid = 1'b0;
    net_tx_word  = '0;
    unique case (tst)
      T_HDR:   begin net_tx_valid = 1'b1;
                     net_tx_word  = '{last: 1'b0, data: mk_hdr(dst_id, own_id, PK_DATA, cur_len)}; end
      T_DATA:  begin net_tx_valid = !tx_empty;
                     net_tx_word  = '{last: (remain == 8'd1), data: tx_head}; end
      T_RHDR:  begin net_tx_valid = 1'b1;
                     net_tx_word  = '{last: 1'b0, data: mk_hdr(rsp_dst, own_id, PK_PARAM_RSP, 8'd1)}; end
      T_RDATA: begin net_tx_valid = 1'b1;
                     net_tx_word  = '{last: 1'b1, data: {rsp_addr, par_rdata}}; end
      default: ;
    endcase
  end
  assign tx_pop   = (tst == T_DATA) && net_tx_valid && net_tx_ready;
  assign rsp_done = (tst == T_RDATA) && net_tx_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tst <= T_IDLE; cur_len <= '0; remain <= '0; flush_req <= 1'b0;
    end else begin
      if (start_data)     flush_req <= 1'b0;
      else if (slot_tick && tx_cnt != 0) flush_req <= 1'b1;
      unique case (tst)
        T_IDLE: begin
          if (rsp_pend) tst <= T_RHDR;
          else if (start_data) begin
            cur_len <= (8'(tx_cnt) >= eff_len) ? eff_len : 8'(tx_cnt);
            tst     <= T_HDR;
          end
        end
        T_HDR: if (net_tx_ready) begin remain <= cur_len; tst <= T_DATA; end
        T_DATA: if (tx_pop) begin
          remain <= remain - 1'b1;
          if (remain == 8'd1) tst <= T_IDLE;
        end
        T_RHDR:  if (net_tx_ready) tst <= T_RDATA;
        T_RDATA: if (net_tx_ready) tst <= T_IDLE;
        default: tst <= T_IDLE;
      endcase
    end
  end

endmodule
