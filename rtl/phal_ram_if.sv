// phal_ram_if: packet access to the board's SRAM.
//
// Objects that need bulk storage (a direct digital synthesiser's table, for
// example) reach the SRAM by sending it packets. Command packets from the
// switch wait in a DEPTH-word receive buffer:
//   PK_RAM_WR  payload: start address, then data words written to consecutive
//              addresses, one per clock;
//   PK_RAM_RD  payload: start address, word count N; the interface answers the
//              requester with a PK_RAM_RSP packet of N data words (source id is
//              the identifier the command was addressed to).
// Other kinds are discarded. The SRAM is synchronous with one clock of read
// latency; reads are pipelined at one word per clock and are only issued while
// the DEPTH-word transmit buffer has room for the word in flight. The RAM
// interface and its 64-byte buffer are the original platform's; the command
// format and SRAM timing are this design's own.
module phal_ram_if
  import phal_pkg::*;
#(
  parameter int DEPTH = 16,
  parameter int AW    = 18
) (
  input  logic              clk,
  input  logic              rst_n,
  // switch side
  input  logic              sw_tx_valid,   // switch -> RAM interface
  input  pkt_word_t         sw_tx_word,
  output logic              sw_tx_ready,
  output logic              sw_rx_valid,   // RAM interface -> switch
  output pkt_word_t         sw_rx_word,
  input  logic              sw_rx_ready,
  // SRAM
  output logic              sram_en,
  output logic              sram_we,
  output logic [AW-1:0]     sram_addr,
  output logic [WORD_W-1:0] sram_wdata,
  input  logic [WORD_W-1:0] sram_rdata
);

  localparam int FW = $clog2(DEPTH);

  typedef enum logic [2:0] {C_HDR, C_WADDR, C_WDATA, C_RADDR, C_RCNT, C_RHDR, C_READ, C_SKIP} c_state_e;
  c_state_e cst;

  pkt_word_t   cmd;
  logic        c_full, c_empty, c_pop;
  logic [FW:0] c_cnt;
  pkt_hdr_t    ch;

  pkt_word_t   rsp_in;
  logic        r_push, r_full, r_empty;
  logic [FW:0] r_cnt;

  logic [ID_W-1:0] req_src, req_dst;
  logic [AW-1:0]   addr;
  logic [7:0]      n_issue;   // reads still to issue
  logic [7:0]      n_len;
  logic            more;      // command had words after the count
  logic            rd_v, rd_last;

  phal_fifo #(.WIDTH($bits(pkt_word_t)), .DEPTH(DEPTH)) u_cmd (
    .clk, .rst_n, .push(sw_tx_valid && !c_full), .din(sw_tx_word),
    .pop(c_pop), .dout(cmd), .full(c_full), .empty(c_empty), .count(c_cnt));
  assign sw_tx_ready = !c_full;
  assign ch = pkt_hdr_t'(cmd.data);

  phal_fifo #(.WIDTH($bits(pkt_word_t)), .DEPTH(DEPTH)) u_rsp (
    .clk, .rst_n, .push(r_push), .din(rsp_in),
    .pop(sw_rx_ready), .dout(sw_rx_word), .full(r_full), .empty(r_empty), .count(r_cnt));
  assign sw_rx_valid = !r_empty;

  wire issue = (cst == C_READ) && (n_issue != 0) &&
               ((int'(r_cnt) + int'(rd_v)) < DEPTH);

  assign c_pop = !c_empty && (cst inside {C_HDR, C_WADDR, C_WDATA, C_RADDR, C_RCNT, C_SKIP});

  always_comb begin
    sram_en    = 1'b0;
    sram_we    = 1'b0;
    sram_addr  = addr;
    sram_wdata = cmd.data;
    if (cst == C_WDATA && !c_empty) begin sram_en = 1'b1; sram_we = 1'b1; end
    if (issue) sram_en = 1'b1;
  end

  // Response words: the header, then the data returned by the SRAM.
  always_comb begin
    r_push = 1'b0;
    rsp_in = '0;
    if (cst == C_RHDR && !r_full) begin
      r_push = 1'b1;
      rsp_in = '{last: (n_len == 0), data: mk_hdr(req_src, req_dst, PK_RAM_RSP, n_len)};
    end else if (rd_v) begin
      r_push = 1'b1;
      rsp_in = '{last: rd_last, data: sram_rdata};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cst <= C_HDR; req_src <= '0; req_dst <= '0; addr <= '0;
      n_issue <= '0; n_len <= '0; more <= 1'b0; rd_v <= 1'b0; rd_last <= 1'b0;
    end else begin
      rd_v    <= issue;
      rd_last <= issue && (n_issue == 8'd1);
      if (issue) begin
        addr    <= addr + 1'b1;
        n_issue <= n_issue - 1'b1;
      end
      unique case (cst)
        C_HDR: if (c_pop) begin
          req_src <= ch.src; req_dst <= ch.dst;
          if (!cmd.last)
            cst <= (ch.kind == PK_RAM_WR) ? C_WADDR :
                   (ch.kind == PK_RAM_RD) ? C_RADDR : C_SKIP;
        end
        C_WADDR: if (c_pop) begin
          addr <= AW'(cmd.data);
          cst  <= cmd.last ? C_HDR : C_WDATA;
        end
        C_WDATA: if (c_pop) begin
          addr <= addr + 1'b1;
          if (cmd.last) cst <= C_HDR;
        end
        C_RADDR: if (c_pop) begin
          addr <= AW'(cmd.data);
          cst  <= cmd.last ? C_HDR : C_RCNT;
        end
        C_RCNT: if (c_pop) begin
          n_len   <= cmd.data[7:0];
          n_issue <= cmd.data[7:0];
          more    <= !cmd.last;
          cst     <= C_RHDR;
        end
        C_RHDR: if (r_push) cst <= (n_len == 0) ? (more ? C_SKIP : C_HDR) : C_READ;
        C_READ: if (n_issue == 0 && !rd_v) cst <= more ? C_SKIP : C_HDR;
        C_SKIP: if (c_pop && cmd.last) cst <= C_HDR;
        default: cst <= C_HDR;
      endcase
    end
  end

endmodule
