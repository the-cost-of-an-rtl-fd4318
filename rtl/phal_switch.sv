// phal_switch: packet switch joining the interfaces of a P-HAL node.
//
// Each of the NPORTS inputs delivers packets from an interface's receive
// buffer. When a header reaches the head of an input, the switch looks its
// destination up: a packet for the node's own identifier goes to the control
// output, a packet with a routing entry goes to that entry's port (with the
// entry's next-hop link address on out_link), and a packet with no entry, or
// an entry naming no port, is read out and discarded (drop_evt[input] pulses once).
// Every output has a round-robin arbiter; the winning input holds the output
// from header to last word (wormhole switching) and its words pass through
// combinationally, one word per clock, so each port can move 4 bytes per clock
// in each direction. A header waits one cycle for routing and one for
// arbitration. The switch has no buffer of its own: the interfaces' buffers
// absorb waiting. The four-port, bidirectional switch is the original
// platform's; the switching discipline is this design's own.
module phal_switch
  import phal_pkg::*;
#(
  parameter int NPORTS = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [ID_W-1:0]               node_id,
  // from the interfaces
  input  logic      [NPORTS-1:0]        in_valid,
  input  pkt_word_t [NPORTS-1:0]        in_word,
  output logic      [NPORTS-1:0]        in_ready,
  // to the interfaces
  output logic      [NPORTS-1:0]        out_valid,
  output pkt_word_t [NPORTS-1:0]        out_word,
  output logic [NPORTS-1:0][LINK_W-1:0] out_link,
  input  logic      [NPORTS-1:0]        out_ready,
  // to the control block
  output logic                          ctl_valid,
  output pkt_word_t                     ctl_word,
  input  logic                          ctl_ready,
  // routing table lookups, one per input
  output logic [NPORTS-1:0][ID_W-1:0]   lk_id,
  input  logic [NPORTS-1:0]             lk_hit,
  input  logic [NPORTS-1:0][PORT_W-1:0] lk_port,
  input  logic [NPORTS-1:0][LINK_W-1:0] lk_link,
  output logic [NPORTS-1:0]             drop_evt
);

  localparam int NOUT = NPORTS + 1;          // the last output is control
  localparam int OW   = $clog2(NOUT);
  localparam int IW   = (NPORTS > 1) ? $clog2(NPORTS) : 1;

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_DROP} in_state_e;

  in_state_e              st   [NPORTS];
  logic [OW-1:0]          tgt  [NPORTS];
  logic [LINK_W-1:0]      tlink[NPORTS];

  logic [NOUT-1:0]        busy;
  logic [IW-1:0]          owner[NOUT];
  logic [LINK_W-1:0]      olink[NOUT];

  logic [NOUT-1:0][NPORTS-1:0] req, gnt;
  logic [NOUT-1:0]        o_ready;
  logic [NPORTS-1:0]      conn;
  logic [NPORTS-1:0]      fire;

  assign o_ready = {ctl_ready, out_ready};

  for (genvar i = 0; i < NPORTS; i++) begin : g_lk
    pkt_hdr_t h;
    assign h        = pkt_hdr_t'(in_word[i].data);
    assign lk_id[i] = h.dst;
  end

  // Which input is connected to its target output, and input handshakes.
  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      conn[i]     = (st[i] == S_WAIT) && busy[tgt[i]] && (owner[tgt[i]] == IW'(i));
      in_ready[i] = (st[i] == S_DROP) || (conn[i] && o_ready[tgt[i]]);
      fire[i]     = in_valid[i] && in_ready[i];
    end
  end

  // Requests to each output's arbiter.
  always_comb begin
    for (int o = 0; o < NOUT; o++)
      for (int i = 0; i < NPORTS; i++)
        req[o][i] = (st[i] == S_WAIT) && (tgt[i] == OW'(o)) && !busy[o];
  end

  for (genvar o = 0; o < NOUT; o++) begin : g_arb
    rr_arbiter #(.N(NPORTS)) u_arb (
      .clk, .rst_n, .req(req[o]), .advance(|req[o]), .gnt(gnt[o])
    );
  end

  // Output side: words of the owning input.
  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      out_valid[o] = busy[o] && in_valid[owner[o]];
      out_word[o]  = in_word[owner[o]];
      out_link[o]  = olink[o];
    end
    ctl_valid = busy[NPORTS] && in_valid[owner[NPORTS]];
    ctl_word  = in_word[owner[NPORTS]];
  end

  // Input state machines.
  logic [NPORTS-1:0] drop_now;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NPORTS; i++) begin
        st[i] <= S_IDLE; tgt[i] <= '0; tlink[i] <= '0;
      end
    end else begin
      for (int i = 0; i < NPORTS; i++) begin
        unique case (st[i])
          S_IDLE: if (in_valid[i]) begin
            if (lk_id[i] == node_id) begin
              st[i] <= S_WAIT; tgt[i] <= OW'(NPORTS); tlink[i] <= '0;
            end else if (lk_hit[i] && (int'(lk_port[i]) < NPORTS)) begin
              st[i] <= S_WAIT; tgt[i] <= OW'(lk_port[i]); tlink[i] <= lk_link[i];
            end else begin
              st[i] <= S_DROP;
            end
          end
          S_WAIT: if (fire[i] && in_word[i].last) st[i] <= S_IDLE;
          S_DROP: if (fire[i] && in_word[i].last) st[i] <= S_IDLE;
          default: st[i] <= S_IDLE;
        endcase
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NPORTS; i++)
      drop_now[i] = (st[i] == S_IDLE) && in_valid[i] && (lk_id[i] != node_id) &&
                    !(lk_hit[i] && (int'(lk_port[i]) < NPORTS));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) drop_evt <= '0;
    else        drop_evt <= drop_now;
  end

  // Output ownership: granted on arbitration, released after the last word.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= '0;
      for (int o = 0; o < NOUT; o++) begin owner[o] <= '0; olink[o] <= '0; end
    end else begin
      for (int o = 0; o < NOUT; o++) begin
        if (!busy[o]) begin
          for (int i = 0; i < NPORTS; i++) begin
            if (gnt[o][i] && req[o][i]) begin
              busy[o]  <= 1'b1;
              owner[o] <= IW'(i);
              olink[o] <= tlink[i];
            end
          end
        end else if (fire[owner[o]] && in_word[owner[o]].last) begin
          busy[o] <= 1'b0;
        end
      end
    end
  end

  // An input only ever drives the output it owns.
  for (genvar o = 0; o < NOUT; o++) begin : g_chk
    a_owner_waits: assert property (@(posedge clk) disable iff (!rst_n)
      busy[o] |-> (st[owner[o]] == S_WAIT && tgt[owner[o]] == OW'(o)));
  end

endmodule
