// phal_ctrl: control block of a P-HAL node.
//
// Receives, from the switch's control output, every packet addressed to the
// node's own identifier and carries it out, so a node is configured remotely
// over the same network that carries signal data:
//   PK_ROUTE_CFG  each payload word (route_cfg_t) writes one routing entry,
//                 which is how the virtual circuits of an application are set up;
//   PK_TIME_SYNC  the first payload word is loaded as the current slot number;
//   PK_OBJ_CFG    the payload word (obj_cfg_t) sets the object interface's own
//                 identifier, destination identifier and packet length.
// Other kinds are read and ignored. The block is always ready, so it accepts one
// word per clock; its outputs are registered and act one cycle after the word.
// The command set and encodings are this design's own.
module phal_ctrl
  import phal_pkg::*;
#(
  parameter int RT_ENTRIES  = 16,
  parameter int PKT_LEN_RST = 8,
  localparam int IW = $clog2(RT_ENTRIES)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  pkt_word_t       in_word,
  output logic            in_ready,
  output logic            rt_we,
  output logic [IW-1:0]   rt_idx,
  output route_entry_t    rt_entry,
  output logic            ts_load,
  output logic [31:0]     ts_value,
  output logic [ID_W-1:0] own_id,
  output logic [ID_W-1:0] dst_id,
  output logic [7:0]      pkt_len
);

  logic      in_pay;      // next word is payload
  pkt_kind_e kind;
  logic      first_pay;   // payload word is the first of its packet

  route_cfg_t rc;
  obj_cfg_t   oc;
  pkt_hdr_t   h;
  assign rc = route_cfg_t'(in_word.data);
  assign oc = obj_cfg_t'(in_word.data);
  assign h  = pkt_hdr_t'(in_word.data);

  assign in_ready = 1'b1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_pay <= 1'b0; kind <= PK_DATA; first_pay <= 1'b0;
      rt_we <= 1'b0; rt_idx <= '0; rt_entry <= '0;
      ts_load <= 1'b0; ts_value <= '0;
      own_id <= '0; dst_id <= '0; pkt_len <= 8'(PKT_LEN_RST);
    end else begin
      rt_we   <= 1'b0;
      ts_load <= 1'b0;
      if (in_valid) begin
        if (!in_pay) begin
          kind      <= h.kind;
          in_pay    <= !in_word.last;
          first_pay <= 1'b1;
        end else begin
          first_pay <= 1'b0;
          if (in_word.last) in_pay <= 1'b0;
          unique case (kind)
            PK_ROUTE_CFG: begin
              rt_we    <= 1'b1;
              rt_idx   <= IW'(rc.idx);
              rt_entry <= '{valid: rc.valid, obj_id: rc.obj_id, port: rc.port, link: rc.link};
            end
            PK_TIME_SYNC: if (first_pay) begin
              ts_load  <= 1'b1;
              ts_value <= in_word.data;
            end
            PK_OBJ_CFG: if (first_pay) begin
              own_id  <= oc.own_id;
              dst_id  <= oc.dst_id;
              pkt_len <= oc.pkt_len;
            end
            default: ;
          endcase
        end
      end
    end
  end

endmodule
