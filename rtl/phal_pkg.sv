// phal_pkg: shared types and constants of the P-HAL node.
//
// Everything that moves between the interfaces of a node is a packet of
// 32-bit words. The first word is a header naming the destination and source
// object identifiers (8 bits each, assigned like network addresses), the
// packet kind and the number of payload words that follow. Every word travels
// with a 'last' flag, so switches and links can find packet ends without
// counting. The 32-bit word width follows the interfaces of the original
// platform; the header layout, the kinds and the control word layouts are
// this design's own.
package phal_pkg;

  localparam int WORD_W = 32;
  localparam int ID_W   = 8;
  localparam int LINK_W = 4;   // next-hop board address on the inter-board bus
  localparam int PORT_W = 4;   // switch port number in a routing entry

  typedef enum logic [3:0] {
    PK_DATA      = 4'd0,  // signal samples for an object
    PK_PARAM_WR  = 4'd1,  // payload: {addr[31:24], value[23:0]} per word
    PK_PARAM_RD  = 4'd2,  // payload: {addr[31:24], 24'x}, one word
    PK_PARAM_RSP = 4'd3,  // payload: {addr[31:24], value[23:0]}
    PK_ROUTE_CFG = 4'd4,  // payload: route_cfg_t per word (to a node)
    PK_TIME_SYNC = 4'd5,  // payload: slot number (to a node)
    PK_OBJ_CFG   = 4'd6,  // payload: obj_cfg_t (to a node)
    PK_RAM_WR    = 4'd7,  // payload: address, then data words
    PK_RAM_RD    = 4'd8,  // payload: address, word count
    PK_RAM_RSP   = 4'd9   // payload: data words read
  } pkt_kind_e;

  typedef struct packed {
    logic [ID_W-1:0] dst;
    logic [ID_W-1:0] src;
    pkt_kind_e       kind;
    logic [3:0]      rsvd;
    logic [7:0]      len;   // payload words after the header
  } pkt_hdr_t;

  // A word on any packet stream.
  typedef struct packed {
    logic              last;
    logic [WORD_W-1:0] data;
  } pkt_word_t;

  localparam int PW_W = $bits(pkt_word_t);

  // One routing-table entry.
  typedef struct packed {
    logic              valid;
    logic [ID_W-1:0]   obj_id;
    logic [PORT_W-1:0] port;
    logic [LINK_W-1:0] link;
  } route_entry_t;

  // Payload word of a PK_ROUTE_CFG packet.
  typedef struct packed {
    logic              valid;
    logic [2:0]        rsvd0;
    logic [3:0]        idx;
    logic [LINK_W-1:0] link;
    logic [PORT_W-1:0] port;
    logic [ID_W-1:0]   obj_id;
    logic [7:0]        rsvd1;
  } route_cfg_t;

  // Payload word of a PK_OBJ_CFG packet.
  typedef struct packed {
    logic [7:0]      pkt_len;
    logic [ID_W-1:0] dst_id;
    logic [ID_W-1:0] own_id;
    logic [7:0]      rsvd;
  } obj_cfg_t;

  // Switch port numbers of the four interfaces.
  localparam int P_OBJ  = 0;
  localparam int P_IBUS = 1;
  localparam int P_LOC  = 2;
  localparam int P_RAM  = 3;

  function automatic logic [WORD_W-1:0] mk_hdr(logic [ID_W-1:0] dst, logic [ID_W-1:0] src,
                                               pkt_kind_e kind, logic [7:0] len);
    pkt_hdr_t h;
    h.dst = dst; h.src = src; h.kind = kind; h.rsvd = '0; h.len = len;
    return h;
  endfunction

endpackage
