// phal_node: the P-HAL support logic of one FPGA hosting one algorithm object.
//
// An application is a set of objects exchanging sample streams; each object
// has an identifier and its data travel in packets that nodes route towards
// the destination identifier, on the board or across boards. This node joins
// four interfaces through a four-port packet switch:
//   port 0  object interface : the kernel's sample streams and parameter bus;
//   port 1  IBUS master/slave: shared bus to other boards (next hop = board address);
//   port 2  local interface  : point-to-point link to a neighbouring FPGA;
//   port 3  RAM interface    : packet access to the board SRAM.
// A 16-entry routing table steers packets by destination identifier; packets
// addressed to node_id itself go to the control block, which writes routing
// entries (setting up virtual circuits), synchronises the slot timer and
// configures the object interface. The timing block divides time into slots of
// SLOT_CYCLES clocks; a slot tick also pushes out a partial packet of samples.
// Every interface has a 64-byte buffer (16 words) in each direction and moves
// up to one 32-bit word per clock each way. After reset the routing table is
// empty and all traffic except control packets is discarded until configured.
// The set of blocks, the four-port switch, the 16-entry table and the 64-byte
// buffers follow the original platform; packet formats, the switching
// discipline, the bus and link signalling and the slot length are this
// design's own.
module phal_node
  import phal_pkg::*;
#(
  parameter int BUF_BYTES   = 64,
  parameter int RT_ENTRIES  = 16,
  parameter int SLOT_CYCLES = 1024,
  parameter int SRAM_AW     = 18
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ID_W-1:0]   node_id,
  input  logic [LINK_W-1:0] board_addr,
  // algorithm kernel (the object API)
  input  logic              obj_in_valid,
  input  logic [WORD_W-1:0] obj_in_data,
  output logic              obj_in_ready,
  output logic              obj_out_valid,
  output logic [WORD_W-1:0] obj_out_data,
  input  logic              obj_out_ready,
  output logic              obj_par_we,
  output logic [7:0]        obj_par_addr,
  output logic [23:0]       obj_par_wdata,
  output logic [7:0]        obj_par_raddr,
  input  logic [23:0]       obj_par_rdata,
  // IBUS master
  output logic              ibus_m_req,
  input  logic              ibus_m_gnt,
  output logic              ibus_m_valid,
  output logic [LINK_W-1:0] ibus_m_addr,
  output logic [WORD_W-1:0] ibus_m_data,
  output logic              ibus_m_last,
  input  logic              ibus_m_ready,
  // IBUS slave
  input  logic              ibus_s_valid,
  input  logic [LINK_W-1:0] ibus_s_addr,
  input  logic [WORD_W-1:0] ibus_s_data,
  input  logic              ibus_s_last,
  output logic              ibus_s_ready,
  // local link
  output logic              lnk_tx_valid,
  output pkt_word_t         lnk_tx_word,
  input  logic              lnk_tx_ready,
  input  logic              lnk_rx_valid,
  input  pkt_word_t         lnk_rx_word,
  output logic              lnk_rx_ready,
  // SRAM
  output logic              sram_en,
  output logic              sram_we,
  output logic [SRAM_AW-1:0] sram_addr,
  output logic [WORD_W-1:0] sram_wdata,
  input  logic [WORD_W-1:0] sram_rdata,
  // timing and status
  output logic              slot_tick,
  output logic [31:0]       slot_num,
  output logic [3:0]        drop_evt       // per input port: a packet without route was discarded
);

  localparam int NPORTS = 4;   // object, IBUS, local, RAM
  localparam int DEPTH = BUF_BYTES / (WORD_W / 8);
  localparam int RIW   = $clog2(RT_ENTRIES);

  // Switch connections, indexed by port number.
  logic      [NPORTS-1:0]             in_valid, in_ready, out_valid, out_ready;
  pkt_word_t [NPORTS-1:0]             in_word, out_word;
  logic      [NPORTS-1:0][LINK_W-1:0] out_link;
  logic      [NPORTS-1:0][ID_W-1:0]   lk_id;
  logic      [NPORTS-1:0]             lk_hit;
  logic      [NPORTS-1:0][PORT_W-1:0] lk_port;
  logic      [NPORTS-1:0][LINK_W-1:0] lk_link;

  logic            ctl_valid, ctl_ready;
  pkt_word_t       ctl_word;
  logic            rt_we;
  logic [RIW-1:0]  rt_idx;
  route_entry_t    rt_entry;
  logic            ts_load;
  logic [31:0]     ts_value;
  logic [ID_W-1:0] own_id, dst_id;
  logic [7:0]      pkt_len;

  phal_switch #(.NPORTS(NPORTS)) u_switch (
    .clk, .rst_n, .node_id,
    .in_valid, .in_word, .in_ready,
    .out_valid, .out_word, .out_link, .out_ready,
    .ctl_valid, .ctl_word, .ctl_ready,
    .lk_id, .lk_hit, .lk_port, .lk_link, .drop_evt);

  phal_route_table #(.ENTRIES(RT_ENTRIES), .NLOOK(NPORTS)) u_rt (
    .clk, .rst_n, .wr_en(rt_we), .wr_idx(rt_idx), .wr_entry(rt_entry),
    .lk_id, .lk_hit, .lk_port, .lk_link);

  phal_ctrl #(.RT_ENTRIES(RT_ENTRIES)) u_ctrl (
    .clk, .rst_n, .in_valid(ctl_valid), .in_word(ctl_word), .in_ready(ctl_ready),
    .rt_we, .rt_idx, .rt_entry, .ts_load, .ts_value, .own_id, .dst_id, .pkt_len);

  phal_timing #(.SLOT_CYCLES(SLOT_CYCLES)) u_timing (
    .clk, .rst_n, .load(ts_load), .load_value(ts_value), .slot_tick, .slot_num);

  phal_object_if #(.DEPTH(DEPTH)) u_obj (
    .clk, .rst_n, .own_id, .dst_id, .pkt_len, .slot_tick,
    .smp_in_valid(obj_in_valid), .smp_in_data(obj_in_data), .smp_in_ready(obj_in_ready),
    .smp_out_valid(obj_out_valid), .smp_out_data(obj_out_data), .smp_out_ready(obj_out_ready),
    .par_we(obj_par_we), .par_addr(obj_par_addr), .par_wdata(obj_par_wdata),
    .par_raddr(obj_par_raddr), .par_rdata(obj_par_rdata),
    .net_tx_valid(in_valid[P_OBJ]), .net_tx_word(in_word[P_OBJ]), .net_tx_ready(in_ready[P_OBJ]),
    .net_rx_valid(out_valid[P_OBJ]), .net_rx_word(out_word[P_OBJ]), .net_rx_ready(out_ready[P_OBJ]));

  phal_ibus_if #(.DEPTH(DEPTH)) u_ibus (
    .clk, .rst_n, .board_addr,
    .sw_tx_valid(out_valid[P_IBUS]), .sw_tx_word(out_word[P_IBUS]), .sw_tx_link(out_link[P_IBUS]),
    .sw_tx_ready(out_ready[P_IBUS]),
    .sw_rx_valid(in_valid[P_IBUS]), .sw_rx_word(in_word[P_IBUS]), .sw_rx_ready(in_ready[P_IBUS]),
    .m_req(ibus_m_req), .m_gnt(ibus_m_gnt), .m_valid(ibus_m_valid), .m_addr(ibus_m_addr),
    .m_data(ibus_m_data), .m_last(ibus_m_last), .m_ready(ibus_m_ready),
    .s_valid(ibus_s_valid), .s_addr(ibus_s_addr), .s_data(ibus_s_data), .s_last(ibus_s_last),
    .s_ready(ibus_s_ready));

  phal_local_if #(.DEPTH(DEPTH)) u_local (
    .clk, .rst_n,
    .sw_tx_valid(out_valid[P_LOC]), .sw_tx_word(out_word[P_LOC]), .sw_tx_ready(out_ready[P_LOC]),
    .sw_rx_valid(in_valid[P_LOC]), .sw_rx_word(in_word[P_LOC]), .sw_rx_ready(in_ready[P_LOC]),
    .lnk_tx_valid, .lnk_tx_word, .lnk_tx_ready, .lnk_rx_valid, .lnk_rx_word, .lnk_rx_ready);

  phal_ram_if #(.DEPTH(DEPTH), .AW(SRAM_AW)) u_ram (
    .clk, .rst_n,
    .sw_tx_valid(out_valid[P_RAM]), .sw_tx_word(out_word[P_RAM]), .sw_tx_ready(out_ready[P_RAM]),
    .sw_rx_valid(in_valid[P_RAM]), .sw_rx_word(in_word[P_RAM]), .sw_rx_ready(in_ready[P_RAM]),
    .sram_en, .sram_we, .sram_addr, .sram_wdata, .sram_rdata);

endmodule
