// phal_route_table: packet routing table of a P-HAL node.
//
// ENTRIES entries, each mapping an object identifier to a switch output port
// and, for packets leaving over the inter-board bus, the bus address of the
// next board. NLOOK independent lookups (one per switch input) compare the
// identifier against all valid entries in the same cycle; the lowest matching
// index wins and lk_hit is low when none matches. Entries are written one per
// cycle through wr_*, visible to lookups from the next cycle; reset clears
// every valid bit. The 16-entry size is the original platform's; the
// associative organisation is this design's own.
module phal_route_table
  import phal_pkg::*;
#(
  parameter int ENTRIES = 16,
  parameter int NLOOK   = 4,
  localparam int IW = $clog2(ENTRIES)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    wr_en,
  input  logic [IW-1:0]           wr_idx,
  input  route_entry_t            wr_entry,
  input  logic [NLOOK-1:0][ID_W-1:0]   lk_id,
  output logic [NLOOK-1:0]             lk_hit,
  output logic [NLOOK-1:0][PORT_W-1:0] lk_port,
  output logic [NLOOK-1:0][LINK_W-1:0] lk_link
);

  route_entry_t tbl [ENTRIES];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) tbl[e] <= '0;
    end else if (wr_en) begin
      tbl[wr_idx] <= wr_entry;
    end
  end

  always_comb begin
    for (int l = 0; l < NLOOK; l++) begin
      lk_hit[l]  = 1'b0;
      lk_port[l] = '0;
      lk_link[l] = '0;
      for (int e = ENTRIES-1; e >= 0; e--) begin
        if (tbl[e].valid && tbl[e].obj_id == lk_id[l]) begin
          lk_hit[l]  = 1'b1;
          lk_port[l] = tbl[e].port;
          lk_link[l] = tbl[e].link;
        end
      end
    end
  end

endmodule
