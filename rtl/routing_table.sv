// routing_table: the routing table of one router (source routing by path).
//
// For every destination the table holds the path chosen for flits that
// this router injects: a mask with one bit per hop (1 = X hop, 0 = Y hop,
// hop 0 in bit 0); the directions follow from where the destination lies,
// so every stored path is a shortest path. The route selector rewrites
// entries once per period P. After reset every entry holds the XY path (all
// X hops first), used until the first period ends.
//
// A lookup names a destination and gives its path and the output port of
// the first hop from this router. 'next_port' also decodes, for a flit in
// transit here that carries its destination, its path mask and the index of
// its next hop, the output port to take, so that the routers along the path
// forward it as chosen at the source.
//
// Follows the original scheme: a routing table in each router, updated at each
// period with the aging-aware shortest path of every pair. Own choices: the
// path-mask encoding, source routing, and the XY contents after reset.
//
// Timing: writes take effect at the next clock edge; lookups are
// combinational.
module routing_table
  import noc_aging_pkg::*;
#(
  parameter int unsigned SRC_ID = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  // update from the route selector
  input  logic                wr_en,
  input  logic [ID_W-1:0]     wr_dst,
  input  logic [MAX_HOPS-1:0] wr_path,
  // lookup at injection
  input  logic [ID_W-1:0]     rd_dst,
  output logic [MAX_HOPS-1:0] rd_path,
  output port_e               rd_port,
  // forwarding decode for a flit in transit at this router
  input  logic [ID_W-1:0]     fw_dst,
  input  logic [MAX_HOPS-1:0] fw_path,
  input  logic [$clog2(MAX_HOPS+1)-1:0] fw_hop,
  output port_e               next_port
);

  logic [NUM_ROUTERS-1:0][MAX_HOPS-1:0] path;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < NUM_ROUTERS; d++)
        path[d] <= xy_path(SRC_ID, d);
    end else if (wr_en) begin
      path[wr_dst] <= wr_path;
    end
  end

  always_comb begin
    rd_path   = path[rd_dst];
    rd_port   = hop_port(SRC_ID, 32'(rd_dst), rd_path[0]);
    next_port = hop_port(SRC_ID, 32'(fw_dst),
                         (int'(fw_hop) < MAX_HOPS) ? fw_path[fw_hop] : 1'b0);
  end

endmodule
