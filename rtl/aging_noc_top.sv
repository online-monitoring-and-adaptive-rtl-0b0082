// aging_noc_top: online aging monitoring and aging-aware routing for a 4x4
// mesh network-on-chip.
//
// Every router r0..r15 carries an aging monitor that counts the flits
// entering it (fl) and sums their residence times (rs) over each epsilon of
// EPS_CYCLES cycles. A central timer, in the middle core 5, paces all
// monitors and supplies the time stamp that flits carry. At the end of each
// epsilon each monitor sends a report flit with its (fl, rs) pair; core 5
// looks the pair up in the Centralized Aging Table (CAT) and adds the
// returned delay degradation to the router's age tag. At the end of each
// period P (N_EPS epsilons), once the ages include the last epsilon, the
// route selector recomputes the path of every source-destination pair,
// avoiding the most aged router and minimising the summed age on the path,
// and writes the paths into the routing table of each source router.
//
// The routers themselves (buffers, allocators, crossbar) are outside this
// block: their per-port handshakes and time stamps come in as ports, and
// the routing tables' lookups go out as ports. Report flits reach core 5 over
// direct wires here instead of through the network.
//
// Interface: router-side monitor inputs per router and port; the time stamp
// and epsilon/period pulses; a write port to load the CAT; the ages; one
// routing-table lookup (injection) and one forwarding decode per router.
//
// Timing: reports are absorbed within 3 cycles per router after each
// epsilon (48 cycles); a routing update takes 2,785 more cycles.
module aging_noc_top
  import noc_aging_pkg::*;
#(
  parameter int unsigned     EPS_CYCLES = 10_000,
  parameter longint unsigned N_EPS      = 64'd60_480_000_000,
  parameter int unsigned     RS_STEPS   = 8,
  parameter int unsigned     FL_STEPS   = 8,
  parameter int              DD_W       = 16,
  parameter int              AGE_W      = 64,
  localparam int             CAT_AW     = $clog2((RS_STEPS + 1) * (FL_STEPS + 1))
) (
  input  logic                                       clk,
  input  logic                                       rst_n,
  // router side of the monitors
  input  logic [NUM_ROUTERS-1:0][NUM_PORTS-1:0]      in_valid,
  input  logic [NUM_ROUTERS-1:0][NUM_PORTS-1:0]      in_ready,
  input  logic [NUM_ROUTERS-1:0][NUM_PORTS-1:0]      ex_valid,
  input  logic [NUM_ROUTERS-1:0][NUM_PORTS-1:0][TS_W-1:0] eq_t,
  output logic [TS_W-1:0]                            now_t,
  output logic                                       eps,
  output logic                                       p_end,
  // aging table load
  input  logic                                       cat_wr_en,
  input  logic [CAT_AW-1:0]                          cat_wr_addr,
  input  logic signed [DD_W-1:0]                     cat_wr_data,
  // age tags and status
  output logic [NUM_ROUTERS-1:0][AGE_W-1:0]          age,
  output logic                                       ages_updated,
  output logic                                       routes_updated,
  output logic                                       route_busy,
  output logic [ID_W-1:0]                            max_aged,
  // running monitor counts, for observation
  output logic [NUM_ROUTERS-1:0][FL_W-1:0]           fl,
  output logic [NUM_ROUTERS-1:0][RS_W-1:0]           rs,
  // routing tables: injection lookup and in-transit decode per router
  input  logic [NUM_ROUTERS-1:0][ID_W-1:0]           rt_dst,
  output logic [NUM_ROUTERS-1:0][MAX_HOPS-1:0]       rt_path,
  output port_e [NUM_ROUTERS-1:0]                    rt_port,
  input  logic [NUM_ROUTERS-1:0][ID_W-1:0]           fw_dst,
  input  logic [NUM_ROUTERS-1:0][MAX_HOPS-1:0]       fw_path,
  input  logic [NUM_ROUTERS-1:0][$clog2(MAX_HOPS+1)-1:0] fw_hop,
  output port_e [NUM_ROUTERS-1:0]                    fw_port
);

  logic [63:0] eps_count;

  eps_timer #(.EPS_CYCLES(EPS_CYCLES), .N_EPS(N_EPS), .TW(TS_W)) u_timer (
    .clk, .rst_n, .now_t, .eps, .p_end, .eps_count
  );

  // Monitors, one per router.
  report_flit_t [NUM_ROUTERS-1:0] report;
  logic         [NUM_ROUTERS-1:0] report_valid, report_ack;

  for (genvar r = 0; r < NUM_ROUTERS; r++) begin : g_mon
    aging_monitor #(.ROUTER_ID(r)) u_mon (
      .clk, .rst_n, .eps, .now_t,
      .in_valid(in_valid[r]), .in_ready(in_ready[r]),
      .ex_valid(ex_valid[r]), .eq_t(eq_t[r]),
      .fl(fl[r]), .rs(rs[r]),
      .report(report[r]), .report_valid(report_valid[r]), .report_ack(report_ack[r])
    );
  end

  // Core 5: aging table and age tags.
  logic                   cat_lookup, cat_dd_valid;
  logic [RS_W-1:0]        cat_rs;
  logic [FL_W-1:0]        cat_fl;
  logic signed [DD_W-1:0] cat_dd;
  logic [CAT_AW-1:0]      cat_index;
  logic                   tracker_busy;

  cat_table #(.RS_MAX(EPS_CYCLES), .FL_MAX(2_300), .RS_STEPS(RS_STEPS),
              .FL_STEPS(FL_STEPS), .DD_W(DD_W)) u_cat (
    .clk, .rst_n,
    .wr_en(cat_wr_en), .wr_addr(cat_wr_addr), .wr_data(cat_wr_data),
    .lookup(cat_lookup), .rs(cat_rs), .fl(cat_fl),
    .index(cat_index), .dd(cat_dd), .dd_valid(cat_dd_valid)
  );

  age_tracker #(.N(NUM_ROUTERS), .DD_W(DD_W), .AGE_W(AGE_W)) u_ages (
    .clk, .rst_n,
    .report, .report_valid, .report_ack,
    .cat_lookup, .cat_rs, .cat_fl, .cat_dd, .cat_dd_valid,
    .age, .round_done(ages_updated), .busy(tracker_busy)
  );

  // Period end: rebuild the routes once the closing epsilon's ages are in.
  logic p_pending, sel_start;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          p_pending <= 1'b0;
    else if (p_end)      p_pending <= 1'b1;
    else if (sel_start)  p_pending <= 1'b0;
  end
  assign sel_start = p_pending && ages_updated && !route_busy;

  logic                wr_en;
  logic [ID_W-1:0]     wr_src, wr_dst;
  logic [MAX_HOPS-1:0] wr_path;

  route_selector #(.AGE_W(AGE_W)) u_sel (
    .clk, .rst_n, .start(sel_start), .age,
    .wr_en, .wr_src, .wr_dst, .wr_path,
    .max_id(max_aged), .busy(route_busy), .done(routes_updated)
  );

  for (genvar r = 0; r < NUM_ROUTERS; r++) begin : g_rt
    routing_table #(.SRC_ID(r)) u_rt (
      .clk, .rst_n,
      .wr_en(wr_en && wr_src == ID_W'(r)), .wr_dst, .wr_path,
      .rd_dst(rt_dst[r]), .rd_path(rt_path[r]), .rd_port(rt_port[r]),
      .fw_dst(fw_dst[r]), .fw_path(fw_path[r]), .fw_hop(fw_hop[r]),
      .next_port(fw_port[r])
    );
  end

endmodule
