// aging_monitor: the monitoring system embedded in one router.
//
// It holds the flit counter (fl: flits that entered through any of the five
// input ports) and the residence-time counter (rs: summed residence time of
// the flits that left through any of the five output ports). When the
// central timer signals the end of an epsilon, both counters restart and
// their final values are packed, together with the router's id, into one
// 128-bit report flit addressed to the core that holds the aging table.
//
// Interface: per-port V/R of the input side; per-port exit-valid and
// en-queue time stamp of the output side; the current time stamp and the
// epsilon pulse from the timer; a report flit with a valid/ack handshake.
// The report stays valid until it is acknowledged (ack and valid high in the
// same cycle). If the next epsilon ends before that, the older report is
// replaced by the newer one.
//
// Follows the original scheme: the two counters, their widths, the reset each
// epsilon, and the 26 bits of (fl, rs) travelling in one 128-bit flit. Own
// choices: the report layout (see noc_aging_pkg) and the valid/ack handshake.
//
// Timing: the report becomes valid the cycle after the epsilon pulse and
// includes the flits of the pulse cycle itself.
module aging_monitor
  import noc_aging_pkg::*;
#(
  parameter int unsigned ROUTER_ID = 0
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         eps,        // end of epsilon (timer pulse)
  input  logic [TS_W-1:0]              now_t,      // current time stamp
  input  logic [NUM_PORTS-1:0]         in_valid,
  input  logic [NUM_PORTS-1:0]         in_ready,
  input  logic [NUM_PORTS-1:0]         ex_valid,
  input  logic [NUM_PORTS-1:0][TS_W-1:0] eq_t,
  output logic [FL_W-1:0]              fl,         // running counts, for observation
  output logic [RS_W-1:0]              rs,
  output report_flit_t                 report,
  output logic                         report_valid,
  input  logic                         report_ack
);

  logic [FL_W-1:0] fl_total;
  logic [RS_W-1:0] rs_total;
  logic [NUM_PORTS-1:0][RES_W-1:0] res;

  flit_counter #(.NPORTS(NUM_PORTS), .W(FL_W)) u_fl (
    .clk, .rst_n, .clear(eps),
    .in_valid, .in_ready,
    .fl, .fl_total
  );

  rs_counter #(.NPORTS(NUM_PORTS), .W(RS_W), .TW(TS_W), .RW(RES_W)) u_rs (
    .clk, .rst_n, .clear(eps),
    .ex_valid, .ex_t(now_t), .eq_t,
    .res, .rs, .rs_total
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      report       <= '0;
      report_valid <= 1'b0;
    end else if (eps) begin
      report.pad       <= '0;
      report.router_id <= ID_W'(ROUTER_ID);
      report.fl        <= fl_total;
      report.rs        <= rs_total;
      report_valid     <= 1'b1;
    end else if (report_ack) begin
      report_valid     <= 1'b0;
    end
  end

  // An acknowledge only answers a pending report.
  a_ack_needs_valid: assert property (@(posedge clk) disable iff (!rst_n)
    report_ack |-> report_valid);

endmodule
