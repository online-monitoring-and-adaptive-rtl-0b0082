// rs_counter: the "rs" counter of a router's aging monitor.
//
// When a flit leaves the router through one of the five output ports, its
// residence time is the exit time (the current time stamp) minus the
// en-queue time that was written into the flit when it entered an input
// buffer. Time stamps count cycles inside the current epsilon, so a flit that
// entered before an epsilon boundary and leaves after it gives a negative
// difference; a multiplexer drops such a difference (selects 0). The
// remaining per-port residence times, 4 bits each, are summed by a parallel
// adder and accumulated, so the count is the total residence time of all
// flits that left in the current epsilon. 'clear' (the epsilon pulse)
// restarts it from zero; 'rs_total' includes this cycle's flits.
//
// Follows the original scheme: one 14-bit subtractor per output port, a 4-bit
// mux that drops negative results, a parallel counter with a 14-bit result,
// reset every epsilon. Own choices: an exit-valid bit per port marks a flit
// leaving (the original scheme shows only the two time stamps); a difference above 15
// cycles, which the design rules out, is clamped to 15; the accumulator
// saturates at all ones because the sum of residence times of up to 2,300
// flits can exceed 14 bits.
//
// Timing: one register stage; 'rs_total' is combinational from the inputs.
module rs_counter
  import noc_aging_pkg::*;
#(
  parameter int NPORTS = NUM_PORTS,
  parameter int W      = RS_W,
  parameter int TW     = TS_W,
  parameter int RW     = RES_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,      // epsilon pulse
  input  logic [NPORTS-1:0]          ex_valid,   // a flit leaves on this output port
  input  logic [TW-1:0]              ex_t,       // current time stamp (exit time)
  input  logic [NPORTS-1:0][TW-1:0]  eq_t,       // en-queue time carried by each leaving flit
  output logic [NPORTS-1:0][RW-1:0]  res,        // per-port residence after the mux
  output logic [W-1:0]               rs,         // sum up to the previous cycle
  output logic [W-1:0]               rs_total    // sum including this cycle
);

  localparam int SW = RW + $clog2(NPORTS + 1);

  logic [NPORTS-1:0][TW:0] diff;
  logic [SW-1:0]           part;
  logic [W:0]              sum;

  // Subtractor and mux per output port.
  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      diff[p] = {1'b0, ex_t} - {1'b0, eq_t[p]};
      if (!ex_valid[p] || diff[p][TW])            res[p] = '0;   // no flit or negative
      else if (diff[p][TW-1:0] > TW'((1 << RW) - 1)) res[p] = '1;   // clamp
      else                                          res[p] = diff[p][RW-1:0];
    end
  end

  // Parallel counter over the five residence times.
  always_comb begin
    part = '0;
    for (int p = 0; p < NPORTS; p++)
      part = part + SW'(res[p]);
    sum      = {1'b0, rs} + (W+1)'(part);
    rs_total = sum[W] ? '1 : sum[W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     rs <= '0;
    else if (clear) rs <= '0;
    else            rs <= rs_total;
  end

endmodule
