// flit_counter: the "fl" counter of a router's aging monitor.
//
// Every cycle the five input ports each present a valid (V) and a ready (R)
// signal; a flit enters the router on a port where both are high. A parallel
// counter adds the number of such ports (0..5) to a running count, so the
// count is the number of flits that entered the router in the current
// epsilon. 'clear' (the epsilon pulse of the central timer) restarts the count
// from zero in the next cycle. 'fl_total' is the count including this cycle's
// flits; it is what the monitor reports when the epsilon ends.
//
// Follows the original scheme: AND of V and R per port, a parallel counter, a
// 12-bit result and a reset every epsilon. Own choice: the count saturates at
// its all-ones value instead of wrapping (the design bounds fl at 2,300, well
// below 4,095, so saturation only guards against misuse).
//
// Timing: one register stage; 'fl_total' is combinational from the inputs.
module flit_counter
  import noc_aging_pkg::*;
#(
  parameter int NPORTS = NUM_PORTS,
  parameter int W      = FL_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,          // epsilon pulse
  input  logic [NPORTS-1:0] in_valid,       // V per input port
  input  logic [NPORTS-1:0] in_ready,       // R per input port
  output logic [W-1:0]      fl,             // count up to the previous cycle
  output logic [W-1:0]      fl_total        // count including this cycle
);

  localparam int CW = $clog2(NPORTS + 1);

  logic [CW-1:0] ones;
  logic [W:0]    sum;

  // Parallel counter: number of ports accepting a flit this cycle.
  always_comb begin
    ones = '0;
    for (int p = 0; p < NPORTS; p++)
      ones = ones + CW'(in_valid[p] & in_ready[p]);
  end

  always_comb begin
    sum      = {1'b0, fl} + (W+1)'(ones);
    fl_total = sum[W] ? '1 : sum[W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     fl <= '0;
    else if (clear) fl <= '0;
    else            fl <= fl_total;
  end

endmodule
