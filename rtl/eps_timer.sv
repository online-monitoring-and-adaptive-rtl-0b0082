// eps_timer: the central timer that paces aging monitoring.
//
// A cycle counter runs from 0 to EPS_CYCLES-1 and wraps. Its value is the
// time stamp that routers write into a flit when it is en-queued and compare
// with when it leaves. In the last cycle of each epsilon 'eps' pulses for one
// cycle; it resets the fl and rs counters of every router and starts the
// reporting of the closing epsilon. A second counter counts epsilons; every
// N_EPS of them make one period P, marked by 'p_end' pulsing together with
// the epsilon pulse that closes the period. The routing tables are
// recomputed once per period.
//
// Follows the original scheme: epsilon = 10,000 cycles counted by a 14-bit
// timer that resets the router counters, and P = n x epsilon. The scheme
// gives P only by example ("each week"); the default N_EPS is one week at
// 1 GHz in epsilons of 10,000 cycles. Own choices: the timer's value doubles
// as the time stamp, and P is counted here too.
//
// Timing: 'eps' and 'p_end' are combinational decodes of the counters, high
// in the cycle where 'now_t' equals EPS_CYCLES-1.
module eps_timer
  import noc_aging_pkg::*;
#(
  parameter int unsigned    EPS_CYCLES = 10_000,
  parameter longint unsigned N_EPS     = 64'd60_480_000_000,
  parameter int             TW         = TS_W
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [TW-1:0] now_t,     // cycle inside the current epsilon
  output logic          eps,       // last cycle of an epsilon
  output logic          p_end,     // last cycle of a period P
  output logic [63:0]   eps_count  // epsilons completed in the current period
);

  always_comb begin
    eps   = (now_t == TW'(EPS_CYCLES - 1));
    p_end = eps && (eps_count == N_EPS - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now_t     <= '0;
      eps_count <= '0;
    end else if (eps) begin
      now_t     <= '0;
      eps_count <= p_end ? 64'd0 : eps_count + 64'd1;
    end else begin
      now_t     <= now_t + TW'(1);
    end
  end

endmodule
