// age_tracker: keeps the age tag of every router, updated through the CAT.
//
// Each router sends one report flit (its fl and rs) per epsilon. The tracker
// takes pending reports one at a time, lowest router index first, looks the
// (rs, fl) pair up in the aging table and adds the returned delay degradation
// to the age of the router named in the report. A negative entry (recovery
// of an idle router) lowers the age, never below zero; the age saturates at
// its all-ones value. After NUM_ROUTERS reports, one per router, it pulses
// 'round_done': all ages now include the epsilon just closed.
//
// Interface: report flits with valid/ack (ack is high in the cycle a report
// is taken); a lookup port towards the aging table (request, rs, fl; answer
// dd with dd_valid one or more cycles later); the ages as an array.
//
// Follows the original scheme: one age tag per router accumulated from the
// table's entries every epsilon. Own choices: the serial fixed-priority
// service, the clamping at zero, the age width and the round counter.
//
// Timing: a report takes three cycles with a one-cycle table (take, look up,
// accumulate); sixteen routers take 48 cycles per epsilon.
module age_tracker
  import noc_aging_pkg::*;
#(
  parameter int N     = NUM_ROUTERS,
  parameter int DD_W  = 16,
  parameter int AGE_W = 64
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  report_flit_t [N-1:0]        report,
  input  logic         [N-1:0]        report_valid,
  output logic         [N-1:0]        report_ack,
  // aging table lookup
  output logic                        cat_lookup,
  output logic [RS_W-1:0]             cat_rs,
  output logic [FL_W-1:0]             cat_fl,
  input  logic signed [DD_W-1:0]      cat_dd,
  input  logic                        cat_dd_valid,
  // age tags
  output logic [N-1:0][AGE_W-1:0]     age,
  output logic                        round_done,
  output logic                        busy
);

  typedef enum logic [1:0] {S_IDLE, S_LOOK, S_WAIT} state_e;
  state_e state;

  report_flit_t        cur;
  logic [$clog2(N):0]  served;
  logic                found;
  int unsigned         pick;

  // Fixed-priority choice of the next pending report.
  always_comb begin
    found = 1'b0;
    pick  = 0;
    for (int i = N - 1; i >= 0; i--)
      if (report_valid[i]) begin
        found = 1'b1;
        pick  = i;
      end
    report_ack = '0;
    if (state == S_IDLE && found) report_ack[pick] = 1'b1;
  end

  always_comb begin
    cat_lookup = (state == S_LOOK);
    cat_rs     = cur.rs;
    cat_fl     = cur.fl;
    busy       = (state != S_IDLE);
  end

  // New age of the current router: sum clamped to [0, all ones].
  function automatic logic [AGE_W-1:0] add_age(input logic [AGE_W-1:0] a,
                                               input logic signed [DD_W-1:0] d);
    logic signed [AGE_W+1:0] s;
    s = $signed({2'b00, a}) + (AGE_W+2)'(d);
    if (s < 0)                                  return '0;
    else if (s > $signed({2'b00, {AGE_W{1'b1}}})) return '1;
    else                                        return s[AGE_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cur        <= '0;
      served     <= '0;
      round_done <= 1'b0;
      age        <= '0;
    end else begin
      round_done <= 1'b0;
      unique case (state)
        S_IDLE: if (found) begin
          cur   <= report[pick];
          state <= S_LOOK;
        end
        S_LOOK: state <= S_WAIT;
        S_WAIT: if (cat_dd_valid) begin
          age[cur.router_id] <= add_age(age[cur.router_id], cat_dd);
          state <= S_IDLE;
          if (served == ($clog2(N)+1)'(N - 1)) begin
            served     <= '0;
            round_done <= 1'b1;
          end else begin
            served <= served + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // At most one report is taken per cycle.
  a_ack_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    (report_ack & (report_ack - 1'b1)) == '0);

endmodule
