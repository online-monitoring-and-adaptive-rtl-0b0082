// route_selector: aging-aware choice of one path per source-destination pair.
//
// Once per period P it takes a snapshot of all router ages, finds the most
// aged router, and then, for every ordered pair (src, dst) with src != dst,
// enumerates the minimal (shortest) paths of the mesh between them. A
// minimal path with dx X hops and dy Y hops is a sequence of dx+dy hops of
// which exactly dx are X hops; it is encoded as a bit mask (bit i = 1: hop i
// is an X hop). The selector steps a counter m through 0 .. 2^(dx+dy)-1 and
// evaluates every m with exactly dx ones, one per cycle: it walks the path,
// sums the ages of the routers on it and notes whether the most aged router
// is one of the routers passed through. The chosen path is the first one,
// in counting order, that
//   1. does not pass through the most aged router, if any path avoids it, and
//   2. among those, has the smallest sum of router ages.
// The chosen mask is written to the routing table of the source router.
// Because counting order starts with the mask whose low dx bits are set,
// ties fall back to XY (X first) routing.
//
// Follows the original scheme: paths are the shortest paths of each pair;
// paths through the maximum-aged router are discarded and the path with the
// minimum sum of ages is kept; the tables are rebuilt once per period. Own
// choices: all shortest paths of the mesh are candidates (the original scheme finds k
// best paths with a Dijkstra-based method; on a mesh every shortest path has
// the same length); the source and the destination, which every candidate
// contains, do not count as passing through the most aged router; when every
// candidate passes through it the minimum age sum alone decides; equal
// maximum ages go to the lowest router index; ordering of ties as above.
//
// Timing: 'start' is a one-cycle pulse; 'done' pulses when all tables are
// written. A pair at distance L takes 2^L + 2 cycles, a pair with src = dst
// one cycle; with one cycle to find the most aged router a 4x4 mesh takes
// 2,785 cycles from 'start' to 'done'.
module route_selector
  import noc_aging_pkg::*;
#(
  parameter int AGE_W = 64
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 start,
  input  logic [NUM_ROUTERS-1:0][AGE_W-1:0]    age,
  output logic                                 wr_en,
  output logic [ID_W-1:0]                      wr_src,
  output logic [ID_W-1:0]                      wr_dst,
  output logic [MAX_HOPS-1:0]                  wr_path,
  output logic [ID_W-1:0]                      max_id,
  output logic                                 busy,
  output logic                                 done
);

  localparam int SUM_W = AGE_W + $clog2(MAX_HOPS + 1);

  typedef enum logic [2:0] {S_IDLE, S_MAX, S_PAIR, S_EVAL, S_WRITE} state_e;
  state_e state;

  logic [NUM_ROUTERS-1:0][AGE_W-1:0] snap;
  logic [ID_W-1:0]     src, dst;
  logic [MAX_HOPS:0]   m;          // one bit wider than a path to count to 2^L
  logic [MAX_HOPS:0]   m_last;
  int unsigned         nx, len;
  logic [MAX_HOPS-1:0] best_path;
  logic [SUM_W-1:0]    best_sum;
  logic                best_hit, best_valid;

  // Most aged router of the snapshot (lowest index on a tie).
  logic [ID_W-1:0] argmax;
  always_comb begin
    argmax = '0;
    for (int i = 1; i < NUM_ROUTERS; i++)
      if (snap[i] > snap[argmax]) argmax = ID_W'(i);
  end

  // Evaluation of candidate mask m for the current pair.
  logic             cand_ok;
  logic [SUM_W-1:0] cand_sum;
  logic             cand_hit;
  always_comb begin
    logic [ID_W-1:0] cur;
    cand_ok  = ($countones(m) == nx);
    cur      = src;
    cand_sum = SUM_W'(snap[src]);
    cand_hit = 1'b0;
    for (int i = 0; i < MAX_HOPS; i++) begin
      if (i < int'(len)) begin
        cur      = ID_W'(step(32'(cur), 32'(dst), m[i]));
        cand_sum = cand_sum + SUM_W'(snap[cur]);
        if (cur != dst && cur == max_id) cand_hit = 1'b1;
      end
    end
  end

  logic better;
  always_comb
    better = cand_ok && (!best_valid || (!cand_hit && best_hit)
                         || (cand_hit == best_hit && cand_sum < best_sum));

  always_comb begin
    nx     = x_hops(32'(src), 32'(dst));
    len    = total_hops(32'(src), 32'(dst));
    m_last = (MAX_HOPS+1)'((1 << len) - 1);
    busy   = (state != S_IDLE);
    wr_en  = (state == S_WRITE);
    wr_src = src;
    wr_dst = dst;
    wr_path = best_path;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      snap       <= '0;
      src        <= '0;
      dst        <= '0;
      m          <= '0;
      max_id     <= '0;
      best_path  <= '0;
      best_sum   <= '0;
      best_hit   <= 1'b0;
      best_valid <= 1'b0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          snap  <= age;
          src   <= '0;
          dst   <= '0;
          state <= S_MAX;
        end
        S_MAX: begin
          max_id <= argmax;
          state  <= S_PAIR;
        end
        S_PAIR: begin
          m          <= '0;
          best_valid <= 1'b0;
          if (src == dst) begin
            // no path to itself: next pair
            if (dst == ID_W'(NUM_ROUTERS - 1)) begin
              dst <= '0;
              if (src == ID_W'(NUM_ROUTERS - 1)) begin
                state <= S_IDLE;
                done  <= 1'b1;
              end else src <= src + 1'b1;
            end else dst <= dst + 1'b1;
          end else state <= S_EVAL;
        end
        S_EVAL: begin
          if (better) begin
            best_path  <= m[MAX_HOPS-1:0];
            best_sum   <= cand_sum;
            best_hit   <= cand_hit;
            best_valid <= 1'b1;
          end
          if (m == m_last) state <= S_WRITE;
          else             m <= m + 1'b1;
        end
        S_WRITE: begin
          state <= S_PAIR;
          if (dst == ID_W'(NUM_ROUTERS - 1)) begin
            dst <= '0;
            if (src == ID_W'(NUM_ROUTERS - 1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else src <= src + 1'b1;
          end else dst <= dst + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
