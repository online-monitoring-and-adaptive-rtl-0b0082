// tb_noc_body.svh: shared body of the end-to-end testbenches of
// aging_noc_top. The including module declares the localparams EPS (epsilon
// in cycles), NUM_EPS (epsilons to run), EXPECT_ROUTES (whether a routing
// update must occur) and instantiates the top as 'dut' with its ports wired
// to the signals declared here.
//
// Traffic model: each router has a load level. Every cycle each input port
// accepts a flit with a probability given by the load, and each output port
// emits one whose en-queue time lies 0..17 cycles back (wrapping across the
// epsilon boundary, so some residence times are negative and must be
// dropped, and some exceed 15 and are clamped). Router 15 is idle in even
// epsilons, which exercises the negative (recovery) table entry and the
// clamping of an age at zero. The reference keeps its own fl and rs per
// router and epsilon, its own quantisation (by division) and its own ages,
// compares the running flit counts every cycle, the ages after each
// reporting round, and after each routing
// update compares every table entry with a path found by depth-first search.

  logic clk = 0, rst_n = 0;
  logic [NUM_ROUTERS-1:0][NUM_PORTS-1:0] in_valid, in_ready, ex_valid;
  logic [NUM_ROUTERS-1:0][NUM_PORTS-1:0][TS_W-1:0] eq_t;
  logic [TS_W-1:0] now_t;
  logic eps, p_end;
  logic cat_wr_en;
  logic [6:0] cat_wr_addr;
  logic signed [15:0] cat_wr_data;
  logic [NUM_ROUTERS-1:0][63:0] age;
  logic ages_updated, routes_updated, route_busy;
  logic [ID_W-1:0] max_aged;
  logic [NUM_ROUTERS-1:0][FL_W-1:0] fl;
  logic [NUM_ROUTERS-1:0][RS_W-1:0] rs;
  logic [NUM_ROUTERS-1:0][ID_W-1:0] rt_dst, fw_dst;
  logic [NUM_ROUTERS-1:0][MAX_HOPS-1:0] rt_path, fw_path;
  port_e [NUM_ROUTERS-1:0] rt_port, fw_port;
  logic [NUM_ROUTERS-1:0][$clog2(MAX_HOPS+1)-1:0] fw_hop;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_eps = 0, n_rounds = 0, n_drop = 0, n_clamp = 0, n_recov = 0, n_zero = 0;
  int n_routes = 0, n_nonxy = 0, n_fallback = 0;
  int since_eps = 0, max_round = 0;

  localparam int STEPS = 8;
  localparam int FL_MAX = 2300;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Table contents: idle entry -5, else 1 + 3*rs_bin + fl_bin.
  function automatic int cat_value(int k);
    if (k == 0) return -5;
    return 1 + 3 * (k / (STEPS + 1)) + (k % (STEPS + 1));
  endfunction

  function automatic int ref_bin(int v, int vmax);
    int b;
    if (v == 0) return 0;
    b = (v * STEPS + vmax - 1) / vmax;
    return (b > STEPS) ? STEPS : b;
  endfunction

  longint mage [NUM_ROUTERS];
  longint sel_age [NUM_ROUTERS];
  int mfl [NUM_ROUTERS], mrs [NUM_ROUTERS];
  int load [NUM_ROUTERS];
  bit p_seen;

  // ---- reference path search --------------------------------------------
  int ref_max, best_mask, best_hit;
  longint best_sum;

  function automatic int mdist(int a, int b);
    int dx, dy;
    dx = (a % MESH_X) - (b % MESH_X);
    dy = (a / MESH_X) - (b / MESH_X);
    return (dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy);
  endfunction

  function automatic void dfs(int cur, int dst, int hop, int mask, int hit, longint sum);
    int nb [4];
    int isx [4];
    if (cur == dst) begin
      if (best_mask < 0 || hit < best_hit || (hit == best_hit && sum < best_sum)
          || (hit == best_hit && sum == best_sum && mask < best_mask)) begin
        best_mask = mask; best_hit = hit; best_sum = sum;
      end
      return;
    end
    nb[0] = (cur % MESH_X < MESH_X - 1) ? cur + 1 : -1;      isx[0] = 1;
    nb[1] = (cur % MESH_X > 0)          ? cur - 1 : -1;      isx[1] = 1;
    nb[2] = (cur / MESH_X < MESH_Y - 1) ? cur + MESH_X : -1; isx[2] = 0;
    nb[3] = (cur / MESH_X > 0)          ? cur - MESH_X : -1; isx[3] = 0;
    for (int k = 0; k < 4; k++)
      if (nb[k] >= 0 && mdist(nb[k], dst) < mdist(cur, dst))
        dfs(nb[k], dst, hop + 1, mask | (isx[k] << hop),
            hit | ((nb[k] != dst && nb[k] == ref_max) ? 1 : 0), sum + sel_age[nb[k]]);
  endfunction

  // ---- stimulus and reference --------------------------------------------
  initial begin
    int d, e, epoch, inc_fl, inc_rs, k, dd;
    in_valid = '0; in_ready = '0; ex_valid = '0; eq_t = '0;
    cat_wr_en = 0; cat_wr_addr = '0; cat_wr_data = '0;
    rt_dst = '0; fw_dst = '0; fw_path = '0; fw_hop = '0;
    p_seen = 0;
    for (int r = 0; r < NUM_ROUTERS; r++) begin
      mage[r] = 0; mfl[r] = 0; mrs[r] = 0;
      // a hot column (x = 1) and a quiet corner
      // flits per thousand cycles and port: at most about 0.23 flits per
      // cycle enter a router, close to the 2,300-flit bound per epsilon
      load[r] = (r % 4 == 1) ? 45 : ((r % 4 == 2) ? 25 : 10);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // load the aging table during the first cycles of the first epsilon
    for (int k2 = 0; k2 < (STEPS + 1) * (STEPS + 1); k2++) begin
      @(negedge clk);
      cat_wr_en = 1; cat_wr_addr = 7'(k2); cat_wr_data = 16'(cat_value(k2));
    end
    @(negedge clk) cat_wr_en = 0;
    epoch = 0;
    // traffic for NUM_EPS epsilons, then idle routers until the last
    // reporting round and any routing update are over
    while (n_eps < NUM_EPS || route_busy || since_eps < 80) begin
      #1;   // now_t and eps are stable a moment after the falling edge
      for (int r = 0; r < NUM_ROUTERS; r++) begin
        inc_fl = 0; inc_rs = 0;
        for (int p = 0; p < NUM_PORTS; p++) begin
          bit idle;
          idle = (n_eps >= NUM_EPS) || ((r == 15) && (epoch % 2 == 0));
          in_valid[r][p] = !idle && ($urandom_range(0, 999) < load[r]);
          in_ready[r][p] = !idle && ($urandom_range(0, 99) < 90);
          ex_valid[r][p] = !idle && ($urandom_range(0, 999) < load[r]);
          d = $urandom_range(0, 17);
          e = int'(now_t) - d;
          if (e < 0) e += EPS;
          eq_t[r][p] = TS_W'(e);
          if (in_valid[r][p] && in_ready[r][p]) inc_fl++;
          if (ex_valid[r][p]) begin
            if (e > int'(now_t)) n_drop++;
            else begin
              if (d > 15) n_clamp++;
              inc_rs += (d > 15) ? 15 : d;
            end
          end
        end
        mfl[r] += inc_fl;
        if (mfl[r] > 4095) mfl[r] = 4095;
        mrs[r] += inc_rs;
        if (mrs[r] > 16383) mrs[r] = 16383;
      end
      #1;
      if (eps) begin
        // epsilon closes: work out each router's table entry and age
        n_eps++;
        for (int r = 0; r < NUM_ROUTERS; r++) begin
          k  = ref_bin(mrs[r], EPS) * (STEPS + 1) + ref_bin(mfl[r], FL_MAX);
          dd = cat_value(k);
          if (dd < 0) n_recov++;
          mage[r] += dd;
          if (mage[r] < 0) begin mage[r] = 0; n_zero++; end
          mfl[r] = 0; mrs[r] = 0;
        end
        if (p_end) p_seen = 1;
        epoch++;
        since_eps = 0;
      end else begin
        since_eps++;
        for (int r = 0; r < NUM_ROUTERS; r++)
          check(int'(fl[r]) == mfl[r] - $countones(in_valid[r] & in_ready[r]), "running fl");
      end
      @(negedge clk);
    end
    check(n_eps >= NUM_EPS, "epsilon count");
    check(n_rounds == n_eps, "reporting rounds");
    check(n_drop > 0, "negative residence dropped");
    check(n_clamp > 0, "residence clamped at 15");
    check(n_recov > 0, "recovery entry used");
    check(n_zero > 0, "age held at zero");
    if (EXPECT_ROUTES) begin
      check(n_routes > 0, "routing update");
      check(n_nonxy > 0, "non-XY path chosen");
      check(n_fallback > 0, "fallback through the most aged router");
    end
    $display("longest reporting round: %0d cycles", max_round);
    $display("epsilons=%0d rounds=%0d dropped=%0d clamped=%0d recovery=%0d zero=%0d routes=%0d nonxy=%0d fallback=%0d",
             n_eps, n_rounds, n_drop, n_clamp, n_recov, n_zero, n_routes, n_nonxy, n_fallback);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- ages after each reporting round -------------------------------------
  always @(negedge clk) if (rst_n && ages_updated) begin
    n_rounds++;
    // 16 reports at three cycles each, plus the report register stage
    check(since_eps <= 3 * NUM_ROUTERS + 2, "reporting round latency");
    max_round = (since_eps > max_round) ? since_eps : max_round;
    for (int r = 0; r < NUM_ROUTERS; r++)
      check(longint'(age[r]) == mage[r], "age after round");
    if (p_seen) begin
      for (int r = 0; r < NUM_ROUTERS; r++) sel_age[r] = mage[r];
      p_seen = 0;
    end
  end

  // ---- routing tables after each update ------------------------------------
  initial begin
    forever begin
      @(negedge clk);
      if (routes_updated) begin
        n_routes++;
        ref_max = 0;
        for (int r = 1; r < NUM_ROUTERS; r++) if (sel_age[r] > sel_age[ref_max]) ref_max = r;
        check(int'(max_aged) == ref_max, "most aged router");
        for (int dd = 0; dd < NUM_ROUTERS; dd++) begin
          for (int s = 0; s < NUM_ROUTERS; s++) begin
            rt_dst[s] = ID_W'(dd);
            fw_dst[s] = ID_W'(dd);
            fw_path[s] = MAX_HOPS'($urandom);
            fw_hop[s] = '0;
          end
          #1;
          for (int s = 0; s < NUM_ROUTERS; s++) if (s != dd) begin
            best_mask = -1;
            dfs(s, dd, 0, 0, 0, sel_age[s]);
            check(int'(rt_path[s]) == best_mask, "routing table entry");
            check(rt_port[s] == hop_port(s, dd, rt_path[s][0]), "first-hop port");
            check(fw_port[s] == hop_port(s, dd, fw_path[s][0]), "transit port");
            if (best_hit != 0) n_fallback++;
            if (rt_path[s] != xy_path(s, dd)) n_nonxy++;
          end
          @(negedge clk);
        end
      end
    end
  end
