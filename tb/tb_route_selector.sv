// tb_route_selector: self-checking test of the aging-aware path selector.
//
// For several age maps (random, random with many ties, and one with a
// single very old router in the middle) the selector is started and every
// table write is compared with a reference. The reference lists the minimal
// paths of a pair by depth-first search over the mesh (every move must
// reduce the distance to the destination), scores each path by whether it
// passes through the most aged router (source and destination excluded)
// and by its summed age, and keeps the best; among equal scores the path
// whose hop mask (bit i = 1 for an X hop) is numerically smallest wins.
// The number of writes, the absence of writes for src = dst, and the
// cycles from start to done (sum over pairs of 2^L + 2, one per src = dst
// pair, one to find the most aged router) are checked too.
module tb_route_selector;
  import noc_aging_pkg::*;

  localparam int AGE_W = 24;

  logic clk = 0, rst_n = 0, start = 0;
  logic [NUM_ROUTERS-1:0][AGE_W-1:0] age;
  logic wr_en, busy, done;
  logic [ID_W-1:0] wr_src, wr_dst, max_id;
  logic [MAX_HOPS-1:0] wr_path;
  int checks = 0, failures = 0;
  int writes, avoided, fallback;

  always #5 clk = ~clk;

  route_selector #(.AGE_W(AGE_W)) dut (.clk, .rst_n, .start, .age, .wr_en, .wr_src,
                                       .wr_dst, .wr_path, .max_id, .busy, .done);

  int ref_max;
  // best path found by the search
  int best_mask, best_hit, best_sum;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: src=%0d dst=%0d path=%b", what, wr_src, wr_dst, wr_path);
    end
  endtask

  function automatic int mdist(int a, int b);
    int dx, dy;
    dx = (a % MESH_X) - (b % MESH_X);
    dy = (a / MESH_X) - (b / MESH_X);
    return (dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy);
  endfunction

  // depth-first enumeration of minimal paths
  function automatic void dfs(int cur, int dst, int src, int hop, int mask, int hit, int sum);
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
        dfs(nb[k], dst, src, hop + 1, mask | (isx[k] << hop),
            hit | ((nb[k] != dst && nb[k] == ref_max) ? 1 : 0),
            sum + int'(age[nb[k]]));
  endfunction

  task automatic run(input int kind);
    int t0, t1, expect_cycles;
    for (int i = 0; i < NUM_ROUTERS; i++) begin
      case (kind)
        0: age[i] = AGE_W'($urandom_range(0, 100_000));
        1: age[i] = AGE_W'($urandom_range(0, 3));
        default: age[i] = AGE_W'((i == 5) ? 900 : 10 + $urandom_range(0, 5));
      endcase
    end
    ref_max = 0;
    for (int i = 1; i < NUM_ROUTERS; i++) if (age[i] > age[ref_max]) ref_max = i;
    expect_cycles = 1 + NUM_ROUTERS;
    for (int s = 0; s < NUM_ROUTERS; s++)
      for (int d = 0; d < NUM_ROUTERS; d++)
        if (s != d) expect_cycles += (1 << mdist(s, d)) + 2;
    writes = 0;
    @(negedge clk) start = 1;
    t0 = $time;
    @(negedge clk) start = 0;
    while (!done) begin
      @(posedge clk);
      #1;
      if (wr_en) begin
        writes++;
        check(wr_src != wr_dst, "no self path");
        best_mask = -1;
        dfs(int'(wr_src), int'(wr_dst), int'(wr_src), 0, 0, 0, int'(age[wr_src]));
        check(int'(wr_path) == best_mask, "chosen path");
        if (best_hit == 0 && x_hops(wr_src, wr_dst) > 0 && x_hops(wr_src, wr_dst) < total_hops(wr_src, wr_dst)
            && wr_path != xy_path(wr_src, wr_dst)) avoided++;
        if (best_hit != 0) fallback++;
      end
    end
    t1 = $time;
    check(int'(max_id) == ref_max, "most aged router");
    check(writes == NUM_ROUTERS * (NUM_ROUTERS - 1), "write count");
    check((t1 - t0) / 10 == expect_cycles, "cycles start to done");
    $display("kind %0d: %0d cycles (expected %0d), max router %0d", kind, (t1 - t0) / 10,
             expect_cycles, max_id);
  endtask

  initial begin
    age = '0; avoided = 0; fallback = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(0);
    run(1);
    run(2);
    run(0);
    check(avoided > 0, "some non-XY path chosen");
    check(fallback > 0, "fallback when every path passes the most aged router");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
