// tb_eps_timer: self-checking test of the epsilon / period timer.
//
// A small instance (epsilon of 7 cycles, 3 epsilons per period) is checked
// cycle by cycle: the time stamp counts 0..6, the epsilon pulse is high
// exactly in the last cycle of each epsilon, the period pulse in the last
// cycle of every third epsilon. An instance with the default epsilon of
// 10,000 cycles must give its first pulse after exactly 10,000 cycles.
module tb_eps_timer;
  import noc_aging_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [TS_W-1:0] now, now_d;
  logic eps, p_end, eps_d, p_end_d;
  logic [63:0] cnt, cnt_d;
  int checks = 0, failures = 0;
  int first_eps = -1, peps = 0, pp = 0;

  always #5 clk = ~clk;

  eps_timer #(.EPS_CYCLES(7), .N_EPS(3)) dut (.clk, .rst_n, .now_t(now), .eps, .p_end,
                                             .eps_count(cnt));
  eps_timer dut_d (.clk, .rst_n, .now_t(now_d), .eps(eps_d), .p_end(p_end_d),
                   .eps_count(cnt_d));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: now=%0d eps=%0b p=%0b cnt=%0d", what, $time, now, eps, p_end, cnt);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 10_050; cyc++) begin
      #1;
      if (cyc < 100) begin
        check(now == TS_W'(cyc % 7), "time stamp");
        check(eps == (cyc % 7 == 6), "epsilon pulse");
        check(p_end == (cyc % 21 == 20), "period pulse");
        check(cnt == 64'((cyc / 7) % 3), "epsilon count");
        if (eps) peps++;
        if (p_end) pp++;
      end
      if (eps_d && first_eps < 0) first_eps = cyc;
      check(!p_end_d, "no default period pulse");
      @(negedge clk);
    end
    check(first_eps == 9_999, "first default epsilon after 10,000 cycles");
    check(peps == 14 && pp == 4, "pulse counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
