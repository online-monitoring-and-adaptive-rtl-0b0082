// tb_age_tracker: self-checking test of the age-tag keeper.
//
// Four routers (a reduced count) raise report flits with random (fl, rs)
// at random times, several per round. A behavioural aging table answers
// each lookup after one cycle with dd = fl - rs / 4 (signed, so idle or
// long-residence reports lower the age). The expected ages are accumulated
// independently with clamping at zero; after every round of four reports
// 'round_done' must pulse and the ages must match. One-hot acknowledges
// and a three-cycle service time per report are checked too.
module tb_age_tracker;
  import noc_aging_pkg::*;

  localparam int N = 4, DD_W = 16, AGE_W = 20;

  logic clk = 0, rst_n = 0;
  report_flit_t [N-1:0] report;
  logic [N-1:0] rv, ack;
  logic cat_lookup, cat_dd_valid;
  logic [RS_W-1:0] cat_rs;
  logic [FL_W-1:0] cat_fl;
  logic signed [DD_W-1:0] cat_dd;
  logic [N-1:0][AGE_W-1:0] age;
  logic round_done, busy;
  int checks = 0, failures = 0;
  longint model [N];
  int rounds = 0, recov = 0, taken = 0, first_take = -1, cyc = 0;

  always #5 clk = ~clk;

  age_tracker #(.N(N), .DD_W(DD_W), .AGE_W(AGE_W)) dut (
    .clk, .rst_n, .report, .report_valid(rv), .report_ack(ack),
    .cat_lookup, .cat_rs, .cat_fl, .cat_dd, .cat_dd_valid,
    .age, .round_done, .busy);

  // behavioural table: one-cycle answer
  always_ff @(posedge clk) begin
    cat_dd_valid <= cat_lookup;
    cat_dd       <= DD_W'(int'(cat_fl) - int'(cat_rs) / 4);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  // report sources: each router raises one report per round
  initial begin
    int f, r, d;
    rv = '0; report = '0;
    for (int i = 0; i < N; i++) model[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 30; round++) begin
      for (int i = 0; i < N; i++) begin
        f = (round % 5 == 0) ? 0 : $urandom_range(0, 200);
        r = $urandom_range(0, 1200);
        @(negedge clk);
        report[i].router_id = ID_W'(i);
        report[i].fl = FL_W'(f);
        report[i].rs = RS_W'(r);
        rv[i] = 1;
        d = f - r / 4;
        if (d < 0) recov++;
        model[i] = model[i] + d;
        if (model[i] < 0) model[i] = 0;
      end
      // wait until the round is absorbed
      while (!round_done) @(negedge clk);
      rounds++;
      for (int i = 0; i < N; i++)
        check(age[i] == AGE_W'(model[i]), "age after round");
      check(rv == '0, "all reports taken");
    end
    check(recov > 0, "recovery entries exercised");
    check(rounds == 30, "round count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // handshake: ack is one-hot, answers a valid report, and drops it
  always @(posedge clk) if (rst_n) begin
    if (ack != '0) begin
      checks++;
      if (!$onehot(ack) || (ack & ~rv) != '0) begin
        failures++; $display("FAIL ack not one-hot or without valid");
      end
      if (taken == 1) begin
        checks++;
        if (cyc - first_take != 3) begin
          failures++; $display("FAIL service time %0d", cyc - first_take);
        end
      end
      if (taken == 0) first_take = cyc;
      taken++;
      rv <= rv & ~ack;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
