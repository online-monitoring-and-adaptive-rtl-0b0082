// tb_rs_counter: self-checking test of the rs counter.
//
// Drives random exits on the five output ports with en-queue times 0..20
// cycles before the current time stamp, and also with en-queue times just
// before a wrap of the time stamp (negative differences that must be
// dropped). Checks the per-port residence after the mux, the running sum and
// the sum including the current cycle against a reference model; a
// narrow-accumulator instance checks saturation.
module tb_rs_counter;
  import noc_aging_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0;
  logic [NUM_PORTS-1:0] exv;
  logic [TS_W-1:0] now;
  logic [NUM_PORTS-1:0][TS_W-1:0] eq;
  logic [NUM_PORTS-1:0][RES_W-1:0] res, res6;
  logic [RS_W-1:0] rs, rs_total;
  logic [5:0] rs6, rs6_total;
  int checks = 0, failures = 0;
  int model, model6, part, e, d, negs;

  always #5 clk = ~clk;

  rs_counter dut (.clk, .rst_n, .clear, .ex_valid(exv), .ex_t(now), .eq_t(eq),
                  .res, .rs, .rs_total);
  rs_counter #(.W(6)) dut6 (.clk, .rst_n, .clear, .ex_valid(exv), .ex_t(now), .eq_t(eq),
                            .res(res6), .rs(rs6), .rs_total(rs6_total));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: rs=%0d total=%0d model=%0d", what, rs, rs_total, model);
    end
  endtask

  initial begin
    exv = '0; eq = '0; now = '0;
    model = 0; model6 = 0; negs = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(negedge clk);
      now   = TS_W'(cyc % 50);             // time stamp wraps every 50 cycles
      clear = (cyc % 50 == 49);
      exv   = NUM_PORTS'($urandom);
      part  = 0;
      begin
        int exp_res [NUM_PORTS];
      for (int p = 0; p < NUM_PORTS; p++) begin
        d = $urandom_range(0, 20);
        e = int'(now) - d;
        if (e < 0) e = e + 50;              // en-queued in the previous epsilon
        eq[p] = TS_W'(e);
        // expected residence after the mux
        if (!exv[p] || e > int'(now)) d = 0;
        else if (d > 15)             d = 15;
        if (exv[p] && e > int'(now)) negs++;
        part = part + d;
        exp_res[p] = d;
      end
      #1;
      for (int p = 0; p < NUM_PORTS; p++)
        check(res[p] == RES_W'(exp_res[p]), "per-port residence");
      end
      check(rs == RS_W'(model), "running sum");
      check(rs_total == RS_W'(model + part), "total sum");
      check(rs6_total == 6'((model6 + part > 63) ? 63 : model6 + part), "saturating sum");
      @(posedge clk);
      if (clear) begin model = 0; model6 = 0; end
      else begin
        model  = model + part;
        model6 = (model6 + part > 63) ? 63 : model6 + part;
      end
    end
    checks++;
    if (negs == 0) begin failures++; $display("FAIL no negative difference exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
