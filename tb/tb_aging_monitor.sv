// tb_aging_monitor: self-checking test of one router's monitoring system.
//
// A short epsilon of 40 cycles is generated by the testbench (time stamp and
// epsilon pulse). Random flits enter on the five input ports and leave on
// the five output ports with en-queue times up to 18 cycles back, wrapping
// across the epsilon boundary. At every epsilon end the report flit must
// carry the router id and the fl and rs of the whole epsilon, including the
// pulse cycle. Reports are acknowledged after a random delay, and once not
// at all, to check that a newer report replaces an unacknowledged one.
module tb_aging_monitor;
  import noc_aging_pkg::*;

  localparam int EPS = 40;
  localparam int ID  = 9;

  logic clk = 0, rst_n = 0;
  logic eps;
  logic [TS_W-1:0] now;
  logic [NUM_PORTS-1:0] iv, ir, exv;
  logic [NUM_PORTS-1:0][TS_W-1:0] eq;
  logic [FL_W-1:0] fl;
  logic [RS_W-1:0] rs;
  report_flit_t report;
  logic report_valid, report_ack;
  int checks = 0, failures = 0;
  int mfl, mrs, efl, ers, reports = 0, replaced = 0;

  always #5 clk = ~clk;

  aging_monitor #(.ROUTER_ID(ID)) dut (
    .clk, .rst_n, .eps, .now_t(now), .in_valid(iv), .in_ready(ir),
    .ex_valid(exv), .eq_t(eq), .fl, .rs, .report, .report_valid, .report_ack);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: fl=%0d rs=%0d rep=%0d/%0d exp=%0d/%0d", what, $time,
               fl, rs, report.fl, report.rs, efl, ers);
    end
  endtask

  initial begin
    int d, e, ack_wait;
    iv = '0; ir = '0; exv = '0; eq = '0; now = '0; eps = 0; report_ack = 0;
    mfl = 0; mrs = 0; ack_wait = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 8 * EPS; cyc++) begin
      @(negedge clk);
      now = TS_W'(cyc % EPS);
      eps = (cyc % EPS == EPS - 1);
      iv  = NUM_PORTS'($urandom);
      ir  = NUM_PORTS'($urandom);
      exv = NUM_PORTS'($urandom);
      for (int p = 0; p < NUM_PORTS; p++) begin
        d = $urandom_range(0, 18);
        e = int'(now) - d;
        if (e < 0) e += EPS;
        eq[p] = TS_W'(e);
        if (exv[p] && e <= int'(now)) mrs += (d > 15) ? 15 : d;
      end
      mfl += $countones(iv & ir);
      // acknowledge policy: epsilon 3's report is left unacknowledged
      report_ack = 0;
      if (report_valid) begin
        if (ack_wait == 0 && (cyc / EPS) != 4) report_ack = 1;
        else if (ack_wait > 0) ack_wait--;
      end
      #1;
      if (report_ack) begin
        check(report.fl == FL_W'(efl) && report.rs == RS_W'(ers), "report contents");
        check(report.router_id == ID_W'(ID) && report.pad == '0, "report id");
        reports++;
      end
      @(posedge clk);
      if (eps) begin
        if (report_valid && !report_ack) replaced++;
        efl = mfl; ers = mrs; mfl = 0; mrs = 0;
        ack_wait = $urandom_range(0, 5);
        #1;
        check(report_valid, "report valid after epsilon");
        check(report.fl == FL_W'(efl) && report.rs == RS_W'(ers), "report at epsilon end");
        check(fl == 0 && rs == 0, "counters restart");
      end else begin
        #1;
        check(fl == FL_W'(mfl) && rs == RS_W'(mrs), "running counts");
      end
    end
    checks++;
    if (reports < 5 || replaced == 0) begin
      failures++;
      $display("FAIL handshake coverage: reports=%0d replaced=%0d", reports, replaced);
    end
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
