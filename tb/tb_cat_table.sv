// tb_cat_table: self-checking test of the Centralized Aging Table.
//
// Loads every entry with a distinct signed value (entry k holds 37*k - 100,
// so the idle entry is negative), then looks up random and boundary (rs, fl)
// pairs. The expected range of a value v is worked out by division:
// 0 for v = 0, otherwise ceil(v * STEPS / MAX) limited to STEPS. The
// registered answer must appear one cycle after the request.
module tb_cat_table;
  import noc_aging_pkg::*;

  localparam int RS_MAX = 10_000, FL_MAX = 2_300, STEPS = 8, DD_W = 16;
  localparam int ENTRIES = (STEPS + 1) * (STEPS + 1);
  localparam int AW = $clog2(ENTRIES);

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, lookup = 0;
  logic [AW-1:0] wr_addr, index;
  logic signed [DD_W-1:0] wr_data, dd;
  logic [RS_W-1:0] rs;
  logic [FL_W-1:0] fl;
  logic dd_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cat_table dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_data, .lookup, .rs, .fl,
                 .index, .dd, .dd_valid);

  function automatic int ref_bin(int v, int vmax);
    int b;
    if (v == 0) return 0;
    b = (v * STEPS + vmax - 1) / vmax;
    return (b > STEPS) ? STEPS : b;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: rs=%0d fl=%0d index=%0d dd=%0d", what, rs, fl, index, dd);
    end
  endtask

  task automatic probe(input int r, input int f);
    int k;
    @(negedge clk);
    rs = RS_W'(r); fl = FL_W'(f); lookup = 1;
    k = ref_bin(r, RS_MAX) * (STEPS + 1) + ref_bin(f, FL_MAX);
    #1 check(index == AW'(k), "index");
    @(negedge clk);
    lookup = 0;
    check(dd_valid, "answer valid after one cycle");
    check(dd == DD_W'(37 * k - 100), "entry value");
    #1;
    @(negedge clk);
    check(!dd_valid, "valid is one cycle");
  endtask

  initial begin
    rs = '0; fl = '0; wr_addr = '0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < ENTRIES; k++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(k); wr_data = DD_W'(37 * k - 100);
    end
    @(negedge clk) wr_en = 0;
    probe(0, 0);
    probe(1, 1);
    probe(RS_MAX, FL_MAX);
    probe(RS_MAX / STEPS, FL_MAX / STEPS);
    probe(RS_MAX / STEPS + 1, FL_MAX / STEPS + 1);
    probe(16_383, 4_095);
    probe(6_000, 250);
    for (int i = 0; i < 300; i++)
      probe($urandom_range(0, 12_000), $urandom_range(0, 2_600));
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
