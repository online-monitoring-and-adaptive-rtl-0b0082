// tb_aging_noc_top_full: the aging subsystem with every parameter at its
// default (epsilon of 10,000 cycles) taken through two complete monitoring
// epsilons: counting, reporting, table lookup and age update for all
// sixteen routers, checked against the reference of tb_noc_body.svh. The
// default period (one week) is far beyond simulation, so no routing update
// happens here; the reduced end-to-end test covers it.
module tb_aging_noc_top_full;
  import noc_aging_pkg::*;

  localparam int EPS = 10_000;
  localparam int NUM_EPS = 2;
  localparam bit EXPECT_ROUTES = 0;

  `include "tb_noc_body.svh"

  aging_noc_top dut (.*);

  initial begin
    repeat ((NUM_EPS + 4) * EPS + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
