// tb_aging_noc_top: end-to-end test of the aging monitoring and routing
// subsystem at a reduced epsilon (1,000 cycles) and period (4 epsilons),
// over 13 epsilons, so that three routing updates take place. Random
// traffic drives all sixteen monitors; ages and routing tables are compared
// with an independent reference (see tb_noc_body.svh).
module tb_aging_noc_top;
  import noc_aging_pkg::*;

  localparam int EPS = 1000;
  localparam int NUM_EPS = 13;
  localparam bit EXPECT_ROUTES = 1;

  `include "tb_noc_body.svh"

  aging_noc_top #(.EPS_CYCLES(EPS), .N_EPS(4)) dut (.*);

  initial begin
    repeat ((NUM_EPS + 4) * EPS + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
