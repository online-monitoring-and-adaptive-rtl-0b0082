// tb_flit_counter: self-checking test of the fl counter.
//
// Drives random valid/ready patterns on the five input ports, with a clear
// pulse every 37 cycles, and compares the running count and the count
// including the current cycle with a reference model every cycle. A second
// instance with a 4-bit count checks saturation at 15.
module tb_flit_counter;
  import noc_aging_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0;
  logic [NUM_PORTS-1:0] v, r;
  logic [FL_W-1:0] fl, fl_total;
  logic [3:0] fl4, fl4_total;
  int checks = 0, failures = 0;
  int model, model4, inc;

  always #5 clk = ~clk;

  flit_counter dut (.clk, .rst_n, .clear, .in_valid(v), .in_ready(r), .fl, .fl_total);
  flit_counter #(.W(4)) dut4 (.clk, .rst_n, .clear, .in_valid(v), .in_ready(r),
                              .fl(fl4), .fl_total(fl4_total));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: fl=%0d total=%0d model=%0d", what, fl, fl_total, model);
    end
  endtask

  initial begin
    v = '0; r = '0;
    model = 0; model4 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(negedge clk);
      v = NUM_PORTS'($urandom);
      r = NUM_PORTS'($urandom);
      clear = (cyc % 37 == 36);
      inc = $countones(v & r);
      #1;
      check(fl == FL_W'(model), "running count");
      check(fl_total == FL_W'(model + inc), "total count");
      check(fl4_total == 4'((model4 + inc > 15) ? 15 : model4 + inc), "saturating total");
      @(posedge clk);
      if (clear) begin model = 0; model4 = 0; end
      else begin
        model  = model + inc;
        model4 = (model4 + inc > 15) ? 15 : model4 + inc;
      end
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
