// tb_routing_table: self-checking test of a router's routing table.
//
// Two tables (routers 5 and 0) are checked after reset: every destination
// must hold the XY path and the first-hop port must point towards the
// destination along X first. Random path masks are then written and read
// back, with the first-hop port recomputed from the mask. The in-transit
// decode is checked for random destinations, masks and hop indices against
// ports worked out from mesh coordinates (east = x+1, south = y+1).
module tb_routing_table;
  import noc_aging_pkg::*;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [ID_W-1:0] wr_dst, rd_dst, fw_dst;
  logic [MAX_HOPS-1:0] wr_path, rd_path, rd_path0, fw_path;
  logic [$clog2(MAX_HOPS+1)-1:0] fw_hop;
  port_e rd_port, rd_port0, next_port, next_port0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  routing_table #(.SRC_ID(5)) dut (.clk, .rst_n, .wr_en, .wr_dst, .wr_path, .rd_dst,
                                   .rd_path, .rd_port, .fw_dst, .fw_path, .fw_hop, .next_port);
  routing_table #(.SRC_ID(0)) dut0 (.clk, .rst_n, .wr_en(1'b0), .wr_dst, .wr_path, .rd_dst,
                                    .rd_path(rd_path0), .rd_port(rd_port0), .fw_dst, .fw_path,
                                    .fw_hop, .next_port(next_port0));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: dst=%0d path=%b port=%0d", what, rd_dst, rd_path, rd_port);
    end
  endtask

  // Port from router 'c' towards 'd' for an X (x=1) or Y hop.
  function automatic int ref_port(int c, int d, int x);
    int cx = c % 4, cy = c / 4, dx = d % 4, dy = d / 4;
    if (c == d) return 0;
    if (x) return (dx > cx) ? 2 : 4;
    return (dy > cy) ? 3 : 1;
  endfunction

  int shadow [16];

  initial begin
    int nx, dx, dy;
    wr_dst = '0; wr_path = '0; rd_dst = '0; fw_dst = '0; fw_path = '0; fw_hop = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int d = 0; d < 16; d++) begin
      @(negedge clk) rd_dst = ID_W'(d);
      #1;
      dx = d % 4 - 1; dy = d / 4 - 1;          // router 5 is at (1, 1)
      nx = dx < 0 ? -dx : dx;
      check(int'(rd_path) == (1 << nx) - 1, "reset XY path (router 5)");
      check(int'(rd_port) == ref_port(5, d, nx > 0), "reset first port (router 5)");
      nx = d % 4;
      check(int'(rd_path0) == (1 << nx) - 1, "reset XY path (router 0)");
      check(int'(rd_port0) == ref_port(0, d, nx > 0), "reset first port (router 0)");
      shadow[d] = (1 << (d % 4 > 1 ? d % 4 - 1 : 1 - d % 4)) - 1;
    end
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      wr_en = ($urandom_range(0, 1) == 1);
      wr_dst = ID_W'($urandom_range(0, 15));
      wr_path = MAX_HOPS'($urandom);
      if (wr_en) shadow[wr_dst] = int'(wr_path);
      rd_dst = ID_W'($urandom_range(0, 15));
      @(negedge clk);
      wr_en = 0;
      #1;
      check(int'(rd_path) == shadow[rd_dst], "read back");
      check(int'(rd_port) == ref_port(5, int'(rd_dst), shadow[rd_dst] & 1), "first port");
      check(rd_path0 == xy_path(0, rd_dst), "other table untouched");
    end
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      fw_dst  = ID_W'($urandom_range(0, 15));
      fw_path = MAX_HOPS'($urandom);
      fw_hop  = 3'($urandom_range(0, MAX_HOPS - 1));
      #1;
      check(int'(next_port) == ref_port(5, int'(fw_dst), fw_path[fw_hop]), "transit port (5)");
      check(int'(next_port0) == ref_port(0, int'(fw_dst), fw_path[fw_hop]), "transit port (0)");
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
