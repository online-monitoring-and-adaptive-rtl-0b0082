// cat_table: the Centralized Aging Table (CAT) held by one central core.
//
// The table stores, for every condition C(i,j) = (residence-time range i,
// flit-count range j), the delay degradation a router suffers during one
// epsilon spent in that condition. Entry (0,0), an idle router, holds a
// negative value: the recovery of BTI aging. A lookup takes the (fl, rs)
// pair of one report, quantises each into its range and reads the entry.
//
// Quantisation: range 0 is the value 0 only; ranges 1..STEPS split (0, MAX]
// into equal parts, so bin(v) = ceil(v * STEPS / MAX), limited to STEPS (a
// value above MAX, possible for the summed rs, falls into the top range).
// It is a chain of comparisons against constant thresholds, with no divider.
// The table has (RS_STEPS+1) x (FL_STEPS+1) signed entries, index
// rs_bin * (FL_STEPS+1) + fl_bin.
//
// The contents come from an offline flow (power and temperature per
// condition, then the BTI/HCI aging equations) and are written through the
// write port after power-up; they are not reset.
//
// Follows the original scheme: a table indexed by (rs, fl) ranges from zero up
// to RS_MAX = epsilon = 10,000 cycles and FL_MAX = 2,300 flits, with a
// negative recovery entry for the idle case. Own choices: the number of
// ranges (the original scheme leaves the step counts open), equal range sizes,
// the entry width and unit, and the write port.
//
// Timing: the lookup result 'dd' is registered; 'dd_valid' follows 'lookup'
// by one cycle.
module cat_table
  import noc_aging_pkg::*;
#(
  parameter int unsigned RS_MAX   = 10_000,
  parameter int unsigned FL_MAX   = 2_300,
  parameter int unsigned RS_STEPS = 8,
  parameter int unsigned FL_STEPS = 8,
  parameter int          DD_W     = 16,
  localparam int unsigned ENTRIES = (RS_STEPS + 1) * (FL_STEPS + 1),
  localparam int          AW      = $clog2(ENTRIES)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // table load
  input  logic                   wr_en,
  input  logic [AW-1:0]          wr_addr,
  input  logic signed [DD_W-1:0] wr_data,
  // lookup
  input  logic                   lookup,
  input  logic [RS_W-1:0]        rs,
  input  logic [FL_W-1:0]        fl,
  output logic [AW-1:0]          index,     // combinational index of (rs, fl)
  output logic signed [DD_W-1:0] dd,
  output logic                   dd_valid
);

  logic signed [DD_W-1:0] mem [ENTRIES];

  // Range of a value: the number of k in 0..STEPS-1 with v*STEPS > k*MAX,
  // which is ceil(v*STEPS/MAX) limited to STEPS.
  function automatic int unsigned bin_of(input int unsigned v, input int unsigned vmax,
                                         input int unsigned steps);
    int unsigned b;
    b = 0;
    for (int unsigned k = 0; k < steps; k++)
      if (longint'(v) * steps > longint'(k) * vmax) b++;
    return b;
  endfunction

  always_comb
    index = AW'(bin_of(int'(rs), RS_MAX, RS_STEPS) * (FL_STEPS + 1)
              + bin_of(int'(fl), FL_MAX, FL_STEPS));

  always_ff @(posedge clk)
    if (wr_en) mem[wr_addr] <= wr_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dd       <= '0;
      dd_valid <= 1'b0;
    end else begin
      dd_valid <= lookup;
      if (lookup) dd <= mem[index];
    end
  end

endmodule
