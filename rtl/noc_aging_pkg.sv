// noc_aging_pkg: shared constants, types and helper functions of the aging
// monitoring and aging-aware routing subsystem for a 2-D mesh NoC.
//
// Sizes that follow the original scheme: a 4x4 mesh, five ports per router,
// a 12-bit flit count (fl), a 14-bit residence-time sum (rs), an epsilon of
// 10,000 cycles, 128-bit flits and at most 15 cycles of residence per flit
// (4-bit per-flit residence). Own choices: the port numbering below, the bit
// layout of the report flit, and the path encoding (one bit per hop, 1 = an
// X hop, 0 = a Y hop, hop 0 in bit 0; the X and Y directions follow from the
// signs of the coordinate differences, so every such path is minimal).
package noc_aging_pkg;

  // Mesh geometry. Router id = y * MESH_X + x, r0 at the top left (x grows to
  // the east, y grows to the south).
  localparam int MESH_X      = 4;
  localparam int MESH_Y      = 4;
  localparam int NUM_ROUTERS = MESH_X * MESH_Y;
  localparam int ID_W        = $clog2(NUM_ROUTERS);
  localparam int MAX_HOPS    = (MESH_X - 1) + (MESH_Y - 1);

  // Router ports.
  localparam int NUM_PORTS = 5;
  typedef enum logic [2:0] {
    PORT_LOCAL = 3'd0,
    PORT_NORTH = 3'd1,
    PORT_EAST  = 3'd2,
    PORT_SOUTH = 3'd3,
    PORT_WEST  = 3'd4
  } port_e;

  // Monitor widths.
  localparam int FL_W   = 12;     // flit counter
  localparam int RS_W   = 14;     // residence-time counter and time stamps
  localparam int TS_W   = 14;     // time stamp carried in a flit
  localparam int RES_W  = 4;      // one flit's residence time (max 15 cycles)
  localparam int FLIT_W = 128;    // flit size (16 bytes)

  // Report flit that carries one router's (fl, rs) for one epsilon to the CAT.
  typedef struct packed {
    logic [FLIT_W-ID_W-FL_W-RS_W-1:0] pad;
    logic [ID_W-1:0]                  router_id;
    logic [FL_W-1:0]                  fl;
    logic [RS_W-1:0]                  rs;
  } report_flit_t;

  // Coordinates of a router id.
  function automatic int unsigned x_of(input int unsigned id);
    return id % MESH_X;
  endfunction
  function automatic int unsigned y_of(input int unsigned id);
    return id / MESH_X;
  endfunction

  // Number of X hops and of all hops between two routers.
  function automatic int unsigned x_hops(input int unsigned src, input int unsigned dst);
    return (x_of(dst) >= x_of(src)) ? x_of(dst) - x_of(src) : x_of(src) - x_of(dst);
  endfunction
  function automatic int unsigned total_hops(input int unsigned src, input int unsigned dst);
    int unsigned yh;
    yh = (y_of(dst) >= y_of(src)) ? y_of(dst) - y_of(src) : y_of(src) - y_of(dst);
    return x_hops(src, dst) + yh;
  endfunction

  // Path of dimension-order XY routing: all X hops first.
  function automatic logic [MAX_HOPS-1:0] xy_path(input int unsigned src, input int unsigned dst);
    logic [MAX_HOPS-1:0] p;
    p = '0;
    for (int i = 0; i < MAX_HOPS; i++)
      if (i < int'(x_hops(src, dst))) p[i] = 1'b1;
    return p;
  endfunction

  // Router reached after taking one hop of the given kind from 'cur' towards 'dst'.
  function automatic int unsigned step(input int unsigned cur, input int unsigned dst,
                                       input logic x_hop);
    if (x_hop) return (x_of(dst) > x_of(cur)) ? cur + 1 : cur - 1;
    else       return (y_of(dst) > y_of(cur)) ? cur + MESH_X : cur - MESH_X;
  endfunction

  // Output port a router takes for a flit to 'dst' when the next hop is of the
  // given kind; PORT_LOCAL when the flit has arrived.
  function automatic port_e hop_port(input int unsigned cur, input int unsigned dst,
                                     input logic x_hop);
    if (cur == dst) return PORT_LOCAL;
    if (x_hop)      return (x_of(dst) > x_of(cur)) ? PORT_EAST : PORT_WEST;
    else            return (y_of(dst) > y_of(cur)) ? PORT_SOUTH : PORT_NORTH;
  endfunction

endpackage
