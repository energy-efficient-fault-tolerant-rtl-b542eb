// noc_pkg: types and constants shared by the fault-tolerant deflection router.
//
// A flit on an inter-router link is a 128-bit base flit (destination and
// source coordinates followed by payload) extended by one fault loop bit
// (FLB) that selects XY (0) or YX (1) route computation in the next router,
// and by the four-bit expiry field (EX) used to drop flits whose destination
// router is disconnected. The 128-bit base width, the FLB and the EX field
// follow the router description; the field order, the 3-bit coordinates (an
// 8x8 mesh at most) and the internal per-router annotations (input direction,
// productive port, distance) are choices of this implementation.
//
// Directions are numbered N=0, S=1, E=2, W=3, in the order the fault flags
// NF, SF, EF, WF are listed; LOCAL=4 marks a flit injected by the local core.
// Row 0 is the north edge of the mesh and column 0 the west edge.
package noc_pkg;

  localparam int unsigned NPORTS    = 4;
  localparam int unsigned COORD_W   = 3;
  localparam int unsigned FLIT_W    = 128;
  localparam int unsigned PAYLOAD_W = FLIT_W - 4 * COORD_W;
  localparam int unsigned DIST_W    = COORD_W + 2;

  typedef enum logic [2:0] {
    DIR_N = 3'd0,
    DIR_S = 3'd1,
    DIR_E = 3'd2,
    DIR_W = 3'd3,
    DIR_L = 3'd4
  } dir_e;

  // Port indices into the N,S,E,W arrays (same numbering as dir_e).
  localparam int unsigned P_N = 0;
  localparam int unsigned P_S = 1;
  localparam int unsigned P_E = 2;
  localparam int unsigned P_W = 3;

  // Flit as carried on a link.
  typedef struct packed {
    logic                 valid;
    logic [3:0]           ex;       // expiry field, bit d = entry attempt via side d
    logic                 flb;      // fault loop bit: 0 = XY, 1 = YX
    logic [COORD_W-1:0]   dst_row;
    logic [COORD_W-1:0]   dst_col;
    logic [COORD_W-1:0]   src_row;
    logic [COORD_W-1:0]   src_col;
    logic [PAYLOAD_W-1:0] payload;
  } flit_t;

  // Flit inside a router after route computation (register B onward).
  typedef struct packed {
    flit_t              f;
    dir_e               in_dir;   // port it entered by, DIR_L if injected
    logic [3:0]         prod;     // productive output port, one-hot N,S,E,W (0 at destination)
    logic [DIST_W-1:0]  hops;     // hops to destination (priority: fewer wins)
  } rflit_t;

  // Per-cycle strobes of the router's mechanisms, for monitoring.
  typedef struct packed {
    logic kill;       // a flit with a full EX field was dropped
    logic eject;      // a flit was delivered to the local core
    logic inject;     // a flit from the local core entered
    logic p5;         // permuter P5 reallocated a flit
    logic p6;         // permuter P6 reallocated a flit
    logic swap1;      // SWAP1 exchanged a faulty N/S flit with an E/W flit
    logic swap2;      // SWAP2 exchanged a faulty E/W flit with an N/S flit
    logic latch;      // a latch moved a flit to the opposite port
    logic fallback;   // a flit needed the last-resort placement
    logic lost;       // a flit found no healthy port (must never happen)
    logic deflect;    // a flit left by a port that is not its productive one
    logic ex_set;     // an EX bit was set
  } router_ev_t;

  function automatic logic [1:0] opposite(input logic [1:0] p);
    return {p[1], ~p[0]};
  endfunction

  function automatic logic is_horiz(input logic [1:0] p);
    return p[1];
  endfunction

  // Index of the productive port (lowest set bit of a one-hot mask).
  function automatic logic [1:0] prod_port(input logic [3:0] prod);
    logic [1:0] r;
    r = 2'd0;
    for (int i = 3; i >= 0; i--) if (prod[i]) r = 2'(i);
    return r;
  endfunction

  // True when rflit a wins arbitration over b (valid first, then fewer hops,
  // ties to a).
  function automatic logic wins(input rflit_t a, input rflit_t b);
    if (!b.f.valid) return 1'b1;
    if (!a.f.valid) return 1'b0;
    return a.hops <= b.hops;
  endfunction

endpackage
