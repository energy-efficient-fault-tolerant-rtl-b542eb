// route_compute: productive output port and hop distance of one flit.
//
// With the fault loop bit clear the flit is routed XY: it first corrects its
// column (east or west) and then its row (north or south). With FLB set it is
// routed YX: row first, then column. Switching between the two after a port
// reallocation is what steers a displaced flit back toward its destination.
// The hop distance is the Manhattan distance, used by the permuters as the
// priority (fewer hops wins). Purely combinational; used in stage 1.
//
// Interface: flit and the router's own coordinates in; one-hot productive
// port mask (N,S,E,W; all zero when the flit is at its destination) and the
// distance out. Row numbers grow southward and columns eastward; this
// orientation is this implementation's choice.
module route_compute
  import noc_pkg::*;
(
  input  flit_t               flit,
  input  logic [COORD_W-1:0]  my_row,
  input  logic [COORD_W-1:0]  my_col,
  output logic [3:0]          prod,
  output logic [DIST_W-1:0]   hops
);

  logic [3:0]         row_p, col_p;
  logic [COORD_W-1:0] dr, dc;

  always_comb begin
    row_p = '0;
    col_p = '0;
    if (flit.dst_row < my_row) row_p[P_N] = 1'b1;
    if (flit.dst_row > my_row) row_p[P_S] = 1'b1;
    if (flit.dst_col > my_col) col_p[P_E] = 1'b1;
    if (flit.dst_col < my_col) col_p[P_W] = 1'b1;
    dr = (flit.dst_row > my_row) ? flit.dst_row - my_row : my_row - flit.dst_row;
    dc = (flit.dst_col > my_col) ? flit.dst_col - my_col : my_col - flit.dst_col;
    hops = DIST_W'(dr) + DIST_W'(dc);
    if (!flit.flb) prod = (col_p != '0) ? col_p : row_p;
    else           prod = (row_p != '0) ? row_p : col_p;
  end

endmodule
