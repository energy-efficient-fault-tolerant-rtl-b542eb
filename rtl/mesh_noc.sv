// mesh_noc: ROWS x COLS mesh of fault-tolerant bufferless deflection routers.
//
// Every node holds one router and connects to a processing element through
// the router's injection (valid/ready) and ejection (valid) ports, which
// are brought out here per node (node n = row*COLS + col, row 0 north,
// column 0 west). Neighbouring routers are joined by bidirectional links:
// register C of one router drives the input of the other directly, so a
// flit advances one router every two cycles.
//
// Faults are given per bidirectional link. A set link fault sets the fault
// flag of the matching port in both routers at its ends and disables both
// directions of the link; ports on the mesh boundary are flagged faulty, so
// every router is the same design. Fault flags are expected to change only
// while the network is empty (they model the result of a diagnosis phase).
// The 8x8 default is the evaluated network size; EXPIRY_EN = 0 is the
// evaluated configuration without the expiry field.
//
// Interface: fault_h[r*(COLS-1)+c] is the link between (r,c) and (r,c+1);
// fault_v[r*COLS+c] the link between (r,c) and (r+1,c). ev[n] gives the
// per-cycle mechanism strobes of router n.
module mesh_noc
  import noc_pkg::*;
#(
  parameter int unsigned ROWS      = 8,
  parameter int unsigned COLS      = 8,
  parameter bit          EXPIRY_EN = 1'b0
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [ROWS*(COLS-1)-1:0]    fault_h,
  input  logic [(ROWS-1)*COLS-1:0]    fault_v,
  input  logic                        inj_valid [ROWS*COLS],
  input  flit_t                       inj_flit  [ROWS*COLS],
  output logic                        inj_ready [ROWS*COLS],
  output logic                        ej_valid  [ROWS*COLS],
  output flit_t                       ej_flit   [ROWS*COLS],
  output router_ev_t                  ev        [ROWS*COLS]
);

  flit_t             rout [ROWS*COLS][NPORTS];
  flit_t             rin  [ROWS*COLS][NPORTS];
  logic [NPORTS-1:0] flags [ROWS*COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned N = r * COLS + c;

      if (r == 0)        begin : g_fn assign flags[N][P_N] = 1'b1; end
      else               begin : g_fn assign flags[N][P_N] = fault_v[(r-1)*COLS + c]; end
      if (r == ROWS - 1) begin : g_fs assign flags[N][P_S] = 1'b1; end
      else               begin : g_fs assign flags[N][P_S] = fault_v[r*COLS + c]; end
      if (c == COLS - 1) begin : g_fe assign flags[N][P_E] = 1'b1; end
      else               begin : g_fe assign flags[N][P_E] = fault_h[r*(COLS-1) + c]; end
      if (c == 0)        begin : g_fw assign flags[N][P_W] = 1'b1; end
      else               begin : g_fw assign flags[N][P_W] = fault_h[r*(COLS-1) + c - 1]; end

      // Input channels of a faulty port are disabled as well.
      always_comb begin
        rin[N][P_N] = (r == 0)        ? '0 : rout[(r == 0 ? 0 : N - COLS)][P_S];
        rin[N][P_S] = (r == ROWS - 1) ? '0 : rout[(r == ROWS - 1 ? 0 : N + COLS)][P_N];
        rin[N][P_E] = (c == COLS - 1) ? '0 : rout[(c == COLS - 1 ? 0 : N + 1)][P_W];
        rin[N][P_W] = (c == 0)        ? '0 : rout[(c == 0 ? 0 : N - 1)][P_E];
        for (int p = 0; p < NPORTS; p++) if (flags[N][p]) rin[N][p] = '0;
      end

      router #(.ROW(r), .COL(c), .EXPIRY_EN(EXPIRY_EN)) u_router (
        .clk      (clk),
        .rst_n    (rst_n),
        .fault    (flags[N]),
        .in_flit  (rin[N]),
        .out_flit (rout[N]),
        .inj_valid(inj_valid[N]),
        .inj_flit (inj_flit[N]),
        .inj_ready(inj_ready[N]),
        .ej_valid (ej_valid[N]),
        .ej_flit  (ej_flit[N]),
        .ev       (ev[N])
      );
    end
  end

endmodule
