// router: two-stage bufferless deflection router with port reallocation.
//
// Stage 1 (input links to register B): the kill block drops flits whose EX
// field is full, one locally destined flit is ejected, one flit from the
// local core may be injected into a vacant slot, and the productive port and
// hop distance of each flit are computed from its FLB (XY or YX).
// Stage 2 (register B to register C): the PDN assigns the four flits to the
// four output lines without regard to faults; the FTLU and the latches
// then move every flit off a faulty port, and the FLB and EX fields are
// updated. Register C drives the output links directly, so a flit spends
// two cycles in each router and the next router's stage 1 reads the link
// combinationally (register A of the classic pipeline diagram is taken to be the
// previous router's register C; this is this design's reading).
//
// Fault flags (N,S,E,W) mark unusable ports; at the mesh boundary the
// missing ports are marked faulty by the mesh. A router with three faulty
// ports lifts the no-return rule; one with four is disconnected and never
// injects. With EXPIRY_EN = 0 (the evaluated configuration, without the EX
// field) the EX bits stay zero and the kill block is inactive.
//
// Interface: links in/out as flit_t (valid bit inside), valid/ready
// injection, valid-only ejection, per-cycle mechanism strobes. Synchronous,
// active-low reset clears registers B and C.
module router
  import noc_pkg::*;
#(
  parameter int unsigned ROW       = 0,
  parameter int unsigned COL       = 0,
  parameter bit          EXPIRY_EN = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NPORTS-1:0]  fault,
  input  flit_t              in_flit  [NPORTS],
  output flit_t              out_flit [NPORTS],
  input  logic               inj_valid,
  input  flit_t              inj_flit,
  output logic               inj_ready,
  output logic               ej_valid,
  output flit_t              ej_flit,
  output router_ev_t         ev
);

  localparam logic [COORD_W-1:0] MY_ROW = COORD_W'(ROW);
  localparam logic [COORD_W-1:0] MY_COL = COORD_W'(COL);

  // ---------------- stage 1 ----------------
  flit_t             k_flit [NPORTS];
  flit_t             e_flit [NPORTS];
  flit_t             i_flit [NPORTS];
  logic [NPORTS-1:0] killed, injected;
  rflit_t            b_d [NPORTS];
  rflit_t            b_q [NPORTS];

  kill_block u_kill (
    .en(EXPIRY_EN), .in_flit(in_flit), .out_flit(k_flit), .killed(killed)
  );

  eject_unit u_eject (
    .in_flit(k_flit), .my_row(MY_ROW), .my_col(MY_COL),
    .out_flit(e_flit), .ej_valid(ej_valid), .ej_flit(ej_flit)
  );

  inject_unit u_inject (
    .in_flit(e_flit), .fault(fault), .inj_valid(inj_valid), .inj_flit(inj_flit),
    .inj_ready(inj_ready), .out_flit(i_flit), .injected(injected)
  );

  for (genvar p = 0; p < NPORTS; p++) begin : g_rc
    logic [3:0]        prod;
    logic [DIST_W-1:0] hops;
    route_compute u_rc (
      .flit(i_flit[p]), .my_row(MY_ROW), .my_col(MY_COL), .prod(prod), .hops(hops)
    );
    always_comb begin
      b_d[p].f      = i_flit[p];
      b_d[p].in_dir = injected[p] ? DIR_L : dir_e'(p);
      b_d[p].prod   = prod;
      b_d[p].hops   = hops;
      if (!i_flit[p].valid) b_d[p] = '0;
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < NPORTS; p++) begin
      if (!rst_n) b_q[p] <= '0;
      else        b_q[p] <= b_d[p];
    end
  end

  // ---------------- stage 2 ----------------
  rflit_t            pdn_line [NPORTS];
  rflit_t            ftlu_line [NPORTS];
  rflit_t            fin_line [NPORTS];
  logic [NPORTS-1:0] ftlu_moved;
  logic              exempt;
  logic              u5, u6, us1, us2, ul, ufb, ulost;
  flit_t             c_d [NPORTS];
  logic [NPORTS-1:0] defl, exs;

  always_comb begin
    int unsigned nf;
    nf = 0;
    for (int p = 0; p < NPORTS; p++) nf += 32'(fault[p]);
    exempt = (nf == 3);
  end

  pdn u_pdn (.b(b_q), .line(pdn_line));

  ftlu u_ftlu (
    .line_in(pdn_line), .fault(fault), .exempt(exempt),
    .line_out(ftlu_line), .moved(ftlu_moved),
    .used_p5(u5), .used_p6(u6), .used_swap1(us1), .used_swap2(us2)
  );

  latch_realloc u_latch (
    .line_in(ftlu_line), .moved_in(ftlu_moved), .fault(fault), .exempt(exempt),
    .line_out(fin_line), .used_latch(ul), .fallback(ufb), .lost(ulost)
  );

  // Expiry field: one hop from the destination and turned away because the
  // productive port is faulty -> mark the destination side that was tried.
  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      c_d[p]  = fin_line[p].f;
      defl[p] = fin_line[p].f.valid && (fin_line[p].prod != '0) && !fin_line[p].prod[p];
      exs[p]  = 1'b0;
      if (EXPIRY_EN && fin_line[p].f.valid && fin_line[p].hops == DIST_W'(1) &&
          (fin_line[p].prod & fault) != '0) begin
        c_d[p].ex[opposite(prod_port(fin_line[p].prod))] = 1'b1;
        exs[p] = 1'b1;
      end
      if (!EXPIRY_EN) c_d[p].ex = '0;
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < NPORTS; p++) begin
      if (!rst_n) out_flit[p] <= '0;
      else        out_flit[p] <= c_d[p];
    end
  end

  always_comb begin
    ev          = '0;
    ev.kill     = |killed;
    ev.eject    = ej_valid;
    ev.inject   = |injected;
    ev.p5       = u5;
    ev.p6       = u6;
    ev.swap1    = us1;
    ev.swap2    = us2;
    ev.latch    = ul;
    ev.fallback = ufb;
    ev.lost     = ulost;
    ev.deflect  = |defl;
    ev.ex_set   = |exs;
  end

endmodule
