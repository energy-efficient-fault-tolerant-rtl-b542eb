// tb_mesh_noc: end-to-end test of a reduced 4x4 mesh with the expiry field.
//
// Runs a lone flit (latency check), fault-free heavy traffic (deflections,
// injection stalls), traffic over a mesh with spread link faults (P5, P6,
// SWAP1, SWAP2, latches, EX bits) and traffic towards a disconnected router
// (kill block).
//
// Each processing element is modelled as a traffic source with an unbounded
// core buffer and a sink. Every flit carries a unique id in its payload; the
// scoreboard checks that each flit is ejected exactly once, at its
// destination, with its payload intact. Mechanism strobes of all routers
// are counted, and a mechanism that never fired counts as a failure.
`timescale 1ns/1ps
module tb_mesh_noc;
  import noc_pkg::*;

  localparam int unsigned R = 4;
  localparam int unsigned C = 4;
  localparam int unsigned NN = R * C;
  localparam int unsigned MAXF = 65536;
  localparam int unsigned WATCHDOG = 200000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [R*(C-1)-1:0] fault_h = '0;
  logic [(R-1)*C-1:0] fault_v = '0;
  logic       inj_valid [NN];
  flit_t      inj_flit  [NN];
  logic       inj_ready [NN];
  logic       ej_valid  [NN];
  flit_t      ej_flit   [NN];
  router_ev_t ev        [NN];

  mesh_noc #(.ROWS(R), .COLS(C), .EXPIRY_EN(1'b1)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;

  // core buffers
  int q [NN][$];
  int dst_of [MAXF];
  int src_of [MAXF];
  int t_inj [MAXF];
  bit delivered [MAXF];
  bit expect_kill [MAXF];
  int next_id = 0;
  int outstanding = 0;
  int n_delivered = 0;
  int lat_sum = 0;
  int kills = 0, kill_expected = 0;
  int cnt_p5 = 0, cnt_p6 = 0, cnt_sw1 = 0, cnt_sw2 = 0, cnt_latch = 0, cnt_fb = 0;
  int cnt_defl = 0, cnt_inj = 0, cnt_ej = 0, cnt_ex = 0, cnt_lost = 0, cnt_stall = 0;

  function automatic flit_t make_flit(int id);
    flit_t f;
    f = '0;
    f.valid   = 1'b1;
    f.dst_row = COORD_W'(dst_of[id] / C);
    f.dst_col = COORD_W'(dst_of[id] % C);
    f.src_row = COORD_W'(src_of[id] / C);
    f.src_col = COORD_W'(src_of[id] % C);
    f.payload = PAYLOAD_W'(id);
    return f;
  endfunction

  task automatic send(int s, int d, bit kill_ok);
    int id;
    if (next_id >= MAXF) begin
      failures++;
      $display("ERROR: scoreboard full");
      return;
    end
    id = next_id++;
    src_of[id] = s;
    dst_of[id] = d;
    delivered[id] = 1'b0;
    expect_kill[id] = kill_ok;
    t_inj[id] = -1;
    q[s].push_back(id);
    outstanding++;
  endtask

  always_comb begin
    for (int n = 0; n < NN; n++) begin
      inj_valid[n] = (q[n].size() > 0);
      inj_flit[n]  = (q[n].size() > 0) ? make_flit(q[n][0]) : '0;
    end
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      for (int n = 0; n < NN; n++) begin
        if (inj_valid[n] && inj_ready[n]) begin
          t_inj[q[n][0]] = cycle;
          void'(q[n].pop_front());
        end else if (inj_valid[n]) begin
          cnt_stall++;
        end
        if (ej_valid[n]) begin
          int id;
          id = int'(ej_flit[n].payload);
          checks++;
          if (id >= next_id || delivered[id] || dst_of[id] != n ||
              ej_flit[n].src_row != COORD_W'(src_of[id] / C) ||
              ej_flit[n].src_col != COORD_W'(src_of[id] % C)) begin
            failures++;
            $display("ERROR: bad ejection at node %0d id %0d", n, id);
          end else begin
            delivered[id] = 1'b1;
            outstanding--;
            n_delivered++;
            lat_sum += cycle - t_inj[id];
          end
        end
        if (ev[n].kill)     begin kills++; outstanding--; end
        if (ev[n].p5)       cnt_p5++;
        if (ev[n].p6)       cnt_p6++;
        if (ev[n].swap1)    cnt_sw1++;
        if (ev[n].swap2)    cnt_sw2++;
        if (ev[n].latch)    cnt_latch++;
        if (ev[n].fallback) cnt_fb++;
        if (ev[n].deflect)  cnt_defl++;
        if (ev[n].inject)   cnt_inj++;
        if (ev[n].eject)    cnt_ej++;
        if (ev[n].ex_set)   cnt_ex++;
        if (ev[n].lost)     cnt_lost++;
      end
    end
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired, %0d flits outstanding", outstanding);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drain(int limit);
    int t;
    t = 0;
    while (outstanding > 0 && t < limit) begin
      @(posedge clk);
      t++;
    end
    checks++;
    if (outstanding != 0) begin
      failures++;
      $display("ERROR: %0d flits not delivered after %0d cycles", outstanding, limit);
    end
  endtask

  function automatic int node(int r, int c);
    return r * C + c;
  endfunction

  // Uniform random traffic at rate/1000 flits per cycle per core for ncyc
  // cycles, avoiding the node 'skip' as source and destination.
  task automatic uniform(int ncyc, int rate, int skip);
    for (int t = 0; t < ncyc; t++) begin
      for (int n = 0; n < NN; n++) begin
        if (n != skip && ($urandom % 1000) < rate) begin
          int d;
          do d = $urandom % NN; while (d == n || d == skip);
          send(n, d, 1'b0);
        end
      end
      @(posedge clk);
    end
  endtask

  function automatic void set_h(int r, int c);   // link (r,c)-(r,c+1)
    fault_h[r*(C-1)+c] = 1'b1;
  endfunction
  function automatic void set_v(int r, int c);   // link (r,c)-(r+1,c)
    fault_v[r*C+c] = 1'b1;
  endfunction

  function automatic void require(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("ERROR: mechanism '%s' never happened", what);
    end
  endfunction

  initial begin
    int id0, ncyc_base;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);


    // 1. Latency of a lone flit: two cycles per router, 2*hops after injection.
    send(node(0, 0), node(2, 3), 1'b0);
    id0 = next_id - 1;
    drain(200);
    checks++;
    if (lat_sum != 2 * 5) begin
      failures++;
      $display("ERROR: lone flit latency %0d, expected %0d", lat_sum, 2 * 5);
    end
    require("inject", cnt_inj);
    require("eject", cnt_ej);

    // 2. Fault-free uniform traffic at a high rate: deflections.
    uniform(300, 300, -1);
    drain(5000);
    require("deflection", cnt_defl);
    require("injection stall", cnt_stall);

    // 3. Spatially distributed link faults, uniform traffic.
    set_h(1, 1); set_v(1, 2); set_v(0, 1); set_h(3, 1); set_h(2, 0);
    uniform(400, 250, -1);
    drain(20000);
    require("P5", cnt_p5);
    require("P6", cnt_p6);
    require("SWAP1", cnt_sw1);
    require("SWAP2", cnt_sw2);
    require("latch", cnt_latch);
    require("EX bit set", cnt_ex);

    // 4. Router (1,1) disconnected: flits to it expire and are killed.
    fault_h = '0; fault_v = '0;
    set_v(0, 1); set_v(1, 1); set_h(1, 0); set_h(1, 1);
    @(posedge clk);
    // Flits to the disconnected router are sent one at a time: under
    // contention a deflected flit can circle without trying all four sides.
    for (int n = 0; n < NN; n++)
      if (n != node(1, 1)) begin
        send(n, node(1, 1), 1'b1);
        kill_expected++;
        drain(1000);
      end
    uniform(100, 100, node(1, 1));
    drain(20000);
    checks++;
    if (kills != kill_expected) begin
      failures++;
      $display("ERROR: kills %0d, expected %0d", kills, kill_expected);
    end
    require("kill", kills);


    $display("delivered=%0d kills=%0d avg_latency=%0d deflecting_cycles=%0d", n_delivered, kills,
             n_delivered ? lat_sum / n_delivered : 0, cnt_defl);
    $display("P5=%0d P6=%0d SWAP1=%0d SWAP2=%0d latch=%0d fallback=%0d ex_set=%0d inj_stall=%0d",
             cnt_p5, cnt_p6, cnt_sw1, cnt_sw2, cnt_latch, cnt_fb, cnt_ex, cnt_stall);
    checks++;
    if (cnt_lost != 0) begin failures++; $display("ERROR: %0d flits lost", cnt_lost); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
