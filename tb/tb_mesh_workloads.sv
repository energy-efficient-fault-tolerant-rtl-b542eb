// tb_mesh_workloads: synthetic traffic workloads on the default 8x8 mesh.
//
// Uniform, transpose, bit-complement and shuffle traffic at 0.1 flits/cycle/core
// for 300 cycles each, with 10%, 20% and 30% of the 112 links faulty
// (random patterns that keep every router on at least two links and the
// mesh connected). Each run is drained for up to 4000 cycles; delivered
// flits, flits still circulating (livelocked in a fault pocket) and the
// average hop count (latency / 2, two cycles per hop) are printed. The
// network is reset between runs. A misdelivered, duplicated or lost flit,
// or fewer than 90% of the flits of a run delivered, is a failure. A second
// part measures the average latency (cycles from entering the core queue
// to ejection) of uniform traffic at injection rates from 0.02 to 0.2
// flits/cycle/core, fault-free and with 10% random link faults.
//
// Each processing element is modelled as a traffic source with an unbounded
// core buffer and a sink. Every flit carries a unique id in its payload; the
// scoreboard checks that each flit is ejected exactly once, at its
// destination, with its payload intact. Mechanism strobes of all routers
// are counted, and a mechanism that never fired counts as a failure.
`timescale 1ns/1ps
module tb_mesh_workloads;
  import noc_pkg::*;

  localparam int unsigned R = 8;
  localparam int unsigned C = 8;
  localparam int unsigned NN = R * C;
  localparam int unsigned MAXF = 65536;
  localparam int unsigned WATCHDOG = 600000;

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

  mesh_noc dut (.*);

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


  int livelocked = 0;
  // Random fault pattern with k faulty links: every router keeps at least
  // two healthy links and the mesh stays connected (patterns with
  // disconnected or single-entry routers are excluded, as in the evaluation).
  function automatic void random_faults(int k);
    int deg [NN];
    bit ok;
    do begin
      fault_h = '0; fault_v = '0;
      for (int i = 0; i < k; i++) begin
        int l;
        do l = $urandom % (R*(C-1) + (R-1)*C);
        while (l < R*(C-1) ? fault_h[l] : fault_v[l - R*(C-1)]);
        if (l < R*(C-1)) fault_h[l] = 1'b1; else fault_v[l - R*(C-1)] = 1'b1;
      end
      for (int n = 0; n < NN; n++) deg[n] = 0;
      for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
        if (c < C-1 && !fault_h[r*(C-1)+c]) begin deg[r*C+c]++; deg[r*C+c+1]++; end
        if (r < R-1 && !fault_v[r*C+c])     begin deg[r*C+c]++; deg[(r+1)*C+c]++; end
      end
      ok = 1'b1;
      for (int n = 0; n < NN; n++) if (deg[n] < 2) ok = 1'b0;
      if (ok) begin
        bit seen [NN];
        int stack [$];
        int nseen;
        for (int n = 0; n < NN; n++) seen[n] = 1'b0;
        stack.push_back(0); seen[0] = 1'b1; nseen = 1;
        while (stack.size() > 0) begin
          int n, r, c;
          n = stack.pop_back(); r = n / C; c = n % C;
          if (c < C-1 && !fault_h[r*(C-1)+c] && !seen[n+1]) begin seen[n+1] = 1'b1; nseen++; stack.push_back(n+1); end
          if (c > 0 && !fault_h[r*(C-1)+c-1] && !seen[n-1]) begin seen[n-1] = 1'b1; nseen++; stack.push_back(n-1); end
          if (r < R-1 && !fault_v[r*C+c] && !seen[n+C]) begin seen[n+C] = 1'b1; nseen++; stack.push_back(n+C); end
          if (r > 0 && !fault_v[(r-1)*C+c] && !seen[n-C]) begin seen[n-C] = 1'b1; nseen++; stack.push_back(n-C); end
        end
        ok = (nseen == NN);
      end
    end while (!ok);
  endfunction

  // Destination of node n under a synthetic pattern (-1: node does not send).
  function automatic int pattern_dst(int pat, int n);
    int r, c, d;
    r = n / C; c = n % C;
    d = 0;
    case (pat)
      0: begin do d = $urandom % NN; while (d == n); end       // uniform
      1: d = c * C + r;                                          // transpose
      2: d = (R-1-r) * C + (C-1-c);                              // bit complement
      default: d = ((n << 1) | (n >> 5)) & (NN-1);               // shuffle
    endcase
    return (d == n) ? -1 : d;
  endfunction

  initial begin
    int id0, ncyc_base;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);


    for (int pat = 0; pat < 4; pat++)
      for (int fr = 1; fr <= 3; fr++) begin
        int d0, l0, t0, k;
        string pname;
        pname = pat == 0 ? "uniform" : pat == 1 ? "transpose" : pat == 2 ? "bitcomp" : "shuffle";
        k = (112 * fr * 10) / 100;
        random_faults(k);
        @(posedge clk);
        d0 = n_delivered; l0 = lat_sum; t0 = cycle;
        for (int t = 0; t < 300; t++) begin
          for (int n = 0; n < NN; n++)
            if (($urandom % 1000) < 100) begin
              int d;
              d = pattern_dst(pat, n);
              if (d >= 0) send(n, d, 1'b0);
            end
          @(posedge clk);
        end
        // Drain; flits still circulating after the window are counted as
        // livelocked (the two routing rules cannot leave some concave fault
        // pockets), then the network is reset before the next pattern.
        begin
          int w, sent_run;
          w = 0;
          while (outstanding > 0 && w < 4000) begin @(posedge clk); w++; end
          sent_run = n_delivered - d0 + outstanding;
          $display("%-9s faults=%0d%% (%0d links): sent=%0d delivered=%0d circulating=%0d avg_hops=%0d.%02d",
                   pname, fr * 10, k, sent_run, n_delivered - d0, outstanding,
                   (lat_sum - l0) / 2 / (n_delivered - d0),
                   ((lat_sum - l0) * 50 / (n_delivered - d0)) % 100);
          checks++;
          if (n_delivered - d0 < (sent_run * 9) / 10) begin
            failures++;
            $display("ERROR: fewer than 90%% of the flits delivered");
          end
          livelocked += outstanding;
          rst_n <= 1'b0;
          for (int n = 0; n < NN; n++) q[n].delete();
          repeat (2) @(posedge clk);
          outstanding = 0;
          rst_n <= 1'b1;
          @(posedge clk);
        end
      end
    // Average latency versus injection rate, uniform traffic.
    for (int fr = 0; fr <= 1; fr++)
      for (int ri = 0; ri < 5; ri++) begin
        int d0, l0, k, rate, w, sent_run;
        rate = ri == 0 ? 20 : ri == 1 ? 50 : ri == 2 ? 100 : ri == 3 ? 150 : 200;
        k = (112 * fr * 10) / 100;
        if (k > 0) random_faults(k); else begin fault_h = '0; fault_v = '0; end
        @(posedge clk);
        d0 = n_delivered; l0 = lat_sum;
        for (int t = 0; t < 300; t++) begin
          for (int n = 0; n < NN; n++)
            if (($urandom % 1000) < rate) send(n, pattern_dst(0, n), 1'b0);
          @(posedge clk);
        end
        w = 0;
        while (outstanding > 0 && w < 4000) begin @(posedge clk); w++; end
        sent_run = n_delivered - d0 + outstanding;
        $display("uniform   faults=%0d%% rate=0.%03d: sent=%0d delivered=%0d circulating=%0d avg_latency=%0d cycles",
                 fr * 10, rate, sent_run, n_delivered - d0, outstanding,
                 (lat_sum - l0) / (n_delivered - d0));
        checks++;
        if (n_delivered - d0 < (sent_run * 9) / 10) begin
          failures++;
          $display("ERROR: fewer than 90%% of the flits delivered");
        end
        livelocked += outstanding;
        rst_n <= 1'b0;
        for (int n = 0; n < NN; n++) q[n].delete();
        repeat (2) @(posedge clk);
        outstanding = 0;
        rst_n <= 1'b1;
        @(posedge clk);
      end
    require("P5 or P6", cnt_p5 + cnt_p6);
    require("SWAP1 or SWAP2", cnt_sw1 + cnt_sw2);
    require("latch", cnt_latch);
    $display("circulating at the end of the drain windows: %0d", livelocked);


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
