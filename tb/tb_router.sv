// tb_router: one router at (1,2) of the mesh, driven directly.
//  * A lone flit leaves on its productive port two cycles after it arrives.
//  * A flit for this router is ejected in the cycle it arrives.
//  * An injected flit leaves on its productive port two cycles later;
//    injection is refused when all four ports are faulty.
//  * Faulty productive ports: the flit leaves by an orthogonal port with the
//    FLB rule (YX after an east/west reallocation, XY after north/south).
//  * Random traffic that respects the link faults: every flit leaves
//    exactly once, two cycles later, on a healthy port, or is ejected.
//  * A second router with the expiry field sets an EX bit and kills a flit
//    whose EX field is full.
`timescale 1ns/1ps
module tb_router;
  import noc_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic [NPORTS-1:0] fault;
  flit_t             in_flit  [NPORTS];
  flit_t             out_flit [NPORTS];
  logic              inj_valid;
  flit_t             inj_flit;
  logic              inj_ready;
  logic              ej_valid;
  flit_t             ej_flit;
  router_ev_t        ev;

  flit_t             out2 [NPORTS];
  logic              inj_ready2, ej_valid2;
  flit_t             ej_flit2;
  router_ev_t        ev2;

  router #(.ROW(1), .COL(2)) dut (.*);
  router #(.ROW(1), .COL(2), .EXPIRY_EN(1'b1)) dut2 (
    .clk, .rst_n, .fault, .in_flit, .out_flit(out2), .inj_valid, .inj_flit,
    .inj_ready(inj_ready2), .ej_valid(ej_valid2), .ej_flit(ej_flit2), .ev(ev2)
  );

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic flit_t mk(int id, int dr, int dc);
    flit_t f;
    f = '0;
    f.valid = 1'b1;
    f.dst_row = 3'(dr);
    f.dst_col = 3'(dc);
    f.payload = PAYLOAD_W'(id);
    return f;
  endfunction

  task automatic idle();
    for (int p = 0; p < 4; p++) in_flit[p] = '0;
    inj_valid = 1'b0;
    inj_flit = '0;
  endtask

  // Drive one cycle, then wait two edges and return what left.
  task automatic step2();
    @(posedge clk); #1;
    idle();
    @(posedge clk); #1;
  endtask

  task automatic expect_out(string name, int port, int id, bit flb);
    checks++;
    if (!out_flit[port].valid || int'(out_flit[port].payload) != id || out_flit[port].flb != flb) begin
      failures++;
      $display("ERROR %s: port %0d valid=%0d id=%0d flb=%0d", name, port, out_flit[port].valid,
               out_flit[port].payload, out_flit[port].flb);
    end
  endtask

  int sent [int];
  int pend_t [int];
  int nrand = 0;

  initial begin
    idle();
    fault = 4'b0000;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // lone flit from west to (1,5): east, FLB 0
    in_flit[P_W] = mk(1, 1, 5);
    step2();
    expect_out("lone east", P_E, 1, 1'b0);

    // YX flit from east to (4,0): south first
    in_flit[P_E] = mk(2, 4, 0); in_flit[P_E].flb = 1'b1;
    step2();
    expect_out("lone YX", P_S, 2, 1'b0);

    // ejection, same cycle
    in_flit[P_N] = mk(3, 1, 2);
    #1;
    checks++;
    if (!ej_valid || int'(ej_flit.payload) != 3) begin failures++; $display("ERROR eject"); end
    step2();

    // injection to (0,2): north
    inj_valid = 1'b1; inj_flit = mk(4, 0, 2);
    #1;
    checks++; if (!inj_ready) begin failures++; $display("ERROR inject refused"); end
    step2();
    expect_out("inject", P_N, 4, 1'b0);

    // all ports faulty: injection throttled
    fault = 4'b1111;
    inj_valid = 1'b1; inj_flit = mk(5, 0, 2);
    #1;
    checks++; if (inj_ready) begin failures++; $display("ERROR disconnected router injected"); end
    idle();

    // east faulty: flit from west to (1,5) reallocated north/south, FLB 0
    fault = 4'b0100;
    in_flit[P_W] = mk(6, 1, 5);
    step2();
    checks++;
    if (!((out_flit[P_N].valid && out_flit[P_N].payload == 6 && !out_flit[P_N].flb) ||
          (out_flit[P_S].valid && out_flit[P_S].payload == 6 && !out_flit[P_S].flb))) begin
      failures++; $display("ERROR east fault reallocation");
    end

    // south faulty: flit from north to (5,2) reallocated east/west, FLB 1
    fault = 4'b0010;
    in_flit[P_N] = mk(7, 5, 2);
    step2();
    checks++;
    if (!((out_flit[P_E].valid && out_flit[P_E].payload == 7 && out_flit[P_E].flb) ||
          (out_flit[P_W].valid && out_flit[P_W].payload == 7 && out_flit[P_W].flb))) begin
      failures++; $display("ERROR south fault reallocation");
    end

    // expiry: one hop from (0,2) with north faulty -> EX bit of side S set
    fault = 4'b0001;
    in_flit[P_S] = mk(8, 0, 2);
    step2();
    checks++;
    begin
      bit ok;
      ok = 1'b0;
      for (int p = 0; p < 4; p++)
        if (out2[p].valid && out2[p].payload == 8 && out2[p].ex == 4'b0010) ok = 1'b1;
      if (!ok) begin failures++; $display("ERROR EX bit not set"); end
    end
    // a full EX field is killed on entry (second router only)
    fault = 4'b0000;
    in_flit[P_S] = mk(9, 0, 2); in_flit[P_S].ex = 4'hf;
    #1;
    checks++; if (!ev2.kill || ev.kill) begin failures++; $display("ERROR kill"); end
    step2();

    // random traffic that respects the faults
    for (int t = 0; t < 3000; t++) begin
      int nh, nin;
      @(posedge clk); #1;
      if (t % 200 == 0) begin
        // drain, then change the flags while the router is empty
        idle();
        step2();
        @(posedge clk); #1;
        pend_t.delete();
        fault = 4'($urandom) & 4'($urandom);
      end
      idle();
      nh = 4 - $countones(fault);
      nin = 0;
      for (int p = 0; p < 4; p++)
        if (!fault[p] && $urandom % 2) begin
          in_flit[p] = mk(1000 + nrand, $urandom % 8, $urandom % 8);
          pend_t[1000 + nrand] = t;
          nrand++;
        end
      if ($urandom % 2) begin
        inj_valid = 1'b1;
        inj_flit = mk(1000 + nrand, $urandom % 8, $urandom % 8);
        pend_t[1000 + nrand] = -t - 1;   // counted only if accepted
        nrand++;
      end
      #1;
      if (ej_valid) begin
        checks++;
        if (ej_flit.dst_row != 1 || ej_flit.dst_col != 2) begin failures++; $display("ERROR eject"); end
        pend_t.delete(int'(ej_flit.payload));
      end
      if (inj_valid && !inj_ready) pend_t.delete(int'(inj_flit.payload));
      // flits leaving now entered two cycles ago
      for (int p = 0; p < 4; p++) if (out_flit[p].valid) begin
        int id;
        id = int'(out_flit[p].payload);
        checks++;
        if (fault[p] || !pend_t.exists(id)) begin
          failures++; $display("ERROR t=%0d unexpected flit %0d on port %0d", t, id, p);
        end else begin
          pend_t.delete(id);
        end
      end
      foreach (pend_t[id]) begin
        int t0;
        t0 = pend_t[id] < 0 ? -pend_t[id] - 1 : pend_t[id];
        if (id >= 1000 && t - t0 > 2) begin
          checks++; failures++;
          $display("ERROR flit %0d did not leave in two cycles", id);
          pend_t.delete(id);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
