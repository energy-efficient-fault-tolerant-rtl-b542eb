// tb_latch_realloc: the latch step of the swap example (a flit left on the
// faulty north line moves to the vacant south port), an east-to-west move
// with FLB set, a blocked latch falling back, then random properties: no
// flit stays on a faulty port, none is lost while flits do not outnumber
// healthy ports, and FLB is 1 exactly for moved flits on east/west ports.
`timescale 1ns/1ps
module tb_latch_realloc;
  import noc_pkg::*;

  rflit_t            line_in  [NPORTS];
  logic [NPORTS-1:0] moved_in;
  logic [NPORTS-1:0] fault;
  logic              exempt;
  rflit_t            line_out [NPORTS];
  logic              used_latch, fallback, lost;
  int checks = 0, failures = 0;

  latch_realloc dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rflit_t mk(int id, dir_e din);
    rflit_t r;
    r = '0;
    r.f.valid = 1'b1;
    r.f.flb = 1'b1;
    r.f.payload = PAYLOAD_W'(id);
    r.in_dir = din;
    return r;
  endfunction

  task automatic check_line(string name, int p, int id, bit flb);
    checks++;
    if (!line_out[p].f.valid || int'(line_out[p].f.payload) != id || line_out[p].f.flb != flb) begin
      failures++;
      $display("ERROR %s: line %0d", name, p);
    end
  endtask

  initial begin
    exempt = 1'b0;
    // L1: north faulty, displaced west flit (came from east) on N; S vacant.
    for (int p = 0; p < 4; p++) line_in[p] = '0;
    fault = 4'b0001; moved_in = 4'b1000;
    line_in[P_N] = mk(4, DIR_E);
    line_in[P_E] = mk(3, DIR_W);
    line_in[P_W] = mk(1, DIR_S);
    #1;
    check_line("L1", P_S, 4, 1'b0);
    check_line("L1 east unmoved", P_E, 3, 1'b0);
    check_line("L1 west moved", P_W, 1, 1'b1);
    checks++; if (!used_latch || fallback || line_out[P_N].f.valid) failures++;

    // L3: east faulty, flit from north on E, W vacant -> W with FLB = 1.
    for (int p = 0; p < 4; p++) line_in[p] = '0;
    fault = 4'b0100; moved_in = 4'b0000;
    line_in[P_E] = mk(5, DIR_N);
    #1;
    check_line("L3", P_W, 5, 1'b1);

    // Latch blocked by the no-return rule: flit on faulty E came from W.
    line_in[P_E] = mk(6, DIR_W);
    line_in[P_N] = mk(7, DIR_S);
    #1;
    checks++;
    if (used_latch || !fallback || lost || line_out[P_E].f.valid) failures++;
    check_line("fallback", P_S, 6, 1'b0);

    for (int t = 0; t < 20000; t++) begin
      int nf, nh, nin, nout;
      fault = 4'($urandom);
      exempt = ($countones(fault) == 3);
      moved_in = 4'($urandom) & ~fault;
      nh = 4 - $countones(fault);
      nin = 0;
      for (int p = 0; p < 4; p++) begin
        line_in[p] = '0;
        if ($urandom % 2 && nin < nh) begin
          line_in[p] = mk(p + 1, dir_e'($urandom % 5));
          nin++;
        end
      end
      #1;
      nout = 0;
      for (int p = 0; p < 4; p++) if (line_out[p].f.valid) begin
        bit mv;
        nout++;
        mv = moved_in[p] || int'(line_out[p].f.payload) != p + 1;
        checks++;
        if (fault[p] || line_out[p].f.flb != (mv && p >= 2)) begin
          failures++;
          $display("ERROR t=%0d line %0d", t, p);
        end
      end
      checks++;
      if (nout != nin || lost) begin failures++; $display("ERROR t=%0d lost a flit", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
