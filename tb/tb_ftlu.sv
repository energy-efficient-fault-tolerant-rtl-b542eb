// tb_ftlu: the reallocation examples of the router description (one faulty
// port via P5, one faulty port via SWAP1, the three cases with north and
// west faulty, three faulty ports) as directed tests, then random
// properties: flits are conserved, only flits on faulty lines move, moves
// are orthogonal, land on healthy ports and avoid the input port unless
// the router has three faulty ports.
`timescale 1ns/1ps
module tb_ftlu;
  import noc_pkg::*;

  rflit_t            line_in  [NPORTS];
  logic [NPORTS-1:0] fault;
  logic              exempt;
  rflit_t            line_out [NPORTS];
  logic [NPORTS-1:0] moved;
  logic              used_p5, used_p6, used_swap1, used_swap2;
  int checks = 0, failures = 0;

  ftlu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rflit_t mk(int id, dir_e din, int prodp, int h);
    rflit_t r;
    r = '0;
    r.f.valid = 1'b1;
    r.f.payload = PAYLOAD_W'(id);
    r.in_dir = din;
    r.prod = 4'b0001 << prodp;
    r.hops = DIST_W'(h);
    return r;
  endfunction

  function automatic void clear();
    for (int p = 0; p < NPORTS; p++) line_in[p] = '0;
  endfunction

  // expected payload id on each line (0 = empty)
  task automatic expect_ids(string name, int n, int s, int e, int w);
    int ex [4];
    ex = '{n, s, e, w};
    #1;
    for (int p = 0; p < 4; p++) begin
      int got;
      got = line_out[p].f.valid ? int'(line_out[p].f.payload) : 0;
      checks++;
      if (got != ex[p]) begin
        failures++;
        $display("ERROR %s: line %0d holds %0d, expected %0d", name, p, got, ex[p]);
      end
    end
  endtask

  initial begin
    exempt = 1'b0;
    // (a) north faulty, N,S,E occupied: north flit to vacant west via P5.
    clear(); fault = 4'b0001;
    line_in[P_N] = mk(1, DIR_L, P_N, 3);
    line_in[P_S] = mk(2, DIR_N, P_S, 3);
    line_in[P_E] = mk(3, DIR_W, P_E, 3);
    expect_ids("fig a", 0, 2, 3, 1);
    checks++; if (!used_p5 || used_swap1) failures++;

    // (b) north faulty, S vacant, north flit came from south and prefers
    // west: SWAP1 exchanges it with the west flit, which is left on N.
    clear(); fault = 4'b0001;
    line_in[P_N] = mk(1, DIR_S, P_W, 3);
    line_in[P_E] = mk(3, DIR_W, P_E, 3);
    line_in[P_W] = mk(4, DIR_E, P_W, 3);
    expect_ids("fig b", 4, 0, 3, 1);
    checks++; if (!used_swap1 || used_p5) failures++;

    // (c) north and west faulty.
    clear(); fault = 4'b1001;
    line_in[P_N] = mk(1, DIR_S, P_N, 3);
    line_in[P_S] = mk(2, DIR_E, P_S, 3);
    expect_ids("fig c case 1", 0, 2, 1, 0);
    clear();
    line_in[P_E] = mk(3, DIR_S, P_E, 3);
    line_in[P_W] = mk(4, DIR_E, P_W, 3);
    expect_ids("fig c case 2", 0, 4, 3, 0);
    checks++; if (!used_p6) failures++;
    clear();
    line_in[P_N] = mk(1, DIR_S, P_N, 3);
    line_in[P_W] = mk(4, DIR_E, P_W, 3);
    expect_ids("fig c case 3", 0, 4, 1, 0);
    checks++; if (!used_p5 || !used_p6) failures++;

    // (d) north, south and east faulty: north flit to west (exempt from
    // the no-return rule, it entered by west).
    clear(); fault = 4'b0111; exempt = 1'b1;
    line_in[P_N] = mk(1, DIR_W, P_N, 3);
    expect_ids("fig d", 0, 0, 0, 1);
    exempt = 1'b0;

    // SWAP2: east faulty, its flit came from north, N and S occupied: it
    // swaps with the south flit, which is left on the east line.
    clear(); fault = 4'b0100;
    line_in[P_E] = mk(3, DIR_N, P_S, 2);
    line_in[P_N] = mk(1, DIR_S, P_N, 2);
    line_in[P_S] = mk(2, DIR_W, P_S, 2);
    line_in[P_W] = mk(4, DIR_L, P_W, 2);
    expect_ids("swap2", 1, 3, 2, 4);
    checks++; if (!used_swap2) failures++;

    // Random properties.
    for (int t = 0; t < 20000; t++) begin
      int nf;
      fault = 4'($urandom);
      nf = $countones(fault);
      exempt = (nf == 3);
      for (int p = 0; p < NPORTS; p++) begin
        line_in[p] = '0;
        if ($urandom % 3 != 0)
          line_in[p] = mk(p + 1, dir_e'($urandom % 5), $urandom % 4, $urandom % 6 + 1);
      end
      #1;
      for (int p = 0; p < NPORTS; p++) if (line_in[p].f.valid) begin
        int seen, at;
        seen = 0; at = -1;
        for (int q = 0; q < NPORTS; q++)
          if (line_out[q].f.valid && int'(line_out[q].f.payload) == p + 1) begin seen++; at = q; end
        checks++;
        if (seen != 1) begin failures++; $display("ERROR t=%0d flit %0d seen %0d", t, p, seen); end
        else if (!fault[p]) begin
          // healthy flits stay, or are displaced onto a faulty orthogonal line
          if (at != p && !(fault[at] && (at / 2 != p / 2))) begin
            failures++; $display("ERROR t=%0d healthy flit %0d moved to %0d", t, p, at);
          end
        end else if (at != p) begin
          checks++;
          if (fault[at] || at / 2 == p / 2 || (!exempt && int'(line_in[p].in_dir) == at)) begin
            failures++; $display("ERROR t=%0d faulty flit %0d moved to %0d", t, p, at);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
