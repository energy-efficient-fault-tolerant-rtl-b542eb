// tb_pdn: random register-B contents. Checks that every flit leaves on
// exactly one line, that a lone flit always gets its productive port, and
// that a flit with strictly fewer hops than all others gets its productive
// port (it wins both permuter ranks).
`timescale 1ns/1ps
module tb_pdn;
  import noc_pkg::*;

  rflit_t b    [NPORTS];
  rflit_t line [NPORTS];
  int checks = 0, failures = 0;

  pdn dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int nvalid, best, besth, uniq;
      nvalid = 0;
      for (int p = 0; p < NPORTS; p++) begin
        b[p] = '0;
        b[p].f.valid = (t < 1000) ? (p == t % 4) : ($urandom % 4 != 0);
        b[p].f.payload = PAYLOAD_W'(p + 1);
        b[p].hops = DIST_W'($urandom % 8 + 1);
        b[p].prod = 4'b0001 << ($urandom % 4);
        b[p].in_dir = dir_e'(p);
        if (!b[p].f.valid) b[p] = '0;
        nvalid += int'(b[p].f.valid);
      end
      #1;
      // conservation
      for (int p = 0; p < NPORTS; p++) if (b[p].f.valid) begin
        int seen;
        seen = 0;
        for (int q = 0; q < NPORTS; q++) if (line[q] == b[p]) seen++;
        checks++;
        if (seen != 1) begin failures++; $display("ERROR t=%0d flit %0d seen %0d times", t, p, seen); end
      end
      // strict global winner gets its productive port
      best = -1; besth = 99; uniq = 0;
      for (int p = 0; p < NPORTS; p++) if (b[p].f.valid) begin
        if (int'(b[p].hops) < besth) begin besth = int'(b[p].hops); best = p; uniq = 1; end
        else if (int'(b[p].hops) == besth) uniq = 0;
      end
      if (best >= 0 && uniq) begin
        int want;
        want = 0;
        for (int q = 0; q < 4; q++) if (b[best].prod[q]) want = q;
        checks++;
        if (line[want] != b[best]) begin
          failures++;
          $display("ERROR t=%0d winner %0d not on port %0d", t, best, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
