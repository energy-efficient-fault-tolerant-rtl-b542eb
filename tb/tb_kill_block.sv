// tb_kill_block: random flits with random EX fields; a flit must be dropped
// exactly when it is valid, the block is enabled and all four EX bits are set.
`timescale 1ns/1ps
module tb_kill_block;
  import noc_pkg::*;

  logic              en;
  flit_t             in_flit  [NPORTS];
  flit_t             out_flit [NPORTS];
  logic [NPORTS-1:0] killed;
  int checks = 0, failures = 0, nkill = 0;

  kill_block dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      en = ($urandom % 4) != 0;
      for (int p = 0; p < NPORTS; p++) begin
        in_flit[p] = flit_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
        if ($urandom % 3 == 0) in_flit[p].ex = 4'hf;
      end
      #1;
      for (int p = 0; p < NPORTS; p++) begin
        bit k;
        flit_t e;
        k = en && in_flit[p].valid && in_flit[p].ex == 4'hf;
        e = in_flit[p];
        if (k) e.valid = 1'b0;
        checks++;
        if (killed[p] !== k || out_flit[p] !== e) begin
          failures++;
          $display("ERROR t=%0d port %0d", t, p);
        end
        nkill += int'(k);
      end
    end
    checks++;
    if (nkill == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
