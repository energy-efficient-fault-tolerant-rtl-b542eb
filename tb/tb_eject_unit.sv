// tb_eject_unit: random flits, some addressed to the router; exactly the
// first local flit in N,S,E,W order is ejected and removed, the rest pass.
`timescale 1ns/1ps
module tb_eject_unit;
  import noc_pkg::*;

  flit_t              in_flit  [NPORTS];
  logic [COORD_W-1:0] my_row, my_col;
  flit_t              out_flit [NPORTS];
  logic               ej_valid;
  flit_t              ej_flit;
  int checks = 0, failures = 0;

  eject_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int first;
      my_row = 3'($urandom);
      my_col = 3'($urandom);
      for (int p = 0; p < NPORTS; p++) begin
        in_flit[p] = flit_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
        if ($urandom % 2) begin
          in_flit[p].dst_row = my_row;
          in_flit[p].dst_col = my_col;
        end
      end
      #1;
      first = -1;
      for (int p = 0; p < NPORTS; p++)
        if (first < 0 && in_flit[p].valid && in_flit[p].dst_row == my_row &&
            in_flit[p].dst_col == my_col) first = p;
      checks++;
      if (ej_valid !== (first >= 0) || (first >= 0 && ej_flit !== in_flit[first])) begin
        failures++;
        $display("ERROR t=%0d ejection", t);
      end
      for (int p = 0; p < NPORTS; p++) begin
        checks++;
        if (out_flit[p].valid !== (in_flit[p].valid && p != first) ||
            out_flit[p].payload !== in_flit[p].payload) begin
          failures++;
          $display("ERROR t=%0d port %0d", t, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
