// tb_route_compute: exhaustive check of XY/YX productive-port selection and
// hop distance over every pair of positions in an 8x8 mesh and both FLB
// values, against a reference written from the routing rules.
`timescale 1ns/1ps
module tb_route_compute;
  import noc_pkg::*;

  flit_t              flit;
  logic [COORD_W-1:0] my_row, my_col;
  logic [3:0]         prod;
  logic [DIST_W-1:0]  hops;
  int checks = 0, failures = 0;

  route_compute dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit = '0;
    for (int b = 0; b < 2; b++)
      for (int mr = 0; mr < 8; mr++) for (int mc = 0; mc < 8; mc++)
        for (int dr = 0; dr < 8; dr++) for (int dc = 0; dc < 8; dc++) begin
          logic [3:0] exp_p;
          int exp_d;
          flit.valid = 1'b1;
          flit.flb = b[0];
          flit.dst_row = 3'(dr);
          flit.dst_col = 3'(dc);
          my_row = 3'(mr);
          my_col = 3'(mc);
          #1;
          exp_p = 4'b0000;
          if (b == 0) begin
            if (dc > mc) exp_p = 4'b0100;        // E
            else if (dc < mc) exp_p = 4'b1000;   // W
            else if (dr > mr) exp_p = 4'b0010;   // S
            else if (dr < mr) exp_p = 4'b0001;   // N
          end else begin
            if (dr > mr) exp_p = 4'b0010;
            else if (dr < mr) exp_p = 4'b0001;
            else if (dc > mc) exp_p = 4'b0100;
            else if (dc < mc) exp_p = 4'b1000;
          end
          exp_d = (dr > mr ? dr - mr : mr - dr) + (dc > mc ? dc - mc : mc - dc);
          checks++;
          if (prod !== exp_p || int'(hops) != exp_d) begin
            failures++;
            if (failures < 10)
              $display("ERROR flb=%0d at (%0d,%0d) to (%0d,%0d): prod=%b hops=%0d, expected %b %0d",
                       b, mr, mc, dr, dc, prod, hops, exp_p, exp_d);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
