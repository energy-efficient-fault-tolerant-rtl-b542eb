// tb_permuter: random pairs of flits with random hop counts and requests;
// the winner (valid, fewer hops, ties to input 0) must get its request and
// both flits must appear on the outputs.
`timescale 1ns/1ps
module tb_permuter;
  import noc_pkg::*;

  rflit_t in0, in1, out0, out1;
  logic   want0, want0_vld, want1, want1_vld;
  int checks = 0, failures = 0;

  permuter dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      bit w0, x;
      in0 = rflit_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      in1 = rflit_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      if ($urandom % 3 == 0) in1.hops = in0.hops;
      {want0, want0_vld, want1, want1_vld} = 4'($urandom);
      #1;
      if (!in1.f.valid) w0 = 1;
      else if (!in0.f.valid) w0 = 0;
      else w0 = in0.hops <= in1.hops;
      if (w0) x = want0_vld && want0;
      else    x = want1_vld && !want1;
      checks++;
      if (out0 !== (x ? in1 : in0) || out1 !== (x ? in0 : in1)) begin
        failures++;
        $display("ERROR t=%0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
