// tb_inject_unit: random occupancy and fault flags; a flit is accepted only
// when fewer flits than healthy ports are present, lands in the first vacant
// slot with FLB and EX cleared, and never overwrites a flit.
`timescale 1ns/1ps
module tb_inject_unit;
  import noc_pkg::*;

  flit_t              in_flit  [NPORTS];
  logic [NPORTS-1:0]  fault;
  logic               inj_valid;
  flit_t              inj_flit;
  logic               inj_ready;
  flit_t              out_flit [NPORTS];
  logic [NPORTS-1:0]  injected;
  int checks = 0, failures = 0, n_acc = 0, n_throttle = 0;

  inject_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int nf, nh, slot;
      bit acc;
      fault = 4'($urandom);
      inj_valid = ($urandom % 4) != 0;
      inj_flit = flit_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      for (int p = 0; p < NPORTS; p++)
        in_flit[p] = flit_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      #1;
      nf = 0; nh = 0; slot = -1;
      for (int p = 0; p < NPORTS; p++) begin
        nf += int'(in_flit[p].valid);
        nh += int'(!fault[p]);
        if (slot < 0 && !in_flit[p].valid) slot = p;
      end
      acc = inj_valid && nf < nh;
      n_acc += int'(acc);
      n_throttle += int'(inj_valid && fault == 4'hf);
      checks++;
      if (inj_ready !== acc) begin failures++; $display("ERROR t=%0d ready", t); end
      for (int p = 0; p < NPORTS; p++) begin
        flit_t e;
        e = in_flit[p];
        if (acc && p == slot) begin
          e = inj_flit; e.valid = 1'b1; e.flb = 1'b0; e.ex = '0;
        end
        checks++;
        if (out_flit[p] !== e || injected[p] !== (acc && p == slot)) begin
          failures++;
          $display("ERROR t=%0d slot %0d", t, p);
        end
      end
    end
    checks++;
    if (n_acc == 0 || n_throttle == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
