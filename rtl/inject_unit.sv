// inject_unit: inserts a flit from the local core into the router (stage 1).
//
// A bufferless router must send every flit out in the cycle it leaves
// register C, so it may hold no more flits than it has healthy output ports.
// A new flit is therefore accepted only when the number of flits left after
// ejection is below the number of ports whose fault flag is clear; with all
// four ports faulty (a disconnected router) injection is throttled entirely.
// The flit takes the lowest-numbered vacant slot and leaves with FLB = 0
// (XY routing) and a clear EX field. The core keeps the flit in its own
// buffer until inj_ready is high.
//
// Interface: four flits, the fault flags and a valid/ready injection request
// in; four flits out plus a mask of the slot that was filled. Combinational:
// inj_ready depends on inj_valid, the flags and the flits of this cycle.
module inject_unit
  import noc_pkg::*;
(
  input  flit_t              in_flit  [NPORTS],
  input  logic [NPORTS-1:0]  fault,
  input  logic               inj_valid,
  input  flit_t              inj_flit,
  output logic               inj_ready,
  output flit_t              out_flit [NPORTS],
  output logic [NPORTS-1:0]  injected
);

  logic [2:0] n_flits, n_healthy;

  always_comb begin
    n_flits   = '0;
    n_healthy = '0;
    for (int p = 0; p < NPORTS; p++) begin
      n_flits   = n_flits + 3'(in_flit[p].valid);
      n_healthy = n_healthy + 3'(!fault[p]);
    end
    inj_ready = inj_valid && (n_flits < n_healthy);
    injected  = '0;
    for (int p = 0; p < NPORTS; p++) begin
      out_flit[p] = in_flit[p];
      if (inj_ready && injected == '0 && !in_flit[p].valid) begin
        injected[p]       = 1'b1;
        out_flit[p]       = inj_flit;
        out_flit[p].valid = 1'b1;
        out_flit[p].flb   = 1'b0;
        out_flit[p].ex    = '0;
      end
    end
  end

endmodule
