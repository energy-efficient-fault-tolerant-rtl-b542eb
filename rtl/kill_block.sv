// kill_block: drops flits destined to a disconnected router.
//
// Each flit carries a four-bit expiry (EX) field; a bit is set when the flit,
// one hop from its destination, is turned away from the corresponding side
// of the destination by a faulty port. A flit with all four bits set can
// never be delivered, so this block clears its valid bit as it enters the
// router. It sits in parallel with the other stage-1 logic and is purely
// combinational. When EN is low (the configuration without the EX field)
// it passes every flit unchanged.
//
// Interface: four input flits in, four flits out plus a per-port mask of
// the flits that were killed this cycle.
module kill_block
  import noc_pkg::*;
(
  input  logic              en,
  input  flit_t             in_flit  [NPORTS],
  output flit_t             out_flit [NPORTS],
  output logic [NPORTS-1:0] killed
);

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      out_flit[p] = in_flit[p];
      killed[p]   = en && in_flit[p].valid && (&in_flit[p].ex);
      if (killed[p]) out_flit[p].valid = 1'b0;
    end
  end

endmodule
