// eject_unit: removes one locally destined flit per cycle (stage 1).
//
// Among the flits that arrived this cycle, the lowest-numbered port (N, S,
// E, W order) whose flit is addressed to this router is handed to the local
// core and its slot is cleared. Any further local flits stay in the router
// and are deflected back into the network, as in a bufferless router with a
// single ejection port. The one-per-cycle width and the port order are this
// implementation's choice; the text names the ejection stage without sizing it.
//
// Interface: four flits and the router coordinates in; four flits out, and
// an ejected flit with its valid bit. Combinational.
module eject_unit
  import noc_pkg::*;
(
  input  flit_t               in_flit  [NPORTS],
  input  logic [COORD_W-1:0]  my_row,
  input  logic [COORD_W-1:0]  my_col,
  output flit_t               out_flit [NPORTS],
  output logic                ej_valid,
  output flit_t               ej_flit
);

  always_comb begin
    ej_valid = 1'b0;
    ej_flit  = '0;
    for (int p = 0; p < NPORTS; p++) begin
      out_flit[p] = in_flit[p];
      if (!ej_valid && in_flit[p].valid &&
          in_flit[p].dst_row == my_row && in_flit[p].dst_col == my_col) begin
        ej_valid           = 1'b1;
        ej_flit            = in_flit[p];
        out_flit[p].valid  = 1'b0;
      end
    end
  end

endmodule
