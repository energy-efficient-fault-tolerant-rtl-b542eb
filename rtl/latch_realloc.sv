// latch_realloc: opposite-port reallocation (latches L1..L4) and FLB update.
//
// A flit still on a faulty line after the FTLU (one the FTLU could not move,
// or a healthy flit displaced there by a swap) is moved to the geometrically
// opposite port: L1 moves north to south (enabled by NF and SE), L2 south to
// north (SF, NE), L3 east to west (EF, WE), L4 west to east (WF, EE). The
// target must be healthy and vacant, and must not be the flit's input port
// unless the router has three faulty ports. These "latches" are plain
// multiplexer paths here; the flit is registered once, in register C.
//
// Fault loop bit: a flit that was moved off the port the PDN gave it leaves
// with FLB = 1 on an east/west port (YX in the next router) and FLB = 0 on a
// north/south port; a flit that bypassed reallocation leaves with FLB = 0.
//
// This design's own addition: a flit that neither the FTLU nor its latch
// could place (no case the text walks through needs it) is put on the first
// vacant healthy port, preferring an eligible one, so that no flit is lost
// while the router holds no more flits than it has healthy ports. The
// `fallback` strobe reports this and `lost` flags a flit that found no
// healthy port at all (a broken occupancy invariant).
//
// Interface: FTLU lines, moved mask, fault flags and exemption in; final
// lines (to register C) and strobes out. Combinational.
module latch_realloc
  import noc_pkg::*;
(
  input  rflit_t             line_in  [NPORTS],
  input  logic [NPORTS-1:0]  moved_in,
  input  logic [NPORTS-1:0]  fault,
  input  logic               exempt,
  output rflit_t             line_out [NPORTS],
  output logic               used_latch,
  output logic               fallback,
  output logic               lost
);

  logic [NPORTS-1:0] moved;
  logic [1:0]        q;
  logic              done;

  always_comb begin
    line_out   = line_in;
    moved      = moved_in;
    used_latch = 1'b0;
    fallback   = 1'b0;
    lost       = 1'b0;
    q          = '0;
    done       = 1'b0;

    // Latches L1..L4.
    for (int p = 0; p < NPORTS; p++) begin
      q = opposite(2'(p));
      if (line_in[p].f.valid && fault[p] && !fault[q] && !line_out[q].f.valid &&
          (exempt || line_in[p].in_dir != dir_e'(q))) begin
        line_out[q]       = line_in[p];
        line_out[p].f.valid = 1'b0;
        moved[q]          = 1'b1;
        used_latch        = 1'b1;
      end
    end

    // Last resort: any vacant healthy port, eligible ones first.
    for (int p = 0; p < NPORTS; p++) begin
      done = 1'b0;
      if (line_out[p].f.valid && fault[p]) begin
        for (int pass = 0; pass < 2; pass++) begin
          for (int t = 0; t < NPORTS; t++) begin
            if (!done && !fault[t] && !line_out[t].f.valid &&
                (pass == 1 || exempt || line_out[p].in_dir != dir_e'(t))) begin
              line_out[t]         = line_out[p];
              line_out[p].f.valid = 1'b0;
              moved[t]            = 1'b1;
              done                = 1'b1;
            end
          end
        end
        fallback = 1'b1;
        if (!done) begin
          lost = 1'b1;
          line_out[p].f.valid = 1'b0;
        end
      end
    end

    for (int p = 0; p < NPORTS; p++) begin
      line_out[p].f.flb = moved[p] ? is_horiz(2'(p)) : 1'b0;
      if (!line_out[p].f.valid) line_out[p] = '0;
    end
  end

endmodule
