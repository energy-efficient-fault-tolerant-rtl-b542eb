// ftlu: fault-tolerant logic unit behind the permutation deflection network.
//
// The PDN allocates ports without looking at the fault flags, so a flit may
// sit on a line whose output port is faulty. The FTLU moves such flits to a
// healthy port in the orthogonal direction (N/S <-> E/W):
//
//  * Input multiplexers: a flit on a healthy line passes straight through
//    (registers x1..x4). A flit on a faulty line is gated into the permuter
//    section or, failing that, into the swapping section (registers y1..y4).
//  * Permuter section: P5 takes faulty N/S flits onto vacant E/W ports, P6
//    takes faulty E/W flits onto vacant N/S ports. A port is vacant when its
//    PDN line carries no flit and its fault flag is clear (empty flags NE,
//    SE, EE, WE). The higher-priority flit (fewer hops) chooses first and
//    prefers its productive port.
//  * Swapping section: a faulty-line flit that found no vacant orthogonal
//    port swaps with a healthy flit on an orthogonal line (SWAP1 for N/S,
//    SWAP2 for E/W); the faulty flit gets the healthy port, and the displaced
//    flit is left on the faulty line for the latches to move across.
//  * Output demultiplexers merge the three sources per line.
//
// No flit is moved to the port it entered by, unless the router has three
// faulty ports (exempt). The structure follows the original description of
// the FTLU and its algorithm. This design's own choices: the permuters only take
// flits that fit a vacant eligible port, so a second faulty flit that finds
// none goes to the swap section instead of colliding; the swap partner is
// the productive eligible one when there is a choice. FLB is updated later,
// by latch_realloc, from the moved mask.
//
// Interface: PDN lines, fault flags (N,S,E,W) and the exemption in; lines
// out, a mask of lines whose flit was placed here, and mechanism strobes.
// Combinational.
module ftlu
  import noc_pkg::*;
(
  input  rflit_t             line_in  [NPORTS],
  input  logic [NPORTS-1:0]  fault,
  input  logic               exempt,
  output rflit_t             line_out [NPORTS],
  output logic [NPORTS-1:0]  moved,
  output logic               used_p5,
  output logic               used_p6,
  output logic               used_swap1,
  output logic               used_swap2
);

  logic [NPORTS-1:0] empty, healthy_flit, faulty_flit, taken, placed;
  logic [1:0]        s0, s1, d0, d1, s, d;
  logic              hi0, c0, c1;

  function automatic logic elig(input dir_e in_dir, input logic [1:0] q, input logic ex);
    return ex || (in_dir != dir_e'({1'b0, q}));
  endfunction

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      empty[p]        = !line_in[p].f.valid && !fault[p];
      healthy_flit[p] =  line_in[p].f.valid && !fault[p];
      faulty_flit[p]  =  line_in[p].f.valid &&  fault[p];
      line_out[p]     = healthy_flit[p] ? line_in[p] : '0;   // x registers
    end
    moved   = '0;
    taken   = '0;
    placed  = '0;
    used_p5 = 1'b0;
    used_p6 = 1'b0;
    used_swap1 = 1'b0;
    used_swap2 = 1'b0;
    {s0, s1, d0, d1, s, d} = '0;
    {hi0, c0, c1} = '0;

    // Permuter section: g = 0 is P5 (N,S -> E,W), g = 1 is P6 (E,W -> N,S).
    for (int g = 0; g < 2; g++) begin
      s0  = (g == 0) ? 2'(P_N) : 2'(P_E);
      s1  = (g == 0) ? 2'(P_S) : 2'(P_W);
      d0  = (g == 0) ? 2'(P_E) : 2'(P_N);
      d1  = (g == 0) ? 2'(P_W) : 2'(P_S);
      hi0 = wins(line_in[s0], line_in[s1]);
      for (int k = 0; k < 2; k++) begin
        s = ((k == 0) == hi0) ? s0 : s1;
        if (faulty_flit[s]) begin
          c0 = empty[d0] && !taken[d0] && elig(line_in[s].in_dir, d0, exempt);
          c1 = empty[d1] && !taken[d1] && elig(line_in[s].in_dir, d1, exempt);
          if (c0 || c1) begin
            if (c0 && c1) d = line_in[s].prod[d1] ? d1 : d0;
            else          d = c0 ? d0 : d1;
            line_out[d] = line_in[s];
            moved[d]    = 1'b1;
            taken[d]    = 1'b1;
            placed[s]   = 1'b1;
            if (g == 0) used_p5 = 1'b1;
            else        used_p6 = 1'b1;
          end
        end
      end
    end

    // Swapping section: g = 0 is SWAP1 (y1,y2 with x3,x4), g = 1 is SWAP2
    // (y3,y4 with x1,x2).
    for (int g = 0; g < 2; g++) begin
      s0  = (g == 0) ? 2'(P_N) : 2'(P_E);
      s1  = (g == 0) ? 2'(P_S) : 2'(P_W);
      d0  = (g == 0) ? 2'(P_E) : 2'(P_N);
      d1  = (g == 0) ? 2'(P_W) : 2'(P_S);
      hi0 = wins(line_in[s0], line_in[s1]);
      for (int k = 0; k < 2; k++) begin
        s = ((k == 0) == hi0) ? s0 : s1;
        if (faulty_flit[s] && !placed[s]) begin
          c0 = healthy_flit[d0] && !moved[d0] && elig(line_in[s].in_dir, d0, exempt);
          c1 = healthy_flit[d1] && !moved[d1] && elig(line_in[s].in_dir, d1, exempt);
          if (c0 || c1) begin
            if (c0 && c1) d = line_in[s].prod[d1] ? d1 : d0;
            else          d = c0 ? d0 : d1;
            line_out[s] = line_in[d];   // displaced healthy flit to the faulty line
            line_out[d] = line_in[s];
            moved[d]    = 1'b1;
            if (g == 0) used_swap1 = 1'b1;
            else        used_swap2 = 1'b1;
          end else begin
            line_out[s] = line_in[s];   // left on the faulty line for the latches
          end
        end
      end
    end
  end

endmodule
