// pdn: permutation deflection network (second pipeline stage, first half).
//
// Four permuters in two ranks map the four flits of register B to the four
// output lines. P1 takes the flits of the north and east slots, P2 those of
// the south and west slots; each sends a flit whose productive port is north
// or south to P3 and one whose productive port is east or west to P4. P3
// drives the north and south lines and P4 the east and west lines. Every
// flit leaves on some line; a flit that loses an arbitration is deflected.
// Fault flags are not looked at here: the FTLU behind the PDN repairs
// allocations to faulty ports. The wiring is the CHIPPER one.
//
// Interface: b[N,S,E,W] annotated flits in, line[N,S,E,W] out.
// Combinational.
module pdn
  import noc_pkg::*;
(
  input  rflit_t b    [NPORTS],
  output rflit_t line [NPORTS]
);

  rflit_t p1_o0, p1_o1, p2_o0, p2_o1;

  // First rank: output 0 leads to P3 (N/S), output 1 to P4 (E/W).
  permuter u_p1 (
    .in0(b[P_N]), .in1(b[P_E]),
    .want0(b[P_N].prod[P_E] | b[P_N].prod[P_W]), .want0_vld(b[P_N].prod != '0),
    .want1(b[P_E].prod[P_E] | b[P_E].prod[P_W]), .want1_vld(b[P_E].prod != '0),
    .out0(p1_o0), .out1(p1_o1)
  );

  permuter u_p2 (
    .in0(b[P_S]), .in1(b[P_W]),
    .want0(b[P_S].prod[P_E] | b[P_S].prod[P_W]), .want0_vld(b[P_S].prod != '0),
    .want1(b[P_W].prod[P_E] | b[P_W].prod[P_W]), .want1_vld(b[P_W].prod != '0),
    .out0(p2_o0), .out1(p2_o1)
  );

  // Second rank: P3 drives N (0) and S (1), P4 drives E (0) and W (1).
  permuter u_p3 (
    .in0(p1_o0), .in1(p2_o0),
    .want0(p1_o0.prod[P_S]), .want0_vld(p1_o0.prod[P_N] | p1_o0.prod[P_S]),
    .want1(p2_o0.prod[P_S]), .want1_vld(p2_o0.prod[P_N] | p2_o0.prod[P_S]),
    .out0(line[P_N]), .out1(line[P_S])
  );

  permuter u_p4 (
    .in0(p1_o1), .in1(p2_o1),
    .want0(p1_o1.prod[P_W]), .want0_vld(p1_o1.prod[P_E] | p1_o1.prod[P_W]),
    .want1(p2_o1.prod[P_W]), .want1_vld(p2_o1.prod[P_E] | p2_o1.prod[P_W]),
    .out0(line[P_E]), .out1(line[P_W])
  );

endmodule
