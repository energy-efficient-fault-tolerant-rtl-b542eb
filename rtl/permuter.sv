// permuter: 2x2 arbitrating switch of the permutation deflection network.
//
// The higher-priority input (valid first, then fewer hops to its destination,
// ties to input 0) is sent to the output it asks for; the other input takes
// the remaining output, which may be a deflection. An input without a
// preference (want_vld low) keeps its own index when it wins. The priority
// rule follows the router description; the tie rule is this design's choice.
//
// Interface: two annotated flits with a requested output bit each; two flits
// out. Combinational.
module permuter
  import noc_pkg::*;
(
  input  rflit_t in0,
  input  rflit_t in1,
  input  logic   want0,      // output requested by in0
  input  logic   want0_vld,
  input  logic   want1,      // output requested by in1
  input  logic   want1_vld,
  output rflit_t out0,
  output rflit_t out1
);

  logic win0, xsel;

  always_comb begin
    win0 = wins(in0, in1);
    if (win0) xsel = want0_vld ? want0 : 1'b0;
    else      xsel = want1_vld ? ~want1 : 1'b0;
    out0 = xsel ? in1 : in0;
    out1 = xsel ? in0 : in1;
  end

endmodule
