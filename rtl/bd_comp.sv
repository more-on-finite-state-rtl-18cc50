// bd_comp: WIDTH-bit equality comparator, eq = (a == b). Combinational.
// In the bit difference datapath it flags that the bit counter has
// reached the word width.
// The unit comes from the original datapath diagram; its exact form
// (width parameter, equality output only) is this design's choice.
module bd_comp #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             eq
);
  assign eq = (a == b);
endmodule
