// bd_add: WIDTH-bit adder, sum = a + b modulo 2**WIDTH (no carry out).
// Combinational. Used for the +1 units of the bit difference datapath.
// The unit comes from the original datapath diagram; its exact form
// (width parameter, no carry or status outputs) is this design's choice.
module bd_add #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum
);
  assign sum = a + b;
endmodule
