// bd_sub: WIDTH-bit subtracter, diff = a - b modulo 2**WIDTH (two's
// complement, no borrow out). Combinational. Used for the -1 unit of the
// bit difference datapath.
// The unit comes from the original datapath diagram; its exact form
// (width parameter, no carry or status outputs) is this design's choice.
module bd_sub #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] diff
);
  assign diff = a - b;
endmodule
