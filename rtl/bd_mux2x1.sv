// bd_mux2x1: WIDTH-bit 2-to-1 multiplexer, y = sel ? in1 : in0.
// Combinational.
// The unit comes from the original datapath diagram; its exact form
// (width parameter, select polarity) is this design's choice.
module bd_mux2x1 #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  output logic [WIDTH-1:0] y
);
  assign y = sel ? in1 : in0;
endmodule
