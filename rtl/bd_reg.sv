// bd_reg: WIDTH-bit register with load enable.
// q takes d on a rising clk edge when ld is 1 and holds otherwise.
// rst (active high, asynchronous) clears q.
// The unit comes from the original datapath diagram; its exact form
// (width parameter, asynchronous reset) is this design's choice.
module bd_reg #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ld,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)     q <= '0;
    else if (ld) q <= d;
  end
endmodule
