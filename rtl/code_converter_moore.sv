// code_converter_moore: serial BCD to excess-3 converter as a Moore machine.
//
// Same conversion as code_converter (BCD digit in on x, least significant
// bit first; excess-3 bits out on z), but z is a function of the state
// alone. Each Moore state pairs a state of the Mealy graph with the output
// bit produced on the transition that entered it, so the ten reachable
// states are S0/0, S0/1, S1/1, S2/0, S3/1, S4/0, S4/1, S5/0, S5/1, S6/0.
// The state register holds that pair, and z is its output half.
//
// Timing: the excess-3 bit for the input bit sampled at a rising edge
// appears on z after that edge, one clock later than in the Mealy
// version. enable is an active-low asynchronous reset to S0 with z=0.
module code_converter_moore
  import xs3_pkg::*;
(
  input  logic clk,
  input  logic enable,
  input  logic x,
  output logic z
);

  xs3_step_t state;   // {Mealy state, output bit of the entering edge}

  always_ff @(posedge clk or negedge enable) begin
    if (!enable) state <= xs3_step_t'{ns: S0, z: 1'b0};
    else         state <= xs3_step(state.ns, x);
  end

  assign z = state.z;

endmodule
