// code_converter: serial BCD to excess-3 (XS-3) converter, Mealy machine.
//
// A BCD digit arrives on x one bit per clock, least significant bit first;
// z delivers the matching bit of digit+3 in the same clock (Mealy output:
// z depends on the present state and on x). After four bits the machine is
// back in S0 and the next digit may follow without a gap.
//
// The state table (7 states, next state and output per input bit) is the
// one of the worked example; state S6 with x=1 cannot occur for a valid
// BCD digit, and this design sends it to S0 with z=0.
//
// Interface: enable is an active-low asynchronous reset to S0 (enable=0
// holds the machine in S0); the state register changes on the rising
// edge of clk. z is combinational from state and x.
module code_converter
  import xs3_pkg::*;
(
  input  logic clk,
  input  logic enable,
  input  logic x,
  output logic z
);

  xs3_state_t state;
  xs3_step_t  step;

  always_comb step = xs3_step(state, x);
  assign z = step.z;

  always_ff @(posedge clk or negedge enable) begin
    if (!enable) state <= S0;
    else         state <= step.ns;
  end

endmodule
