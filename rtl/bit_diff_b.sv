// bit_diff_b: bit difference calculator, structural FSMD.
//
// Same function and interface as bit_diff_a: for a WIDTH-bit word din it
// produces (ones - zeros) as a WIDTH-bit two's complement value on dout,
// with a one-clock done pulse. Here the controller (bit_diff_fsm) and the
// datapath (bit_diff_datapath, built from register, mux, adder,
// subtracter and comparator units) are separate modules joined by the
// bd_ctrl_t bundle of select/load lines and the count_done status line.
//
// Timing: go is sampled in the idle state; counting that edge as edge 0,
// done is 1 between edges WIDTH+1 and WIDTH+2 and dout holds the result
// from edge WIDTH+1 on. rst is active high and asynchronous.
module bit_diff_b
  import bit_diff_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             go,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout,
  output logic             done
);

  bd_ctrl_t ctrl;
  logic     count_done;

  bit_diff_fsm u_fsm (
    .clk       (clk),
    .rst       (rst),
    .go        (go),
    .count_done(count_done),
    .ctrl      (ctrl),
    .done      (done)
  );

  bit_diff_datapath #(.WIDTH(WIDTH)) u_dp (
    .clk       (clk),
    .rst       (rst),
    .ctrl      (ctrl),
    .din       (din),
    .dout      (dout),
    .count_done(count_done)
  );

  initial assert (WIDTH >= 2) else $fatal(1, "WIDTH must be at least 2");

endmodule
