// bit_diff_datapath: register-transfer datapath of the structural bit
// difference calculator, built only from registers, 2-to-1 muxes, adders,
// a subtracter and a comparator.
//
//   Value  <- value_sel ? din : Value >> 1                (load: value_ld)
//   Diff   <- diff_sel  ? 0   : (Value[0] ? Diff+1 : Diff-1) (diff_ld)
//   Output <- Diff                                        (output_ld)
//   Count  <- count_sel ? 0   : Count + 1                 (count_ld)
//   count_done = (Count == WIDTH)
//
// Unit for unit this is the original datapath diagram: one mux in front of
// Value fed by the input and a shift-right unit, a mux steered by Value(0)
// between the +1 and -1 units, a mux choosing 0 in front of Diff, an
// Output register after Diff, and a Count register with a 0 mux, a +1
// unit and an == comparator against the word width (16 by default). Which
// mux input each select value picks is this design's choice (see
// bit_diff_pkg). All registers share an active-high asynchronous reset.
module bit_diff_datapath
  import bit_diff_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  bd_ctrl_t         ctrl,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout,
  output logic             count_done
);

  localparam int unsigned CW = $clog2(WIDTH + 1);

  logic [WIDTH-1:0] value_q, value_d, value_shr;
  logic [WIDTH-1:0] diff_q, diff_d, diff_inc, diff_dec, diff_step;
  logic [CW-1:0]    count_q, count_d, count_inc;

  // Value register and its shift-right feedback
  assign value_shr = value_q >> 1;

  bd_mux2x1 #(.WIDTH(WIDTH)) u_value_mux (
    .sel(ctrl.value_sel), .in0(value_shr), .in1(din), .y(value_d));
  bd_reg #(.WIDTH(WIDTH)) u_value_reg (
    .clk(clk), .rst(rst), .ld(ctrl.value_ld), .d(value_d), .q(value_q));

  // Diff register with its +1 / -1 units
  bd_add #(.WIDTH(WIDTH)) u_diff_add (
    .a(diff_q), .b(WIDTH'(1)), .sum(diff_inc));
  bd_sub #(.WIDTH(WIDTH)) u_diff_sub (
    .a(diff_q), .b(WIDTH'(1)), .diff(diff_dec));
  bd_mux2x1 #(.WIDTH(WIDTH)) u_bit_mux (
    .sel(value_q[0]), .in0(diff_dec), .in1(diff_inc), .y(diff_step));
  bd_mux2x1 #(.WIDTH(WIDTH)) u_diff_mux (
    .sel(ctrl.diff_sel), .in0(diff_step), .in1('0), .y(diff_d));
  bd_reg #(.WIDTH(WIDTH)) u_diff_reg (
    .clk(clk), .rst(rst), .ld(ctrl.diff_ld), .d(diff_d), .q(diff_q));

  // Output register
  bd_reg #(.WIDTH(WIDTH)) u_output_reg (
    .clk(clk), .rst(rst), .ld(ctrl.output_ld), .d(diff_q), .q(dout));

  // Bit counter
  bd_add #(.WIDTH(CW)) u_count_add (
    .a(count_q), .b(CW'(1)), .sum(count_inc));
  bd_mux2x1 #(.WIDTH(CW)) u_count_mux (
    .sel(ctrl.count_sel), .in0(count_inc), .in1('0), .y(count_d));
  bd_reg #(.WIDTH(CW)) u_count_reg (
    .clk(clk), .rst(rst), .ld(ctrl.count_ld), .d(count_d), .q(count_q));
  bd_comp #(.WIDTH(CW)) u_count_comp (
    .a(count_q), .b(CW'(WIDTH)), .eq(count_done));

endmodule
