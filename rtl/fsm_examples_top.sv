// fsm_examples_top: the finite-state-machine examples side by side.
//
// Four independent designs, each with its own ports:
//   xs3_*  board test system for the serial BCD to excess-3 Mealy
//          converter (100 MHz clock in, slide switches in, LEDs out)
//   bda_*  bit difference calculator, behavioural FSMD (bit_diff_a)
//   bdb_*  bit difference calculator, structural FSMD (bit_diff_b)
//   mo_*   serial BCD to excess-3 converter as a Moore machine
// Nothing is shared between them; see each module for its timing.
module fsm_examples_top #(
  parameter int unsigned CLK_HZ   = 100_000_000,
  parameter int unsigned SLOW_HZ  = 1,
  parameter int unsigned BD_WIDTH = 16
) (
  // converter board test system
  input  logic                clk100,
  input  logic                xs3_reset,
  input  logic                xs3_enable,
  input  logic [3:0]          xs3_sw,
  output logic [3:0]          xs3_led,
  output logic                xs3_busy,
  // bit difference calculator, implementation A
  input  logic                bda_clk,
  input  logic                bda_rst,
  input  logic                bda_go,
  input  logic [BD_WIDTH-1:0] bda_din,
  output logic [BD_WIDTH-1:0] bda_dout,
  output logic                bda_done,
  // bit difference calculator, implementation B
  input  logic                bdb_clk,
  input  logic                bdb_rst,
  input  logic                bdb_go,
  input  logic [BD_WIDTH-1:0] bdb_din,
  output logic [BD_WIDTH-1:0] bdb_dout,
  output logic                bdb_done,
  // Moore converter
  input  logic                mo_clk,
  input  logic                mo_enable,
  input  logic                mo_x,
  output logic                mo_z
);

  xs3_test_system #(.CLK_HZ(CLK_HZ), .SLOW_HZ(SLOW_HZ)) u_xs3 (
    .clk100(clk100),
    .reset (xs3_reset),
    .enable(xs3_enable),
    .sw    (xs3_sw),
    .led   (xs3_led),
    .busy  (xs3_busy)
  );

  bit_diff_a #(.WIDTH(BD_WIDTH)) u_bda (
    .clk (bda_clk),
    .rst (bda_rst),
    .go  (bda_go),
    .din (bda_din),
    .dout(bda_dout),
    .done(bda_done)
  );

  bit_diff_b #(.WIDTH(BD_WIDTH)) u_bdb (
    .clk (bdb_clk),
    .rst (bdb_rst),
    .go  (bdb_go),
    .din (bdb_din),
    .dout(bdb_dout),
    .done(bdb_done)
  );

  code_converter_moore u_moore (
    .clk   (mo_clk),
    .enable(mo_enable),
    .x     (mo_x),
    .z     (mo_z)
  );

endmodule
