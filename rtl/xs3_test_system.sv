// xs3_test_system: board test circuit for the serial BCD to excess-3
// converter.
//
// A 100 MHz board clock is divided down to a slow clock (1 Hz by default)
// that runs everything else, so each step can be followed by eye. Four
// slide switches set a BCD digit; an input shift register turns it into a
// serial stream (least significant bit first) for the Mealy converter,
// and an output shift register collects the converter's serial output and
// drives four LEDs. xs3_control sequences one conversion per enable
// pulse: while enable is 0 the switches are sampled; raising enable shifts
// the digit through in four slow clocks; the LEDs then show digit+3 until
// enable drops. reset (active high, asynchronous for the slow-clock part)
// clears the sequencer and the LED register.
//
// The structure (divider, two 4-bit shift registers, control, converter,
// switch and LED connections) follows the original block diagram; the
// control sequence and the reset/enable use are this design's choices.
// The slow clock is a divided flip-flop output, as in the original.
// The input register's parallel output (in_q) and the output register's
// serial output (out_sout) are not needed here and are left unused.
module xs3_test_system #(
  parameter int unsigned CLK_HZ  = 100_000_000,
  parameter int unsigned SLOW_HZ = 1
) (
  input  logic             clk100,
  input  logic             reset,
  input  logic             enable,
  input  logic [3:0]       sw,
  output logic [3:0]       led,
  output logic             busy
);

  localparam int unsigned WIDTH = 4;   // one BCD digit

  logic clk;
  logic load_in, shift, conv_enable;
  logic x, z;
  logic [WIDTH-1:0] in_q;
  logic             out_sout;

  clock_divider #(.IN_HZ(CLK_HZ), .OUT_HZ(SLOW_HZ)) u_div (
    .clk_in (clk100),
    .rst    (reset),
    .clk_out(clk)
  );

  xs3_control #(.WIDTH(WIDTH)) u_ctrl (
    .clk        (clk),
    .rst        (reset),
    .enable     (enable),
    .load_in    (load_in),
    .shift      (shift),
    .conv_enable(conv_enable),
    .busy       (busy)
  );

  shift_register #(.WIDTH(WIDTH)) u_sr_in (
    .clk  (clk),
    .rst  (reset),
    .load (load_in),
    .shift(shift),
    .d    (sw),
    .sin  (1'b0),
    .q    (in_q),
    .sout (x)
  );

  code_converter u_conv (
    .clk   (clk),
    .enable(conv_enable),
    .x     (x),
    .z     (z)
  );

  shift_register #(.WIDTH(WIDTH)) u_sr_out (
    .clk  (clk),
    .rst  (reset),
    .load (1'b0),
    .shift(shift),
    .d    ('0),
    .sin  (z),
    .q    (led),
    .sout (out_sout)
  );

endmodule
