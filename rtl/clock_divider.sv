// clock_divider: derives a slow, 50% duty-cycle clock from the board clock.
//
// A counter runs from 0 to HALF_PERIOD-1 on clk_in; every time it wraps,
// clk_out toggles. clk_out therefore has the frequency
// IN_HZ / (2 * HALF_PERIOD); the defaults turn the 100 MHz oscillator into
// a 1 Hz clock, slow enough to watch the converter on LEDs. rst (active
// high, asynchronous) clears counter and output. The wrap compare is ">="
// so that any start value of the counter recovers within one wrap. The
// 100 MHz input and the roughly 1 Hz output are the original board's
// figures; the counter structure is this design's choice.
module clock_divider #(
  parameter int unsigned IN_HZ       = 100_000_000,
  parameter int unsigned OUT_HZ      = 1,
  parameter int unsigned HALF_PERIOD = IN_HZ / (2 * OUT_HZ)
) (
  input  logic clk_in,
  input  logic rst,
  output logic clk_out
);

  localparam int unsigned CW = (HALF_PERIOD > 1) ? $clog2(HALF_PERIOD) : 1;

  logic [CW-1:0] count;

  always_ff @(posedge clk_in or posedge rst) begin
    if (rst) begin
      count   <= '0;
      clk_out <= 1'b0;
    end else if (count >= CW'(HALF_PERIOD - 1)) begin
      count   <= '0;
      clk_out <= ~clk_out;
    end else begin
      count   <= count + 1'b1;
    end
  end

  initial assert (HALF_PERIOD >= 1) else $fatal(1, "HALF_PERIOD must be at least 1");

endmodule
