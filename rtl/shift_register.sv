// shift_register: parallel-load, right-shifting register.
//
// load copies d into q; otherwise shift moves q one place to the right,
// taking sin into the most significant bit, and presents the bit shifted
// out on sout (always q[0]). load wins over shift. rst clears q
// asynchronously, so it acts even while a divided clock is stopped.
//
// In the converter test system one instance serialises the slide switches
// (least significant bit first) and a second one collects the converter
// output so that, after WIDTH shifts, q holds the word in its natural bit
// order. The two 4-bit registers come from the original block diagram;
// the load/shift controls and the reset are this design's choices.
module shift_register #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic             shift,
  input  logic [WIDTH-1:0] d,
  input  logic             sin,
  output logic [WIDTH-1:0] q,
  output logic             sout
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)        q <= '0;
    else if (load)  q <= d;
    else if (shift) q <= {sin, q[WIDTH-1:1]};
  end

  assign sout = q[0];

endmodule
