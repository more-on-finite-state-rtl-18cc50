// xs3_control: sequencer of the converter test system.
//
// Three states. IDLE: the input shift register is loaded from the slide
// switches on every clock and the converter is held in S0. When enable is
// 1, SHIFT runs for exactly WIDTH clocks: both shift registers shift and
// the converter is released, so one BCD digit passes through it least
// significant bit first and its excess-3 image is collected in the output
// register. SHOW then holds the result on the LEDs until enable returns
// to 0, which goes back to IDLE.
//
// conv_enable feeds the converter's active-low asynchronous reset, so it
// is taken straight from a flip-flop (it is 1 exactly in the SHIFT clocks)
// and cannot glitch. load_in and shift are decoded from the state. rst is
// asynchronous. The original system names this block but does not give
// its behaviour; the sequence above is this design's choice.
module xs3_control #(
  parameter int unsigned WIDTH = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic enable,
  output logic load_in,
  output logic shift,
  output logic conv_enable,
  output logic busy
);

  typedef enum logic [1:0] {IDLE, SHIFT, SHOW} ctrl_state_t;

  localparam int unsigned CW = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  ctrl_state_t   state, next_state;
  logic [CW-1:0] count;

  always_comb begin
    next_state = state;
    unique case (state)
      IDLE:    if (enable) next_state = SHIFT;
      SHIFT:   if (count == CW'(WIDTH - 1)) next_state = SHOW;
      SHOW:    if (!enable) next_state = IDLE;
      default: next_state = IDLE;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state       <= IDLE;
      count       <= '0;
      conv_enable <= 1'b0;
    end else begin
      state       <= next_state;
      count       <= (state == SHIFT) ? count + 1'b1 : '0;
      conv_enable <= (next_state == SHIFT);
    end
  end

  assign load_in = (state == IDLE);
  assign shift   = (state == SHIFT);
  assign busy    = (state == SHIFT);

endmodule
