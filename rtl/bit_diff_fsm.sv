// bit_diff_fsm: controller of the structural bit difference calculator.
//
// It runs the three-state graph S_INIT -> S_CHECK_BIT -> S_DONE -> S_INIT
// and turns each state into the select/load lines of bit_diff_datapath.
//   S_INIT      Value <- din, Diff <- 0, Count <- 0 on every clock;
//               go=1 moves to S_CHECK_BIT.
//   S_CHECK_BIT while count_done=0: Value <- Value>>1, Diff <- Diff+-1,
//               Count <- Count+1. When count_done=1 (all WIDTH bits seen):
//               Output <- Diff and move to S_DONE.
//   S_DONE      done=1 for one clock, back to S_INIT.
// The state names and transitions follow the original state graph. The
// graph writes "output = diff" inside the done state; here the Output
// register is loaded on the edge that enters S_DONE, so dout is already
// valid while done is 1. That placement, and the Moore-style decoding of
// the control lines (they depend on state and the two status inputs
// only), are this design's choices.
//
// Timing: counting the edge that samples go=1 as edge 0, done is 1 between
// edges WIDTH+1 and WIDTH+2, the same as bit_diff_a. rst is active high
// and asynchronous.
module bit_diff_fsm
  import bit_diff_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     go,
  input  logic     count_done,
  output bd_ctrl_t ctrl,
  output logic     done
);

  typedef enum logic [1:0] {S_INIT, S_CHECK_BIT, S_DONE} state_t;

  state_t state, next_state;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) state <= S_INIT;
    else     state <= next_state;
  end

  always_comb begin
    ctrl       = '0;
    done       = 1'b0;
    next_state = state;
    unique case (state)
      S_INIT: begin
        ctrl.value_sel = 1'b1;
        ctrl.value_ld  = 1'b1;
        ctrl.diff_sel  = 1'b1;
        ctrl.diff_ld   = 1'b1;
        ctrl.count_sel = 1'b1;
        ctrl.count_ld  = 1'b1;
        if (go) next_state = S_CHECK_BIT;
      end
      S_CHECK_BIT: begin
        if (count_done) begin
          ctrl.output_ld = 1'b1;
          next_state     = S_DONE;
        end else begin
          ctrl.value_ld = 1'b1;
          ctrl.diff_ld  = 1'b1;
          ctrl.count_ld = 1'b1;
        end
      end
      S_DONE: begin
        done       = 1'b1;
        next_state = S_INIT;
      end
      default: next_state = S_INIT;
    endcase
  end

endmodule
