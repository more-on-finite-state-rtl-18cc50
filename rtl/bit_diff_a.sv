// bit_diff_a: bit difference calculator, behavioural FSMD.
//
// For a WIDTH-bit input word it computes (number of 1 bits) - (number of
// 0 bits) as a WIDTH-bit two's complement result: 3 more ones than zeros
// gives 3, 3 more zeros than ones gives -3. The controller and the
// datapath are written together as one register process and one
// combinational next-value process.
//
// States: S_INIT clears count and diff and keeps loading din into value;
// go=1 starts. S_CHECK_BIT looks at value[0], adds 1 to diff for a 1 and
// subtracts 1 for a 0, shifts value right and counts, WIDTH times.
// S_STORE_OUTPUT copies diff into the output register. S_DONE raises done
// for one clock and returns to S_INIT.
//
// Timing: counting the rising edge that samples go=1 in S_INIT as edge 0,
// done is 1 between edges WIDTH+1 and WIDTH+2, and dout holds the result
// from edge WIDTH+1 until the next result is stored. rst is active high and asynchronous; it clears every register.
// The four states and the register set follow the original example; the
// unconditional return from S_DONE to S_INIT follows its state graph.
module bit_diff_a #(
  parameter int unsigned WIDTH = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    go,
  input  logic        [WIDTH-1:0] din,
  output logic signed [WIDTH-1:0] dout,
  output logic                    done
);

  localparam int unsigned CW = $clog2(WIDTH + 1);

  typedef enum logic [1:0] {S_INIT, S_CHECK_BIT, S_STORE_OUTPUT, S_DONE} state_t;

  state_t                   state, next_state;
  logic        [WIDTH-1:0]  value, next_value;
  logic signed [WIDTH-1:0]  diff, next_diff;
  logic        [CW-1:0]     count, next_count;
  logic signed [WIDTH-1:0]  output_s, next_output;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      value    <= '0;
      count    <= '0;
      diff     <= '0;
      output_s <= '0;
      state    <= S_INIT;
    end else begin
      value    <= next_value;
      count    <= next_count;
      diff     <= next_diff;
      output_s <= next_output;
      state    <= next_state;
    end
  end

  always_comb begin
    logic [CW-1:0] temp;
    next_count  = count;
    next_value  = value;
    next_diff   = diff;
    next_output = output_s;
    next_state  = state;
    done        = 1'b0;
    temp        = count + 1'b1;
    unique case (state)
      S_INIT: begin
        next_count = '0;
        next_diff  = '0;
        next_value = din;
        if (go) next_state = S_CHECK_BIT;
      end
      S_CHECK_BIT: begin
        if (value[0]) next_diff = diff + 1'b1;
        else          next_diff = diff - 1'b1;
        next_value = value >> 1;
        next_count = temp;
        if (temp == CW'(WIDTH)) next_state = S_STORE_OUTPUT;
      end
      S_STORE_OUTPUT: begin
        next_output = diff;
        next_state  = S_DONE;
      end
      S_DONE: begin
        done       = 1'b1;
        next_state = S_INIT;
      end
      default: next_state = S_INIT;
    endcase
  end

  assign dout = output_s;

  initial assert (WIDTH >= 2) else $fatal(1, "WIDTH must be at least 2");

endmodule
