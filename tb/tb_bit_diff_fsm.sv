// tb_bit_diff_fsm: checks the controller's outputs state by state. In the
// idle state all three registers are initialised (select 1, load 1)
// whatever go is; after go, each clock without count_done asserts the
// three step loads with selects 0; count_done gives output_ld alone and
// then a single done clock before returning to idle.
module tb_bit_diff_fsm;
  import bit_diff_pkg::*;
  logic clk = 1'b0, rst = 1'b0, go = 1'b0, count_done = 1'b0;
  bd_ctrl_t ctrl;
  logic done;
  int checks = 0, failures = 0;

  // raise the asynchronous reset after time 0 so that its edge is seen
  initial #1 rst = 1'b1;

  bit_diff_fsm dut (.clk(clk), .rst(rst), .go(go), .count_done(count_done),
                    .ctrl(ctrl), .done(done));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam bd_ctrl_t INIT_C = '{value_sel: 1, value_ld: 1, diff_sel: 1, diff_ld: 1,
                                  count_sel: 1, count_ld: 1, output_ld: 0};
  localparam bd_ctrl_t STEP_C = '{value_sel: 0, value_ld: 1, diff_sel: 0, diff_ld: 1,
                                  count_sel: 0, count_ld: 1, output_ld: 0};
  localparam bd_ctrl_t STORE_C = '{value_sel: 0, value_ld: 0, diff_sel: 0, diff_ld: 0,
                                   count_sel: 0, count_ld: 0, output_ld: 1};

  task automatic expect_c(input bd_ctrl_t c, input logic d, input string what);
    checks++;
    if (ctrl !== c || done !== d) begin
      failures++;
      $display("FAIL %s: ctrl=%b done=%b", what, ctrl, done);
    end
  endtask

  initial begin
    #2 expect_c(INIT_C, 0, "reset");
    @(negedge clk) rst = 1'b0;
    for (int run = 0; run < 30; run++) begin
      int steps = $urandom_range(1, 20);
      int wait_c = $urandom_range(0, 3);
      repeat (wait_c) begin @(negedge clk); expect_c(INIT_C, 0, "idle"); end
      go = 1'b1;
      #1 expect_c(INIT_C, 0, "idle with go");
      @(negedge clk);
      go = $urandom_range(0, 1);   // go is ignored while busy
      for (int i = 0; i < steps; i++) begin
        expect_c(STEP_C, 0, "step");
        @(negedge clk);
      end
      count_done = 1'b1;
      #1 expect_c(STORE_C, 0, "store");
      @(negedge clk);
      count_done = 1'b0;
      go = 1'b0;
      expect_c('0, 1, "done");
      @(negedge clk);
      expect_c(INIT_C, 0, "back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
