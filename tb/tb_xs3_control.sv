// tb_xs3_control: checks the converter test sequencer. While enable is 0
// it must load and keep the converter in reset; after enable rises it
// must shift for exactly 4 clocks with conv_enable high in just those
// clocks, then hold (no load, no shift) until enable falls.
module tb_xs3_control;
  logic clk = 1'b0, rst = 1'b0, enable = 1'b0;
  logic load_in, shift, conv_enable, busy;
  int checks = 0, failures = 0;

  xs3_control dut (.clk(clk), .rst(rst), .enable(enable), .load_in(load_in),
                   .shift(shift), .conv_enable(conv_enable), .busy(busy));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(input logic l, input logic s, input logic c, input string what);
    checks++;
    if (load_in !== l || shift !== s || conv_enable !== c || busy !== s) begin
      failures++;
      $display("FAIL %s: load=%b shift=%b conv_en=%b busy=%b", what, load_in, shift, conv_enable, busy);
    end
  endtask

  initial begin
    #1 rst = 1'b1;
    #1 expect_out(1, 0, 0, "reset");
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int run = 0; run < 20; run++) begin
      int idle = $urandom_range(1, 4);
      int show = $urandom_range(1, 5);
      repeat (idle) begin @(posedge clk); #1 expect_out(1, 0, 0, "idle"); end
      @(negedge clk) enable = 1'b1;
      for (int i = 0; i < 4; i++) begin @(posedge clk); #1 expect_out(0, 1, 1, "shift"); end
      repeat (show) begin @(posedge clk); #1 expect_out(0, 0, 0, "show"); end
      @(negedge clk) enable = 1'b0;
      @(posedge clk); #1 expect_out(1, 0, 0, "back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
