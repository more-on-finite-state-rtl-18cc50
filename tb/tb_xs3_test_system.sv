// tb_xs3_test_system: the converter board system with a fast divider
// (CLK_HZ=16, SLOW_HZ=1: slow period 16 board clocks). For every BCD
// digit on the switches it pulses enable and checks that the LEDs then
// show digit + 3, that busy lasts exactly 4 slow clocks, and that the
// LEDs keep the result while enable stays high.
module tb_xs3_test_system;
  localparam int DIV = 16;
  logic clk100 = 1'b0, reset = 1'b0, enable = 1'b0;
  logic [3:0] sw = '0, led;
  logic busy;
  int checks = 0, failures = 0;

  // raise the asynchronous reset after time 0 so that its edge is seen
  initial #1 reset = 1'b1;

  xs3_test_system #(.CLK_HZ(DIV), .SLOW_HZ(1)) dut (
    .clk100(clk100), .reset(reset), .enable(enable), .sw(sw), .led(led), .busy(busy));

  always #5 clk100 = ~clk100;

  initial begin
    repeat (100000) @(posedge clk100);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic convert(input logic [3:0] d);
    int busy_slow;
    sw = d;
    repeat (3 * DIV) @(posedge clk100);
    enable = 1'b1;
    busy_slow = 0;
    // count slow clock edges seen with busy high
    @(posedge busy);
    do begin
      @(posedge dut.clk);
      #1 busy_slow++;
    end while (busy && busy_slow < 10);
    checks++;
    if (busy_slow != 4) begin failures++; $display("FAIL busy for %0d slow clocks", busy_slow); end
    repeat (3 * DIV) @(posedge clk100);
    checks++;
    if (led !== 4'(d + 4'd3)) begin
      failures++;
      $display("FAIL digit %0d: led %b expected %b", d, led, 4'(d + 4'd3));
    end
    enable = 1'b0;
  endtask

  initial begin
    repeat (3 * DIV) @(posedge clk100);
    reset = 1'b0;
    for (int d = 0; d < 10; d++) convert(4'(d));
    for (int n = 0; n < 10; n++) convert(4'($urandom_range(0, 9)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
