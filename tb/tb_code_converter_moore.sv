// tb_code_converter_moore: self-checking test of the Moore BCD to
// excess-3 converter. Digits are sent least significant bit first, back
// to back; the output bit for the input bit taken at an edge is read
// after that edge (one clock later than the Mealy version) and the word
// is compared with digit + 3. Also checks that z is 0 after reset.
module tb_code_converter_moore;
  logic clk = 1'b0, enable = 1'b1, x = 1'b0;
  logic z;
  int checks = 0, failures = 0;

  // drop the asynchronous active-low reset after time 0 so that its edge is seen
  initial #1 enable = 1'b0;

  code_converter_moore dut (.clk(clk), .enable(enable), .x(x), .z(z));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_digit(input logic [3:0] d);
    logic [3:0] got;
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      x = d[i];
      @(posedge clk);
      #1 got[i] = z;
    end
    checks++;
    if (got !== 4'(d + 4'd3)) begin
      failures++;
      $display("FAIL digit %0d: got %b expected %b", d, got, 4'(d + 4'd3));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    checks++;
    if (z !== 1'b0) begin failures++; $display("FAIL z not 0 in reset"); end
    #2 enable = 1'b1;   // released between edges; the first bit follows
    for (int rep = 0; rep < 3; rep++)
      for (int d = 0; d < 10; d++) send_digit(4'(d));
    for (int n = 0; n < 40; n++) send_digit(4'($urandom_range(0, 9)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
