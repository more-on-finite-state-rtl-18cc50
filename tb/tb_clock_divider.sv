// tb_clock_divider: measures the output period of a divider set to
// IN_HZ=20, OUT_HZ=2 (half period 5 input clocks) and of one with a half
// period of 1, and checks that reset holds the output low.
module tb_clock_divider;
  logic clk = 1'b0, rst = 1'b0;
  logic co5, co1;
  int checks = 0, failures = 0;

  // raise the asynchronous reset after time 0 so that its edge is seen
  initial #1 rst = 1'b1;

  clock_divider #(.IN_HZ(20), .OUT_HZ(2)) dut5 (.clk_in(clk), .rst(rst), .clk_out(co5));
  clock_divider #(.IN_HZ(2),  .OUT_HZ(1)) dut1 (.clk_in(clk), .rst(rst), .clk_out(co1));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, last5, last1;
    logic p5, p1;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (co5 !== 1'b0 || co1 !== 1'b0) begin failures++; $display("FAIL reset"); end
    @(negedge clk) rst = 1'b0;
    cyc = 0; last5 = -1; last1 = -1; p5 = co5; p1 = co1;
    for (int n = 0; n < 200; n++) begin
      @(posedge clk); #1;
      cyc++;
      if (co5 !== p5) begin
        if (last5 < 0) begin
          checks++;
          if (cyc != 5) begin failures++; $display("FAIL first toggle at %0d", cyc); end
        end else begin
          checks++;
          if (cyc - last5 != 5) begin failures++; $display("FAIL half period %0d", cyc - last5); end
        end
        last5 = cyc; p5 = co5;
      end
      if (co1 !== p1) begin
        if (last1 >= 0) begin
          checks++;
          if (cyc - last1 != 1) begin failures++; $display("FAIL half period 1: %0d", cyc - last1); end
        end
        last1 = cyc; p1 = co1;
      end
    end
    checks++;
    if (last5 < 150) begin failures++; $display("FAIL divider stopped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
