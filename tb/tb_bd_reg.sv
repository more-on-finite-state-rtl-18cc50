// tb_bd_reg: load-enable register against a model with random ld and d;
// checks the asynchronous reset too.
module tb_bd_reg;
  logic clk = 1'b0, rst = 1'b0, ld = 1'b0;
  logic [15:0] d = '0, q, m;
  int checks = 0, failures = 0;

  bd_reg dut (.clk(clk), .rst(rst), .ld(ld), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst = 1'b1;
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset"); end
    m = '0;
    @(negedge clk) rst = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      ld = $urandom_range(0, 1); d = 16'($urandom);
      if (ld) m = d;
      @(posedge clk); #1;
      checks++;
      if (q !== m) begin failures++; $display("FAIL q=%h expected %h", q, m); end
    end
    @(negedge clk) rst = 1'b1;
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL async reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
