// tb_shift_register: random load/shift/hold sequences against a
// reference model, for the default 4-bit register and an 8-bit one;
// also checks the asynchronous reset.
module tb_shift_register;
  logic clk = 1'b0, rst = 1'b0;
  logic load4, shift4, sin4, load8, shift8, sin8;
  logic [3:0] d4, q4, m4;
  logic [7:0] d8, q8, m8;
  logic sout4, sout8;
  int checks = 0, failures = 0;

  shift_register dut4 (.clk(clk), .rst(rst), .load(load4), .shift(shift4),
                       .d(d4), .sin(sin4), .q(q4), .sout(sout4));
  shift_register #(.WIDTH(8)) dut8 (.clk(clk), .rst(rst), .load(load8), .shift(shift8),
                       .d(d8), .sin(sin8), .q(q8), .sout(sout8));

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
    {load4, shift4, sin4, load8, shift8, sin8} = '0;
    d4 = '0; d8 = '0;
    #1;
    checks++;
    if (q4 !== '0 || q8 !== '0) begin failures++; $display("FAIL reset"); end
    m4 = '0; m8 = '0;
    @(negedge clk) rst = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      load4 = ($urandom_range(0, 3) == 0); shift4 = $urandom_range(0, 1); sin4 = $urandom_range(0, 1);
      load8 = ($urandom_range(0, 3) == 0); shift8 = $urandom_range(0, 1); sin8 = $urandom_range(0, 1);
      d4 = 4'($urandom); d8 = 8'($urandom);
      if (load4) m4 = d4; else if (shift4) m4 = {sin4, m4[3:1]};
      if (load8) m8 = d8; else if (shift8) m8 = {sin8, m8[7:1]};
      @(posedge clk); #1;
      checks++;
      if (q4 !== m4 || sout4 !== m4[0] || q8 !== m8 || sout8 !== m8[0]) begin
        failures++;
        $display("FAIL step %0d: q4=%h/%h q8=%h/%h", n, q4, m4, q8, m8);
      end
    end
    @(negedge clk) rst = 1'b1;
    #1;
    checks++;
    if (q4 !== '0 || q8 !== '0) begin failures++; $display("FAIL async reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
