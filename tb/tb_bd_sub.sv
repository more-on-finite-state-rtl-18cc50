// tb_bd_sub: random and corner operands against a - b mod 2**WIDTH,
// for WIDTH 16 and 5.
module tb_bd_sub;
  logic [15:0] a16, b16, d16;
  logic [4:0]  a5, b5, d5;
  int checks = 0, failures = 0;

  bd_sub dut16 (.a(a16), .b(b16), .diff(d16));
  bd_sub #(.WIDTH(5)) dut5 (.a(a5), .b(b5), .diff(d5));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      a16 = (n < 4) ? 16'(n) : 16'($urandom);
      b16 = (n < 4) ? 16'd1  : 16'($urandom);
      a5 = 5'($urandom); b5 = 5'($urandom);
      #1;
      checks++;
      if (int'(d16) != (int'(a16) - int'(b16) + 65536) % 65536 || int'(d5) != (int'(a5) - int'(b5) + 32) % 32) begin
        failures++;
        $display("FAIL %h-%h=%h  %h-%h=%h", a16, b16, d16, a5, b5, d5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
