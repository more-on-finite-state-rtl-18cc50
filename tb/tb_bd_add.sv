// tb_bd_add: random and corner operands against a + b mod 2**WIDTH,
// for WIDTH 16 and 5.
module tb_bd_add;
  logic [15:0] a16, b16, s16;
  logic [4:0]  a5, b5, s5;
  int checks = 0, failures = 0;

  bd_add dut16 (.a(a16), .b(b16), .sum(s16));
  bd_add #(.WIDTH(5)) dut5 (.a(a5), .b(b5), .sum(s5));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      a16 = (n < 4) ? 16'hFFFF : 16'($urandom);
      b16 = (n < 4) ? 16'(n)   : 16'($urandom);
      a5 = 5'($urandom); b5 = 5'($urandom);
      #1;
      checks++;
      if (int'(s16) != (int'(a16) + int'(b16)) % 65536 || int'(s5) != (int'(a5) + int'(b5)) % 32) begin
        failures++;
        $display("FAIL %h+%h=%h  %h+%h=%h", a16, b16, s16, a5, b5, s5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
