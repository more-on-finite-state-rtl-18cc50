// tb_bd_comp: equality comparator, exhaustive for WIDTH 5 and random
// (with forced equal pairs) for WIDTH 16.
module tb_bd_comp;
  logic [15:0] a16, b16;
  logic [4:0]  a5, b5;
  logic eq16, eq5;
  int checks = 0, failures = 0;

  bd_comp dut16 (.a(a16), .b(b16), .eq(eq16));
  bd_comp #(.WIDTH(5)) dut5 (.a(a5), .b(b5), .eq(eq5));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a16 = '0; b16 = '0;
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        a5 = 5'(i); b5 = 5'(j);
        #1;
        checks++;
        if (eq5 !== (i == j)) begin failures++; $display("FAIL %0d==%0d gave %b", i, j, eq5); end
      end
    for (int n = 0; n < 1000; n++) begin
      a16 = 16'($urandom);
      b16 = (n % 2 == 0) ? a16 : a16 ^ (16'd1 << $urandom_range(0, 15));
      #1;
      checks++;
      if (eq16 !== (n % 2 == 0)) begin failures++; $display("FAIL %h==%h gave %b", a16, b16, eq16); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
