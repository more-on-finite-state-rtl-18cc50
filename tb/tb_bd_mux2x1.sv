// tb_bd_mux2x1: random inputs and both select values, WIDTH 16 and 1.
module tb_bd_mux2x1;
  logic        sel;
  logic [15:0] i0, i1, y16;
  logic        j0, j1, y1;
  int checks = 0, failures = 0;

  bd_mux2x1 dut16 (.sel(sel), .in0(i0), .in1(i1), .y(y16));
  bd_mux2x1 #(.WIDTH(1)) dut1 (.sel(sel), .in0(j0), .in1(j1), .y(y1));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      sel = 1'(n); i0 = 16'($urandom); i1 = 16'($urandom); j0 = 1'($urandom); j1 = ~j0;
      #1;
      checks++;
      if (y16 !== (sel ? i1 : i0) || y1 !== (sel ? j1 : j0)) begin
        failures++;
        $display("FAIL sel=%b y16=%h", sel, y16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
