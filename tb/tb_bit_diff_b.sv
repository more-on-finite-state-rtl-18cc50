// tb_bit_diff_b: end-to-end test of bit_diff_b at the default
// width (16) and at width 5. Each word's result must equal
// (ones - zeros); done must rise exactly WIDTH+2 clocks after the edge
// that samples go, last one clock, and dout must hold its value until the
// next result. Runs are started both one by one and back to back (go held
// high).
module tb_bit_diff_b;
  logic clk = 1'b0, rst = 1'b0;
  logic go16 = 1'b0, go5 = 1'b0;
  logic [15:0] din16 = '0, dout16;
  logic [4:0]  din5 = '0, dout5;
  logic done16, done5;
  int checks = 0, failures = 0;

  // raise the asynchronous reset after time 0 so that its edge is seen
  initial #1 rst = 1'b1;

  bit_diff_b dut16 (.clk(clk), .rst(rst), .go(go16), .din(din16), .dout(dout16), .done(done16));
  bit_diff_b #(.WIDTH(5)) dut5 (.clk(clk), .rst(rst), .go(go5), .din(din5), .dout(dout5), .done(done5));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_diff(logic [15:0] v, int w);
    int ones = 0;
    for (int i = 0; i < w; i++) ones += int'(v[i]);
    return ones - (w - ones);
  endfunction

  // Start one run on the 16-bit instance and check result and latency.
  task automatic run16(input logic [15:0] word, input bit keep_go);
    int cyc;
    @(negedge clk);
    din16 = word; go16 = 1'b1;
    @(posedge clk);               // edge 0: go sampled
    @(negedge clk);
    if (!keep_go) go16 = 1'b0;
    din16 = 16'($urandom);         // later input changes must not matter
    cyc = 0;
    while (!done16 && cyc < 100) begin
      @(posedge clk); cyc++;
      #1;
    end
    checks++;
    if (cyc != 16 + 1) begin failures++; $display("FAIL latency: done after edge %0d", cyc); end
    checks++;
    if ($signed(dout16) != ref_diff(word, 16)) begin
      failures++;
      $display("FAIL word %h: dout %0d expected %0d", word, $signed(dout16), ref_diff(word, 16));
    end
    @(posedge clk); #1;
    checks++;
    if (done16 !== 1'b0) begin failures++; $display("FAIL done longer than one clock"); end
    checks++;
    if ($signed(dout16) != ref_diff(word, 16)) begin failures++; $display("FAIL dout not held"); end
    go16 = 1'b0;
  endtask

  task automatic run5(input logic [4:0] word);
    int cyc;
    @(negedge clk);
    din5 = word; go5 = 1'b1;
    @(posedge clk);
    @(negedge clk) go5 = 1'b0;
    cyc = 0;
    while (!done5 && cyc < 100) begin
      @(posedge clk); cyc++;
      #1;
    end
    checks++;
    if (cyc != 5 + 1) begin failures++; $display("FAIL w5 latency %0d", cyc); end
    checks++;
    if ($signed(dout5) != ref_diff(16'(word), 5)) begin
      failures++;
      $display("FAIL w5 word %b: dout %0d expected %0d", word, $signed(dout5), ref_diff(16'(word), 5));
    end
    @(posedge clk);               // leave the done state before the next go
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    run16(16'hFFFF, 0);
    run16(16'h0000, 0);
    run16(16'b0000_0000_0000_0111, 0);  // 3 ones, 13 zeros
    run16(16'b1111_1111_1001_1111, 0);  // 14 ones, 2 zeros
    for (int n = 0; n < 100; n++) run16(16'($urandom), n % 3 == 0);
    for (int n = 0; n < 32; n++) run5(5'(n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
