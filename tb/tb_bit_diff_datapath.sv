// tb_bit_diff_datapath: drives the datapath's select/load lines directly
// in the order a controller would (initialise, one step per bit, store)
// and checks that count_done rises exactly after WIDTH steps, that the
// stored output equals ones - zeros of the word, and that the Output
// register holds while output_ld is 0.
module tb_bit_diff_datapath;
  import bit_diff_pkg::*;
  localparam int W = 16;
  logic clk = 1'b0, rst = 1'b0;
  bd_ctrl_t ctrl;
  logic [W-1:0] din, dout;
  logic count_done;
  int checks = 0, failures = 0;

  // raise the asynchronous reset after time 0 so that its edge is seen
  initial #1 rst = 1'b1;

  bit_diff_datapath dut (.clk(clk), .rst(rst), .ctrl(ctrl), .din(din),
                         .dout(dout), .count_done(count_done));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_diff(logic [W-1:0] v);
    int ones = 0;
    for (int i = 0; i < W; i++) ones += int'(v[i]);
    return ones - (W - ones);
  endfunction

  task automatic run_word(input logic [W-1:0] word);
    logic [W-1:0] held;
    @(negedge clk);
    ctrl = '0;
    ctrl.value_sel = 1'b1; ctrl.value_ld = 1'b1;
    ctrl.diff_sel  = 1'b1; ctrl.diff_ld  = 1'b1;
    ctrl.count_sel = 1'b1; ctrl.count_ld = 1'b1;
    din = word;
    held = dout;
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      checks++;
      if (count_done !== 1'b0) begin failures++; $display("FAIL count_done early at step %0d", i); end
      ctrl = '0;
      ctrl.value_ld = 1'b1; ctrl.diff_ld = 1'b1; ctrl.count_ld = 1'b1;
      din = 16'($urandom);   // must be ignored now
    end
    @(negedge clk);
    checks++;
    if (count_done !== 1'b1) begin failures++; $display("FAIL count_done missing"); end
    checks++;
    if (dout !== held) begin failures++; $display("FAIL output changed without output_ld"); end
    ctrl = '0;
    ctrl.output_ld = 1'b1;
    @(negedge clk);
    ctrl = '0;
    checks++;
    if ($signed(dout) != ref_diff(word)) begin
      failures++;
      $display("FAIL word %h: dout %0d expected %0d", word, $signed(dout), ref_diff(word));
    end
  endtask

  initial begin
    ctrl = '0; din = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    run_word(16'hFFFF);
    run_word(16'h0000);
    run_word(16'h0707);   // 6 ones: -4
    run_word(16'hFFF8);   // 13 ones: 10
    for (int n = 0; n < 200; n++) run_word(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
