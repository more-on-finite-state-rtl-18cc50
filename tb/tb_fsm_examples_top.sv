// tb_fsm_examples_top: end-to-end test of all four designs in the top.
// The board divider is shortened (CLK_HZ=16, SLOW_HZ=1) so a slow clock
// is 16 board clocks; the bit difference calculators keep their default
// 16-bit width.
//
//   converter system: every BCD digit through switches -> LEDs, checking
//     digit + 3 and a 4-slow-clock busy window; counts digits that take
//     the carry branch (S2) and the no-carry branch (S1) at the first bit,
//     slow clock periods produced by the divider, and LED holds while
//     enable stays high.
//   bit difference A and B: the same words are started on both at the
//     same edge; results must match ones - zeros and each other, and the
//     done pulses must coincide. Counts positive, negative and zero
//     results and back-to-back runs with go held high.
//   Moore converter: digits back to back, output read one clock late.
// Each mechanism must have happened at least once.
module tb_fsm_examples_top;
  localparam int DIV = 16;
  localparam int W   = 16;

  logic clk100 = 1'b0, xs3_reset = 1'b0, xs3_enable = 1'b0;
  logic [3:0] xs3_sw = '0, xs3_led;
  logic xs3_busy;
  logic clk = 1'b0, rst = 1'b0, go = 1'b0;
  logic [W-1:0] din = '0, dout_a, dout_b;
  logic done_a, done_b;
  logic mo_enable = 1'b1, mo_x = 1'b0, mo_z;
  int checks = 0, failures = 0;
  int n_carry = 0, n_nocarry = 0, n_xs3 = 0, n_slow = 0, n_hold = 0;
  int n_pos = 0, n_neg = 0, n_zero = 0, n_b2b = 0, n_moore = 0;
  bit xs3_finished = 0, bd_finished = 0, mo_finished = 0;

  fsm_examples_top #(.CLK_HZ(DIV), .SLOW_HZ(1)) dut (
    .clk100(clk100), .xs3_reset(xs3_reset), .xs3_enable(xs3_enable), .xs3_sw(xs3_sw),
    .xs3_led(xs3_led), .xs3_busy(xs3_busy),
    .bda_clk(clk), .bda_rst(rst), .bda_go(go), .bda_din(din), .bda_dout(dout_a), .bda_done(done_a),
    .bdb_clk(clk), .bdb_rst(rst), .bdb_go(go), .bdb_din(din), .bdb_dout(dout_b), .bdb_done(done_b),
    .mo_clk(clk), .mo_enable(mo_enable), .mo_x(mo_x), .mo_z(mo_z));

  always #5 clk100 = ~clk100;
  always #7 clk = ~clk;

  // asynchronous resets get an edge after time 0
  initial begin
    #1 xs3_reset = 1'b1; rst = 1'b1; mo_enable = 1'b0;
  end

  initial begin
    #3_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge dut.u_xs3.clk) n_slow++;

  function automatic int ref_diff(logic [W-1:0] v);
    int ones = 0;
    for (int i = 0; i < W; i++) ones += int'(v[i]);
    return ones - (W - ones);
  endfunction

  // ---------------- converter board system ----------------
  task automatic xs3_convert(input logic [3:0] d);
    int busy_slow = 0;
    xs3_sw = d;
    repeat (2 * DIV) @(posedge clk100);
    xs3_enable = 1'b1;
    @(posedge xs3_busy);
    @(posedge dut.u_xs3.clk);
    #1;
    if (dut.u_xs3.u_conv.state == xs3_pkg::S2) n_carry++;
    if (dut.u_xs3.u_conv.state == xs3_pkg::S1) n_nocarry++;
    busy_slow = 1;
    while (xs3_busy && busy_slow < 10) begin
      @(posedge dut.u_xs3.clk);
      #1 busy_slow++;
    end
    checks++;
    if (busy_slow != 4) begin failures++; $display("FAIL xs3 busy %0d slow clocks", busy_slow); end
    checks++;
    if (xs3_led !== 4'(d + 4'd3)) begin
      failures++;
      $display("FAIL xs3 digit %0d: led %b expected %b", d, xs3_led, 4'(d + 4'd3));
    end
    repeat (3 * DIV) @(posedge clk100);
    checks++;
    if (xs3_led !== 4'(d + 4'd3)) begin failures++; $display("FAIL xs3 led not held"); end
    else n_hold++;
    n_xs3++;
    xs3_enable = 1'b0;
  endtask

  initial begin
    repeat (3 * DIV) @(posedge clk100);
    xs3_reset = 1'b0;
    for (int d = 0; d < 10; d++) xs3_convert(4'(d));
    xs3_finished = 1;
  end

  // ---------------- bit difference A and B ----------------
  always @(posedge clk) begin
    if (!rst) begin
      checks++;
      if (done_a !== done_b) begin failures++; $display("FAIL done A=%b B=%b", done_a, done_b); end
      if (done_a && dout_a !== dout_b) begin
        failures++; $display("FAIL A=%0d B=%0d", $signed(dout_a), $signed(dout_b));
      end
    end
  end

  task automatic bd_run(input logic [W-1:0] word, input bit keep_go);
    int cyc = 0;
    @(negedge clk);
    din = word; go = 1'b1;
    @(posedge clk);
    @(negedge clk);
    if (!keep_go) go = 1'b0;
    din = W'($urandom);
    while (!done_a && cyc < 100) begin
      @(posedge clk); cyc++;
      #1;
    end
    checks++;
    if (cyc != W + 1) begin failures++; $display("FAIL bd latency %0d", cyc); end
    checks++;
    if ($signed(dout_a) != ref_diff(word) || $signed(dout_b) != ref_diff(word)) begin
      failures++;
      $display("FAIL bd word %h: A %0d B %0d expected %0d", word, $signed(dout_a), $signed(dout_b), ref_diff(word));
    end
    if (ref_diff(word) > 0) n_pos++;
    else if (ref_diff(word) < 0) n_neg++;
    else n_zero++;
    if (keep_go) n_b2b++;
    @(posedge clk);
    go = 1'b0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    bd_run(16'hFFFF, 0);
    bd_run(16'h0000, 0);
    bd_run(16'h00FF, 0);
    bd_run(16'h0007, 1);
    for (int n = 0; n < 40; n++) bd_run(W'($urandom), n % 4 == 0);
    bd_finished = 1;
  end

  // ---------------- Moore converter ----------------
  initial begin
    logic [3:0] got, d;
    repeat (2) @(posedge clk);
    #2 mo_enable = 1'b1;
    for (int n = 0; n < 30; n++) begin
      d = 4'(n % 10);
      for (int i = 0; i < 4; i++) begin
        @(negedge clk) mo_x = d[i];
        @(posedge clk);
        #1 got[i] = mo_z;
      end
      checks++;
      if (got !== 4'(d + 4'd3)) begin failures++; $display("FAIL moore %0d -> %b", d, got); end
      n_moore++;
    end
    mo_finished = 1;
  end

  task automatic need(input int n, input string what);
    checks++;
    if (n == 0) begin failures++; $display("FAIL never happened: %s", what); end
    else $display("  %-38s %0d", what, n);
  endtask

  initial begin
    wait (xs3_finished && bd_finished && mo_finished);
    need(n_xs3, "BCD->XS3 conversions on LEDs");
    need(n_carry, "carry branch taken at bit 0 (S2)");
    need(n_nocarry, "no-carry branch taken at bit 0 (S1)");
    need(n_hold, "result held on LEDs");
    need(n_slow, "divided slow clock periods");
    need(n_pos, "bit difference positive results");
    need(n_neg, "bit difference negative results");
    need(n_zero, "bit difference zero results");
    need(n_b2b, "back-to-back runs with go held");
    need(n_moore, "Moore conversions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
