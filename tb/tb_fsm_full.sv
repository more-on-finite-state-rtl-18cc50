// tb_fsm_full: one complete operation of every design in the top at its
// default parameters: the converter system runs from a 100 MHz board
// clock through the real 1 Hz divider (about 700 million board clocks
// for one digit), and each 16-bit bit difference calculator and the
// Moore converter complete one job. Checks the LEDs (digit + 3), the
// 4-slow-clock busy window measured in board clocks (4 s = 400 000 000),
// and the bit difference results and latency.
module tb_fsm_full;
  localparam longint SLOW_PERIOD = 100_000_000;   // board clocks per 1 Hz period

  logic clk100 = 1'b0, xs3_reset = 1'b0, xs3_enable = 1'b0;
  logic [3:0] xs3_sw = 4'd7, xs3_led;
  logic xs3_busy;
  logic clk = 1'b0, rst = 1'b0, go = 1'b0;
  logic [15:0] din = '0, dout_a, dout_b;
  logic done_a, done_b;
  logic mo_enable = 1'b1, mo_x = 1'b0, mo_z;
  int checks = 0, failures = 0;
  time busy_start;
  bit bd_finished = 0;

  fsm_examples_top dut (
    .clk100(clk100), .xs3_reset(xs3_reset), .xs3_enable(xs3_enable), .xs3_sw(xs3_sw),
    .xs3_led(xs3_led), .xs3_busy(xs3_busy),
    .bda_clk(clk), .bda_rst(rst), .bda_go(go), .bda_din(din), .bda_dout(dout_a), .bda_done(done_a),
    .bdb_clk(clk), .bdb_rst(rst), .bdb_go(go), .bdb_din(din), .bdb_dout(dout_b), .bdb_done(done_b),
    .mo_clk(clk), .mo_enable(mo_enable), .mo_x(mo_x), .mo_z(mo_z));

  always #5 clk100 = ~clk100;

  initial begin
    #1 xs3_reset = 1'b1; rst = 1'b1; mo_enable = 1'b0;
  end

  // watchdog: ten slow periods of board clock (10 ns each)
  initial begin
    #(10 * SLOW_PERIOD * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bit difference A/B and Moore converter on their own clock
  initial begin
    int cyc = 0;
    logic [3:0] got;
    repeat (2) begin #7 clk = 1'b1; #7 clk = 1'b0; end
    rst = 1'b0;
    din = 16'b0000_0000_0000_0111;     // 3 ones, 13 zeros: -10
    go = 1'b1;
    #7 clk = 1'b1; #7 clk = 1'b0;      // edge 0
    go = 1'b0;
    while (!done_a && cyc < 100) begin #7 clk = 1'b1; #7 clk = 1'b0; cyc++; end
    checks++;
    if (cyc != 17) begin failures++; $display("FAIL bd latency %0d", cyc); end
    checks++;
    if ($signed(dout_a) != -10 || $signed(dout_b) != -10 || !done_b) begin
      failures++; $display("FAIL bd A=%0d B=%0d", $signed(dout_a), $signed(dout_b));
    end
    mo_enable = 1'b1;
    for (int i = 0; i < 4; i++) begin         // digit 9 -> 1100
      mo_x = (4'd9 >> i) & 1'b1;
      #7 clk = 1'b1; #1 got[i] = mo_z; #6 clk = 1'b0;
    end
    checks++;
    if (got !== 4'b1100) begin failures++; $display("FAIL moore 9 -> %b", got); end
    bd_finished = 1;
  end

  initial begin
    repeat (1000) @(posedge clk100);
    xs3_reset = 1'b0;
    #(SLOW_PERIOD * 15);   // 1.5 slow periods: switches sampled in idle
    xs3_enable = 1'b1;
    @(posedge xs3_busy);
    busy_start = $time;
    @(negedge xs3_busy);
    checks++;
    if ($time - busy_start != time'(4 * SLOW_PERIOD * 10)) begin
      failures++; $display("FAIL busy lasted %0d board clocks", ($time - busy_start) / 10);
    end
    repeat (1000) @(posedge clk100);
    checks++;
    if (xs3_led !== 4'd10) begin failures++; $display("FAIL led %b, expected 1010", xs3_led); end
    wait (bd_finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
