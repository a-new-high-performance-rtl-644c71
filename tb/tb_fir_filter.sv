// fir_filter: output = floor(sum of the last 16 inputs / 16), saturated to
// 8 bits, one cycle after the newest input. Impulse response (16 equal
// taps), random 12-bit input, and a step that saturates both ways.
module tb_fir_filter;
  logic clk = 0, rst_n = 0;
  logic signed [11:0] x;
  logic signed [7:0]  y;
  int checks = 0, failures = 0;

  fir_filter dut (.clk(clk), .rst_n(rst_n), .x_in(x), .fir_out(y));
  always #5 clk = ~clk;

  int hist [16];
  task automatic step_in(int v);
    int s, e;
    x = 12'(v);
    @(negedge clk);
    for (int i = 15; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = v;
    s = 0;
    foreach (hist[i]) s += hist[i];
    e = (s >= 0) ? s / 16 : -((-s + 15) / 16);
    if (e > 127) e = 127;
    if (e < -128) e = -128;
    checks++;
    if (int'(y) != e) begin
      failures++;
      if (failures < 10) $display("FAIL got %0d exp %0d", y, e);
    end
  endtask

  initial begin
    int ones;
    foreach (hist[i]) hist[i] = 0;
    x = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // impulse of 160: 16 outputs of 10, then 0
    ones = 0;
    step_in(160);
    if (y == 10) ones++;
    for (int i = 0; i < 20; i++) begin
      step_in(0);
      if (y == 10) ones++;
    end
    checks++;
    if (ones != 16) begin
      failures++;
      $display("FAIL impulse response has %0d taps, expected 16", ones);
    end
    for (int i = 0; i < 3000; i++) step_in(int'($urandom % 4096) - 2048);
    for (int i = 0; i < 3000; i++) step_in(int'($urandom % 512) - 256);
    repeat (20) step_in(2047);
    repeat (20) step_in(-2048);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
