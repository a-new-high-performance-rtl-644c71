// loop_filter: against the recurrence y <= x + y - floor(y/16), saturated to
// 12 bits, for random input, a constant input (step response settles to 16x
// the input, DC gain 1/(1-15/16)) and a long saturating run.
module tb_loop_filter;
  logic clk = 0, rst_n = 0;
  logic signed [7:0]  x;
  logic signed [11:0] y;
  int checks = 0, failures = 0;

  loop_filter dut (.clk(clk), .rst_n(rst_n), .pd_in(x), .loop_out(y));
  always #5 clk = ~clk;

  int model = 0;
  task automatic step_in(int v);
    int fl;
    x = 8'(v);
    @(negedge clk);
    fl = (model >= 0) ? model / 16 : -((-model + 15) / 16);   // floor(model/16)
    model = v + model - fl;
    if (model > 2047) model = 2047;
    if (model < -2048) model = -2048;
    checks++;
    if (int'(y) != model) begin
      failures++;
      if (failures < 10) $display("FAIL in %0d: got %0d exp %0d", v, y, model);
    end
  endtask

  initial begin
    x = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 2000; i++) step_in(int'($urandom % 256) - 128);
    repeat (300) step_in(10);
    checks++;
    if (y < 145 || y > 160) begin
      failures++;
      $display("FAIL step response settled at %0d, expected about 160", y);
    end
    repeat (300) step_in(127);    // 16*127 = 2032: near the limit
    repeat (300) step_in(-128);
    checks++;
    if (y > -2030) begin
      failures++;
      $display("FAIL negative settling %0d", y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
