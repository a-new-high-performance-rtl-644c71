// phase_detector: random and extreme operand pairs; pd_out must equal
// (a*b) >>> 7 one cycle later, saturated to 127 for -128*-128.
module tb_phase_detector;
  logic clk = 0, rst_n = 0;
  logic signed [7:0] a, b, pd;
  int checks = 0, failures = 0;

  phase_detector dut (.clk(clk), .rst_n(rst_n), .fm_in(a), .dds_in(b), .pd_out(pd));
  always #5 clk = ~clk;

  initial begin
    int e, prev_e;
    a = 0; b = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    prev_e = 0;
    for (int i = 0; i < 5000; i++) begin
      int x, y;
      x = (i < 4) ? ((i % 2) ? 127 : -128) : int'($urandom % 256) - 128;
      y = (i < 4) ? ((i < 2) ? 127 : -128) : int'($urandom % 256) - 128;
      a = 8'(x); b = 8'(y);
      e = (x * y) >>> 7;
      if (e > 127) e = 127;
      #1;
      checks++;
      if (int'(pd) != prev_e) begin
        failures++;
        if (failures < 10) $display("FAIL output changed before the edge");
      end
      @(negedge clk);
      checks++;
      if (int'(pd) != e) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d: got %0d exp %0d", x, y, pd, e);
      end
      prev_e = e;
    end
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
