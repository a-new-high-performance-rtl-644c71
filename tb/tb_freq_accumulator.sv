// freq_accumulator: freq_word = fcw + 2*msg (mod 2^18), one cycle after the
// inputs, for edge and random values.
module tb_freq_accumulator;
  logic clk = 0, rst_n = 0;
  logic [17:0] fcw, fw;
  logic signed [7:0] msg;
  int checks = 0, failures = 0;

  freq_accumulator dut (.clk(clk), .rst_n(rst_n), .fcw(fcw), .msg(msg), .freq_word(fw));
  always #5 clk = ~clk;

  initial begin
    int e, prev_e;
    fcw = 0; msg = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    prev_e = 0;
    for (int i = 0; i < 3000; i++) begin
      int f, m;
      f = (i < 4) ? ((i % 2) ? 0 : 262143) : int'($urandom % 262144);
      m = (i < 4) ? ((i < 2) ? 127 : -128) : int'($urandom % 256) - 128;
      fcw = 18'(f); msg = 8'(m);
      e = (f + 2 * m + 262144) % 262144;
      #1;
      // Registered: the output still shows the previous sum until the edge.
      checks++;
      if (int'(fw) != prev_e) begin
        failures++;
        if (failures < 10) $display("FAIL output changed before the clock edge");
      end
      @(negedge clk);
      checks++;
      if (int'(fw) != e) begin
        failures++;
        if (failures < 10) $display("FAIL fcw %0d msg %0d: got %0d exp %0d", f, m, fw, e);
      end
      prev_e = e;
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
