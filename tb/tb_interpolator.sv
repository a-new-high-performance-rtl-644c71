// interpolator: random signed samples, each followed by 32 step enables.
// Checks: one cycle after load the output equals the previous sample; after
// step k it is within 2 LSB of prev + k*(new-prev)/32 (one LSB from halving
// before the subtraction, one from dropping the fraction); after 32 steps it
// is within 1 LSB of the new sample; without step_en the output holds.
module tb_interpolator;
  logic clk = 0, rst_n = 0, load = 0, step_en = 0;
  logic signed [7:0] din, dout;
  int checks = 0, failures = 0;

  interpolator dut (.clk(clk), .rst_n(rst_n), .load(load), .din(din), .step_en(step_en), .dout(dout));
  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    int prev = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int s = 0; s < 300; s++) begin
      int nw;
      nw = (s % 10 == 0) ? ((s % 20 == 0) ? 127 : -128) : int'($urandom % 256) - 128;
      din = 8'(nw); load = 1;
      @(negedge clk);
      load = 0;
      chk(int'(dout) == prev, $sformatf("reload: got %0d exp %0d", dout, prev));
      for (int k = 1; k <= 32; k++) begin
        real r;
        step_en = 1;
        @(negedge clk);
        step_en = 0;
        r = real'(prev) + real'(k) * real'(nw - prev) / 32.0;
        chk(real'(dout) - r <= 2.01 && r - real'(dout) <= 2.01,
            $sformatf("sample %0d step %0d: got %0d exp %f", s, k, dout, r));
        if (k == 16) begin
          int held;
          held = int'(dout);
          @(negedge clk);
          chk(int'(dout) == held, "output moved without step_en");
        end
      end
      chk(int'(dout) - nw <= 1 && nw - int'(dout) <= 1, $sformatf("end of ramp %0d exp %0d", dout, nw));
      prev = nw;
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
