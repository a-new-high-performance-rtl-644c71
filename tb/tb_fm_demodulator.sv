// fm_demodulator on its own, driven by an ideal FM source written here:
// phase accumulated in real arithmetic, frequency = fc + 2*m(t) FCW LSB,
// output round(127*cos(phase)). Message: a sine of amplitude 60 and period
// 8000 cycles. Carrier 3.125 MHz (center_fcw 8192).
// Checks, after 3000 cycles of lock-in: demod_out averaged over 16 cycles is
// within 8 LSB of the message delayed by 12 cycles; a constant frequency
// offset of +100 FCW LSB gives loop_out = 50 on average.
module tb_fm_demodulator;
  logic clk = 0, rst_n = 0;
  logic [17:0] center = 18'd8192;
  logic signed [7:0]  adc, dout, pd, dds;
  logic signed [11:0] lf;
  int checks = 0, failures = 0;

  fm_demodulator dut (.clk(clk), .rst_n(rst_n), .center_fcw(center), .adc_in(adc),
                      .demod_out(dout), .pd_out(pd), .loop_out(lf), .dds_out(dds));
  always #5 clk = ~clk;

  real ph = 0.0, msg_hist [0:255];
  int  cyc = 0;
  bit  tone = 1;
  int  offset = 0;
  always @(posedge clk) begin
    real m;
    m = tone ? 60.0 * $sin(2.0 * 3.14159265358979 * real'(cyc) / 8000.0) : 0.0;
    msg_hist[cyc % 256] = m;
    ph += 2.0 * 3.14159265358979 * (8192.0 + real'(offset) + 2.0 * m) / 262144.0;
    if (ph > 2.0 * 3.14159265358979) ph -= 2.0 * 3.14159265358979;
    adc <= 8'($rtoi(127.0 * $cos(ph) + (($cos(ph) >= 0.0) ? 0.5 : -0.5)));
    cyc++;
  end

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    real s, r, maxe;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3000) @(negedge clk);
    maxe = 0.0;
    for (int w = 0; w < 1000; w++) begin
      s = 0.0; r = 0.0;
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        s += real'(dout);
        r += msg_hist[(cyc - 12) % 256];
      end
      checks++;
      if (rabs(s - r) / 16.0 > 8.0) begin
        failures++;
        if (failures < 10) $display("FAIL cyc %0d: demod %f exp %f", cyc, s / 16.0, r / 16.0);
      end
      if (rabs(s - r) / 16.0 > maxe) maxe = rabs(s - r) / 16.0;
    end
    $display("max error %f LSB", maxe);
    tone = 0; offset = 100;
    repeat (3000) @(negedge clk);
    s = 0.0;
    repeat (1600) begin
      @(negedge clk);
      s += real'(lf);
    end
    checks++;
    if (rabs(s / 1600.0 - 50.0) > 3.0) begin
      failures++;
      $display("FAIL offset 100: loop_out average %f, expected 50", s / 1600.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
