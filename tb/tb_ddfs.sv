// ddfs, pipelined (default) and combinational instances, same control words.
// An independent model accumulates the phase and computes the expected
// cosine code floor(127.5*cos(2*pi*(i+0.5)/1024)) of the quarter-wave index,
// negated (1's complement) in the second and third quadrants.
// Checks: the pipelined output equals the model of the phase two cycles
// earlier; the combinational output equals the model of the current phase;
// each output stays within 1.5 LSB of the exact cosine; a frequency switch
// appears at the pipelined output three cycles after add_in changes (one to
// the phase register, two through the pipeline); output periods match the
// programmed frequency.
module tb_ddfs;
  logic clk = 0, rst_n = 0;
  logic [17:0] add_in, ph_p, ph_c;
  logic [7:0]  out_p, out_c;
  int checks = 0, failures = 0;

  ddfs #(.PIPELINED(1'b1)) dut_p (.clk(clk), .rst_n(rst_n), .add_in(add_in), .dds_out(out_p), .phase(ph_p));
  ddfs #(.PIPELINED(1'b0)) dut_c (.clk(clk), .rst_n(rst_n), .add_in(add_in), .dds_out(out_c), .phase(ph_c));
  always #5 clk = ~clk;

  function automatic int cos_model(int ph);
    int p10 = ph >> 8;
    int q   = p10 >> 8;
    int a   = p10 & 255;
    int idx = (q % 2 == 1) ? 255 - a : a;
    int c   = $rtoi($floor(127.5 * $cos(2.0 * 3.14159265358979 * (real'(idx) + 0.5) / 1024.0)));
    return (q == 1 || q == 2) ? -c - 1 : c;
  endfunction

  int ph_model = 0;
  int ph_hist [0:3];
  int quad [4] = '{0, 0, 0, 0};
  int zero_cross = 0, cyc = 0;
  logic signed [7:0] last_p = 0;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  always @(posedge clk) begin
    if (!rst_n) begin
      ph_model = 0;
      for (int i = 0; i < 4; i++) ph_hist[i] = 0;
    end else begin
      ph_model = (ph_model + int'(add_in)) % 262144;
      for (int i = 3; i > 0; i--) ph_hist[i] = ph_hist[i-1];
      ph_hist[0] = ph_model;
    end
  end

  always @(negedge clk) if (rst_n && cyc > 3) begin
    real exact;
    chk(int'(ph_p) == ph_hist[0], "phase accumulator");
    chk($signed(out_c) == cos_model(ph_hist[0]), $sformatf("comb out %0d exp %0d", $signed(out_c), cos_model(ph_hist[0])));
    chk($signed(out_p) == cos_model(ph_hist[2]), $sformatf("pipe out %0d exp %0d", $signed(out_p), cos_model(ph_hist[2])));
    exact = 127.5 * $cos(2.0 * 3.14159265358979 * real'(ph_hist[0]) / 262144.0) - 0.5;
    chk(real'($signed(out_c)) - exact <= 1.5 && exact - real'($signed(out_c)) <= 1.5, "amplitude error");
    quad[(ph_hist[0] >> 16) & 3]++;
  end

  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (last_p < 0 && $signed(out_p) >= 0) zero_cross++;
    last_p = $signed(out_p);
  end

  initial begin
    add_in = 18'd2621;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // 1 MHz: 100 cycles per period -> 20 rising zero crossings in 2000 cycles
    repeat (100) @(negedge clk);
    zero_cross = 0;
    repeat (2000) @(negedge clk);
    chk(zero_cross >= 19 && zero_cross <= 21, $sformatf("1 MHz: %0d periods in 2000 cycles", zero_cross));
    // Frequency switch latency: freeze the phase, then restart it.
    add_in = 18'd0;
    repeat (5) @(negedge clk);
    begin
      logic [7:0] held;
      int lat;
      held = out_p;
      add_in = 18'd65536;                // quarter turn per cycle
      lat = 0;
      while (out_p == held && lat < 10) begin
        @(negedge clk);
        lat++;
      end
      chk(lat == 3, $sformatf("switch latency %0d cycles, expected 3", lat));
    end
    // Random control words.
    for (int i = 0; i < 50; i++) begin
      add_in = 18'($urandom);
      repeat (40) @(negedge clk);
    end
    chk(quad[0] > 0 && quad[1] > 0 && quad[2] > 0 && quad[3] > 0, "all quadrants visited");
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
