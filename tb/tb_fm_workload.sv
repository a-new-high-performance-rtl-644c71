// Workload test of fm_modem at its default parameters, modulator output
// looped into the demodulator input, in the reference operating point:
// 100 MHz clock, 10 kHz triangular message of full scale (+-127, deviation
// 254 * 381.47 Hz = 97 kHz, modulation index 9.7), carrier 1.5 MHz
// (FCW 3932 at both ends).
//
// Part A: the triangle is sampled every 32 cycles (one 8-bit sample per
// 32 interpolation steps, serial bits every 4 cycles); after 4000 cycles of
// lock-in, 2048 consecutive 500-cycle averages of loop_out (the 3 MHz
// twice-carrier ripple averages out over 15 periods) are compared with the
// message ramp, delayed by 12 cycles.
// Part B: the serial input at the top audio rate, 320 kbit/s: one bit every
// 312 cycles and one step_en every 78 cycles (32 steps per 8-bit sample);
// the framed samples and the interpolated ramp are checked for 12 samples.
// Part C: the simulation carrier word FCW = 512 (512 * 100 MHz / 2^18 =
// 195.3 kHz) on the modulator with a zero message: mod_out must make 20
// negative-to-positive crossings in 20 * 512 cycles.
module tb_fm_workload;
  localparam logic [17:0] FCW   = 18'd3932;
  localparam int          WIN   = 500;
  localparam int          NCAP  = 2048;
  localparam int          LAG   = 12;
  localparam real         TOL   = 16.0;

  logic        clk = 0, rst_n = 0;
  logic        bit_en = 0, fm_in = 0, step_en = 0;
  logic [7:0]  mod_out, mod_sample, mod_interp, demod_out, demod_pd, demod_dds;
  logic        mod_sample_valid;
  logic [11:0] demod_loop;
  logic [17:0] mod_fcw = FCW;

  fm_modem dut (
    .clk(clk), .rst_n(rst_n),
    .mod_bit_en(bit_en), .mod_fm_in(fm_in), .mod_step_en(step_en), .mod_fcw(mod_fcw),
    .mod_out(mod_out), .mod_sample(mod_sample), .mod_sample_valid(mod_sample_valid),
    .mod_interp(mod_interp),
    .demod_fcw(FCW), .demod_adc_in(mod_out), .demod_out(demod_out), .demod_pd(demod_pd),
    .demod_loop(demod_loop), .demod_dds(demod_dds)
  );
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // 10 kHz triangle, +-127, at time t (cycles of 10 ns): period 10000 cycles
  function automatic int tri_at(longint t);
    real u, v;
    u = real'(t % 10000) / 10000.0;
    v = (u < 0.25) ? 4.0 * u : (u < 0.75) ? 2.0 - 4.0 * u : 4.0 * u - 4.0;
    return $rtoi(127.0 * v + ((v >= 0.0) ? 0.5 : -0.5));
  endfunction

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // ---------------- stimulus
  int  bit_period = 4, step_period = 1;
  int  n_sent = 0, bit_i = 0, bcnt = 0, scnt = 0;
  logic [7:0] cur;
  int  sent_q [$];
  bit  zero_msg = 0;
  always @(negedge clk) if (rst_n) begin
    step_en <= (scnt == 0);
    bit_en  <= (bcnt == 0);
    if (bcnt == 0) begin
      if (bit_i == 0) begin
        cur = zero_msg ? 8'd0 : 8'(tri_at(longint'(n_sent) * 32));
        sent_q.push_back(int'($signed(cur)));
      end
      fm_in <= cur[bit_i];
      bit_i = (bit_i + 1) % 8;
      if (bit_i == 0) n_sent++;
    end
    bcnt = (bcnt + 1) % bit_period;
    scnt = (scnt + 1) % step_period;
  end

  // ---------------- framing and ramp model
  int  prev_s = 0, new_s = 0, k = 32, n_recv = 0;
  real ramp_hist [0:1023];
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (mod_sample_valid) begin
      int e;
      e = sent_q.pop_front();
      chk($signed(mod_sample) == e, $sformatf("sample %0d got %0d exp %0d", n_recv, $signed(mod_sample), e));
      n_recv++;
      prev_s = new_s; new_s = $signed(mod_sample); k = 0;
    end else if (step_en && k < 32) k++;
  end
  always @(negedge clk) if (rst_n) begin
    real r;
    r = real'(prev_s) + real'(k) * real'(new_s - prev_s) / 32.0;
    ramp_hist[cyc % 1024] = r;
    if (n_recv >= 2)
      chk(rabs(real'($signed(mod_interp)) - r) <= 2.01, $sformatf("interp %0d exp %f", $signed(mod_interp), r));
  end

  initial begin
    real s, rs, maxe;
    repeat (4) @(posedge clk);
    rst_n = 1;
    // Part A
    repeat (4000) @(negedge clk);
    maxe = 0.0;
    for (int w = 0; w < NCAP; w++) begin
      s = 0.0; rs = 0.0;
      repeat (WIN / 4) begin
        // every 4th cycle of the window is sampled
        repeat (4) @(negedge clk);
        s  += real'($signed(demod_loop));
        rs += ramp_hist[(cyc - LAG) % 1024];
      end
      s = s / (WIN / 4); rs = rs / (WIN / 4);
      chk(rabs(s - rs) <= TOL, $sformatf("capture %0d: loop_out %f exp %f", w, s, rs));
      if (rabs(s - rs) > maxe) maxe = rabs(s - rs);
    end
    $display("part A: %0d captures, max error %f LSB", NCAP, maxe);
    // Part B: 320 kbit/s serial input
    wait (bcnt == 0 && bit_i == 0);
    @(negedge clk);
    bit_period = 312; step_period = 78;
    begin
      int start;
      start = n_recv;
      wait (n_recv >= start + 14);
    end
    $display("part B: %0d samples framed in total", n_recv);
    // Part C: FCW 512, zero message
    wait (bcnt == 0 && bit_i == 0);
    zero_msg = 1;
    @(negedge clk);
    bit_period = 4; step_period = 1;
    begin
      int start, ncross;
      logic prev_neg;
      start = n_recv;
      wait (n_recv >= start + 3);          // old sample gone, ramp settled at 0
      repeat (40) @(negedge clk);
      chk($signed(mod_interp) == 0, $sformatf("part C: interp %0d not 0", $signed(mod_interp)));
      mod_fcw = 18'd512;
      repeat (600) @(negedge clk);         // let the new carrier reach the output
      ncross = 0;
      prev_neg = mod_out[7];
      repeat (20 * 512) begin
        @(negedge clk);
        if (prev_neg && !mod_out[7]) ncross++;
        prev_neg = mod_out[7];
      end
      chk(ncross == 20, $sformatf("part C: %0d crossings, exp 20", ncross));
      $display("part C: FCW 512, %0d carrier periods in %0d cycles", ncross, 20 * 512);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000 + NCAP * WIN + 14 * 8 * 312 + 2 * 8 * 312 + 20 * 512 + 20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
