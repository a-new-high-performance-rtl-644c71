// End-to-end test of fm_modem at its default parameters: the modulator's
// output is looped into the demodulator's ADC input, as in a digital link.
//
// Message: a triangle of +-AMP in steps of 1 per sample, 4*AMP samples per
// period. Each 8-bit sample is sent LSB first on mod_fm_in, one bit every
// 4 clocks, with mod_step_en high every clock, so one sample lasts 32 clocks
// (32 interpolation steps) and the triangle period is 4*AMP*32 = 10240 clocks
// (9.77 kHz at 100 MHz). Peak deviation 2*AMP*381.47 Hz = 61 kHz.
//
// Two carriers are run back to back (modulator and demodulator tuned alike):
//  A: FCW 8192 (3.125 MHz). Twice the carrier is fclk/16, which the 16-tap
//     average removes: demod_out, averaged over 16 cycles, must follow the
//     message within TOL_A.
//  B: FCW 2621 (1 MHz, the demodulator's free-running frequency in the
//     original design). The twice-carrier ripple is too large for demod_out;
//     the loop-filter output, averaged over 500 cycles (ten ripple periods),
//     must follow the message within TOL_B.
// Also checked throughout: every framed sample equals the byte sent; the
// interpolator output follows an independent linear-ramp model within 2 LSB;
// mod_out equals an independent cosine model of the accumulated phase.
// Mechanisms counted (each must occur): sample framing, interpolation
// steps, all four DDFS quadrants, carrier switch and re-lock, positive and
// negative loop-filter output, demodulated output rising and falling.
module tb_fm_modem;
  localparam int AMP       = 80;
  localparam int SAMPLES_A = 4 * AMP * 3;        // three triangle periods per carrier
  localparam int SAMPLES   = 2 * SAMPLES_A;
  localparam int SETTLE    = 3000;               // cycles after a carrier switch
  localparam int LAG_A     = 12;
  localparam int LAG_B     = 12;
  localparam int WIN_A     = 16;
  localparam int WIN_B     = 500;
  localparam real TOL_A    = 8.0;
  localparam real TOL_B    = 24.0;
  localparam logic [17:0] FCW_A = 18'd8192;
  localparam logic [17:0] FCW_B = 18'd2621;

  logic        clk = 0;
  logic        rst_n = 0;
  logic        bit_en = 0, fm_in = 0, step_en = 0;
  logic [17:0] fcw = FCW_A;
  logic [7:0]  mod_out, mod_sample, mod_interp;
  logic        mod_sample_valid;
  logic [7:0]  demod_out, demod_pd, demod_dds;
  logic [11:0] demod_loop;

  fm_modem dut (
    .clk(clk), .rst_n(rst_n),
    .mod_bit_en(bit_en), .mod_fm_in(fm_in), .mod_step_en(step_en), .mod_fcw(fcw),
    .mod_out(mod_out), .mod_sample(mod_sample), .mod_sample_valid(mod_sample_valid),
    .mod_interp(mod_interp),
    .demod_fcw(fcw), .demod_adc_in(mod_out), .demod_out(demod_out), .demod_pd(demod_pd),
    .demod_loop(demod_loop), .demod_dds(demod_dds)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic int tri_val(int n);
    int m = n % (4 * AMP);
    if (m < AMP)          return m;
    else if (m < 3 * AMP) return 2 * AMP - m;
    else                  return m - 4 * AMP;
  endfunction

  // Cosine model of the DDFS: top 10 of 18 phase bits, quarter-wave entry
  // floor(127.5*cos(2*pi*(idx+0.5)/1024)), negated by 1's complement in the
  // second and third quadrants.
  function automatic int cos_model(int ph);
    int p10 = ph >> 8;
    int q   = p10 >> 8;
    int a   = p10 & 255;
    int idx = (q % 2 == 1) ? 255 - a : a;
    int c   = $rtoi($floor(127.5 * $cos(2.0 * 3.14159265358979 * (real'(idx) + 0.5) / 1024.0)));
    return (q == 1 || q == 2) ? -c - 1 : c;
  endfunction

  // ---------------- stimulus: bits of sample n on cycles n*32 + 4*b
  int n_sent = 0, bit_i = 0, sub = 0, switches = 0;
  logic [7:0] cur_byte;
  always @(negedge clk) if (rst_n) begin
    step_en <= 1'b1;
    bit_en  <= (sub == 0);
    if (sub == 0) begin
      if (bit_i == 0) begin
        cur_byte = 8'(tri_val(n_sent));
        if (n_sent == SAMPLES_A) begin
          fcw <= FCW_B;                    // carrier switch, both ends
          switches++;
        end
      end
      fm_in <= cur_byte[bit_i];
      bit_i = bit_i + 1;
      if (bit_i == 8) begin
        bit_i = 0;
        n_sent = n_sent + 1;
      end
    end
    sub = (sub + 1) % 4;
  end

  // ---------------- framed samples
  int n_recv = 0, cnt_samples = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (mod_sample_valid) begin
      checks++;
      if (mod_sample !== 8'(tri_val(n_recv))) begin
        failures++;
        $display("FAIL sample %0d: got %0d exp %0d", n_recv, $signed(mod_sample), tri_val(n_recv));
      end
      cnt_samples++;
      n_recv++;
    end
  end

  // ---------------- interpolator: ramp model prev + k*(new-prev)/32
  int  prev_s = 0, new_s = 0, kstep = 32, cnt_steps = 0;
  real ramp;
  real ramp_hist [0:1023];
  always @(posedge clk) begin
    if (!rst_n) begin
      prev_s = 0; new_s = 0; kstep = 32;
    end else if (mod_sample_valid) begin
      prev_s = new_s;
      new_s  = $signed(mod_sample);
      kstep  = 0;
    end else if (kstep < 32) begin
      kstep++;
    end
  end

  always @(negedge clk) if (rst_n && cyc > 2) begin
    ramp = real'(prev_s) + real'(kstep) * real'(new_s - prev_s) / 32.0;
    ramp_hist[cyc % 1024] = ramp;
    if (n_recv >= 2) begin
      checks++;
      if (rabs(real'($signed(mod_interp)) - ramp) > 2.01) begin
        failures++;
        if (failures < 10) $display("FAIL interp cyc %0d: got %0d exp %f", cyc, $signed(mod_interp), ramp);
      end
      if (kstep > 0 && kstep < 32) cnt_steps++;
    end
  end

  // ---------------- modulator output: freq word = fcw + 2*interp (1 cycle),
  // phase accumulator (1 cycle), DDFS pipeline (2 cycles)
  longint phase_model = 0;
  int     fw_q = 0;
  int     ph_pipe [0:3];
  int     quad_seen [4] = '{0, 0, 0, 0};
  always @(posedge clk) begin
    if (!rst_n) begin
      phase_model = 0; fw_q = 0;
      for (int i = 0; i < 4; i++) ph_pipe[i] = 0;
    end else begin
      for (int i = 3; i > 0; i--) ph_pipe[i] = ph_pipe[i-1];
      phase_model = (phase_model + fw_q) % 262144;
      ph_pipe[0] = int'(phase_model);
      fw_q = (int'(fcw) + 2 * $signed(mod_interp) + 262144) % 262144;
    end
  end

  always @(negedge clk) if (rst_n && cyc > 8) begin
    int exp_c;
    exp_c = cos_model(ph_pipe[2]);
    checks++;
    if ($signed(mod_out) != exp_c) begin
      failures++;
      if (failures < 10) $display("FAIL mod_out cyc %0d: got %0d exp %0d", cyc, $signed(mod_out), exp_c);
    end
    quad_seen[(ph_pipe[2] >> 16) & 3]++;
  end

  // ---------------- demodulator
  int  switch_cyc = 0, cnt_lf_pos = 0, cnt_lf_neg = 0, cnt_up = 0, cnt_down = 0;
  int  relocks = 0, win_n = 0;
  real win_sum = 0.0, ref_sum = 0.0, prev_win = 0.0, max_err_a = 0.0, max_err_b = 0.0;
  bit  in_b = 0, checked_b = 0;
  always @(negedge clk) if (rst_n) begin
    if (fcw == FCW_B && !in_b) begin
      in_b = 1; switch_cyc = cyc; win_sum = 0; ref_sum = 0; win_n = 0;
    end
    if (cyc > switch_cyc + SETTLE) begin
      int  win, lag;
      real tol, e;
      win = in_b ? WIN_B : WIN_A;
      lag = in_b ? LAG_B : LAG_A;
      tol = in_b ? TOL_B : TOL_A;
      win_sum += in_b ? real'($signed(demod_loop)) : real'($signed(demod_out));
      ref_sum += ramp_hist[(cyc - lag) % 1024];
      win_n++;
      if ($signed(demod_loop) > 20)  cnt_lf_pos++;
      if ($signed(demod_loop) < -20) cnt_lf_neg++;
      if (win_n == win) begin
        e = (win_sum - ref_sum) / win;
        checks++;
        if (rabs(e) > tol) begin
          failures++;
          if (failures < 20) $display("FAIL demod(%s) cyc %0d: avg %f exp %f", in_b ? "B" : "A", cyc, win_sum / win, ref_sum / win);
        end
        if (!in_b && rabs(e) > max_err_a) max_err_a = rabs(e);
        if (in_b && rabs(e) > max_err_b) max_err_b = rabs(e);
        if (in_b && !checked_b) begin
          checked_b = 1;
          if (rabs(e) <= tol) relocks++;
        end
        if (win_sum / win > prev_win + 0.5) cnt_up++;
        if (win_sum / win < prev_win - 0.5) cnt_down++;
        prev_win = win_sum / win;
        win_sum = 0; ref_sum = 0; win_n = 0;
      end
    end
  end

  task automatic need(string what, int cnt);
    checks++;
    $display("mechanism %-28s : %0d", what, cnt);
    if (cnt == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (n_recv >= SAMPLES);
    repeat (100) @(posedge clk);
    need("sample framed", cnt_samples);
    need("interpolation step", cnt_steps);
    need("DDFS quadrant 0", quad_seen[0]);
    need("DDFS quadrant 1", quad_seen[1]);
    need("DDFS quadrant 2", quad_seen[2]);
    need("DDFS quadrant 3", quad_seen[3]);
    need("carrier switch", switches);
    need("re-lock after switch", relocks);
    need("loop filter output > 0", cnt_lf_pos);
    need("loop filter output < 0", cnt_lf_neg);
    need("demod output rising", cnt_up);
    need("demod output falling", cnt_down);
    $display("max demod error: A %f LSB, B %f LSB", max_err_a, max_err_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (SAMPLES * 32 + 5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
