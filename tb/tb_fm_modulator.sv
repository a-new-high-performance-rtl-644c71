// fm_modulator on its own: a ramp of bytes sent serially (one bit every
// 4 cycles, step_en every cycle) at carrier FCW 8192.
// Checks: each framed sample equals the byte sent; the interpolator output
// follows a linear ramp model within 2 LSB; the number of mod_out cycles in
// each window of 10 sample periods matches the instantaneous frequency
// (fcw + 2*msg) of an independent model within 1 cycle; every mod_out value
// equals an independent cosine model of the phase accumulated from
// fcw + 2*interp (freq word 1 cycle, phase 1 cycle, DDFS pipeline 2 cycles).
module tb_fm_modulator;
  logic clk = 0, rst_n = 0, bit_en = 0, fm_in = 0, step_en = 0;
  logic [17:0] fcw = 18'd8192;
  logic [7:0]  mod_out, sample, interp;
  logic        sample_valid;
  int checks = 0, failures = 0;

  fm_modulator dut (.clk(clk), .rst_n(rst_n), .bit_en(bit_en), .fm_in(fm_in), .step_en(step_en),
                    .fcw(fcw), .mod_out(mod_out), .sample(sample), .sample_valid(sample_valid),
                    .interp_out(interp));
  always #5 clk = ~clk;

  function automatic int msg_val(int n);
    return ((n * 37) % 256) - 128;                // irregular but deterministic
  endfunction

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // stimulus
  int n_sent = 0, sub = 0, bit_i = 0;
  logic [7:0] cur;
  always @(negedge clk) if (rst_n) begin
    step_en <= 1'b1;
    bit_en  <= (sub == 0);
    if (sub == 0) begin
      if (bit_i == 0) cur = 8'(msg_val(n_sent));
      fm_in <= cur[bit_i];
      bit_i = (bit_i + 1) % 8;
      if (bit_i == 0) n_sent++;
    end
    sub = (sub + 1) % 4;
  end

  // framed samples and ramp model
  int n_recv = 0, prev_s = 0, new_s = 0, k = 32;
  real phase_acc = 0.0;    // expected carrier cycles since last sample
  int  zc = 0;
  logic signed [7:0] last_out = 0;
  always @(posedge clk) if (rst_n) begin
    if (sample_valid) begin
      chk(sample == 8'(msg_val(n_recv)), $sformatf("sample %0d got %0d", n_recv, $signed(sample)));
      n_recv++;
      prev_s = new_s; new_s = $signed(sample); k = 0;
    end else if (k < 32) k++;
  end

  always @(negedge clk) if (rst_n && n_recv >= 2) begin
    real r;
    r = real'(prev_s) + real'(k) * real'(new_s - prev_s) / 32.0;
    chk(rabs(real'($signed(interp)) - r) <= 2.01, $sformatf("interp %0d exp %f", $signed(interp), r));
    // expected carrier cycles: (fcw + 2*interp) / 2^18 per clock
    phase_acc += (real'(fcw) + 2.0 * real'($signed(interp))) / 262144.0;
    if (last_out < 0 && $signed(mod_out) >= 0) zc++;
    last_out = $signed(mod_out);
  end

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic int cos_model(int ph);
    int p10 = ph >> 8;
    int q   = p10 >> 8;
    int a   = p10 & 255;
    int idx = (q % 2 == 1) ? 255 - a : a;
    int c   = $rtoi($floor(127.5 * $cos(2.0 * 3.14159265358979 * (real'(idx) + 0.5) / 1024.0)));
    return (q == 1 || q == 2) ? -c - 1 : c;
  endfunction

  int ph_model = 0, fw_q = 0, cyc = 0;
  int ph_pipe [0:3];
  always @(posedge clk) begin
    if (!rst_n) begin
      ph_model = 0; fw_q = 0;
      for (int i = 0; i < 4; i++) ph_pipe[i] = 0;
    end else begin
      for (int i = 3; i > 0; i--) ph_pipe[i] = ph_pipe[i-1];
      ph_model = (ph_model + fw_q) % 262144;
      ph_pipe[0] = ph_model;
      fw_q = (int'(fcw) + 2 * $signed(interp) + 262144) % 262144;
      cyc++;
    end
  end

  always @(negedge clk) if (rst_n && cyc > 8)
    chk($signed(mod_out) == cos_model(ph_pipe[2]),
        $sformatf("cyc %0d mod_out %0d exp %0d", cyc, $signed(mod_out), cos_model(ph_pipe[2])));

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (n_recv >= 4);
    for (int p = 0; p < 60; p++) begin
      real start_acc;
      int  start_zc;
      start_acc = phase_acc; start_zc = zc;
      repeat (320) @(negedge clk);                // 10 sample periods
      chk(rabs(real'(zc - start_zc) - (phase_acc - start_acc)) <= 1.01,
          $sformatf("window %0d: %0d carrier cycles, expected %f", p, zc - start_zc, phase_acc - start_acc));
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
