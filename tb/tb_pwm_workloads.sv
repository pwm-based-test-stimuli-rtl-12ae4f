// tb_pwm_workloads: the measurement set-up the method was evaluated with,
// at the top's default sizes: a 20-bit converter, test sequences of N = 16,
// 64 and 256 samples, and both the triangle (linear test) and the sine
// stimulus. The behavioural converter is given distortion and noise of the
// order reported for an audio codec: second harmonic about -74 dBc, third
// about -80 dBc (for a full-scale sine), and uniform noise of +-20 LSB, which
// puts the SNR near 90 dB. The cubic is chosen so that no sample clips.
//
// Unlike the end-to-end test, which compares the hardware's sums and bins
// bit for bit, this testbench works like the test program that reads the
// results: it turns the outputs into specifications and checks them against
// what the converter model was given.
//   - Linear test (every run): solves the 4x4 normal equations from the fit
//     sums, rescales the cubic to u = 2*eta - 1 and forms HD2 and HD3 in dBc
//     for a full-scale sine.
//   - Sine test (sine runs): offset from bin 0, gain error from bin 1, HD2,
//     HD3, THD, SNR and SINAD from the summary powers.
// Tolerances follow the noise: 24/sqrt(N) dB for the distortion and noise
// figures, a few standard errors for offset and gain. Each result is printed
// as measured against expected.
module tb_pwm_workloads;
  import bist_pkg::*;

  localparam int  ADC_BITS = 20;
  localparam int  LOG_R    = 8;
  localparam int  R        = 2 ** LOG_R;
  localparam real TWS      = 16384.0;          // twiddle scale of the spectrum
  localparam real FS_CODE  = 524288.0;         // 2^(n-1): full-scale amplitude
  // converter error in LSB, as a cubic in u = 2*eta - 1, and noise
  localparam real CA0 = 30.0, CA1 = -30.0, CA2 = -210.0, CA3 = -210.0;
  localparam int  NOISE = 20;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start = 1'b0;
  mode_e       mode  = MODE_SINE;
  logic [3:0]  log2n = 4'd6;
  logic [3:0]  settle = 4'd1;
  logic [5:0]  delta = 6'd3;
  logic        busy, done, pwm_out, fs_strobe;
  logic        adc_valid;
  logic signed [ADC_BITS-1:0] adc_data;
  logic signed [63:0] fit_s [4];
  logic signed [63:0] fit_g [7];
  logic [7:0]  bin_addr = '0;
  logic signed [47:0] bin_re, bin_im;
  logic [95:0] bin_pow, p_dc, p_fund, p_hd2, p_hd3;
  logic [104:0] p_noise;

  pwm_bist dut (
    .clk, .rst_n, .start, .mode, .log2n, .settle, .delta, .busy, .done,
    .pwm_out, .fs_strobe, .adc_valid, .adc_data, .fit_s, .fit_g,
    .bin_addr, .bin_re, .bin_im, .bin_pow, .p_dc, .p_fund, .p_hd2, .p_hd3, .p_noise
  );

  adc_model #(.ADC_BITS(ADC_BITS), .LOG_R(LOG_R)) adc (
    .clk, .fs_strobe, .pwm(pwm_out), .delta(int'(delta)), .adc_valid, .adc_data
  );

  int checks = 0, failures = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real db10(input real v);
    return 10.0 * $log10(v);
  endfunction

  function automatic real to_real(input logic [104:0] v);
    real r;
    r = 0.0;
    for (int b = 104; b >= 0; b--) r = r * 2.0 + (v[b] ? 1.0 : 0.0);
    return r;
  endfunction

  task automatic check_val(input string tag, input string what, input real got,
                           input real expected, input real tol);
    checks++;
    $display("  %-26s %-10s measured %9.2f  expected %9.2f  (tolerance %0.2f)",
             tag, what, got, expected, tol);
    if (rabs(got - expected) > tol) begin
      failures++;
      $display("FAIL: %s %s", tag, what);
    end
  endtask

  // solve a * c = b (4x4, Gaussian elimination)
  function automatic void solve4(inout real a [4][4], inout real b [4], output real c [4]);
    real f;
    for (int p = 0; p < 4; p++)
      for (int r = p + 1; r < 4; r++) begin
        f = a[r][p] / a[p][p];
        for (int q = p; q < 4; q++) a[r][q] = a[r][q] - f * a[p][q];
        b[r] = b[r] - f * b[p];
      end
    for (int p = 3; p >= 0; p--) begin
      c[p] = b[p];
      for (int q = p + 1; q < 4; q++) c[p] = c[p] - a[p][q] * c[q];
      c[p] = c[p] / a[p][p];
    end
  endfunction

  task automatic run(input mode_e m, input int lg);
    int  n, cyc;
    real a [4][4];
    real b [4];
    real c [4];
    real tol, sig, var_n, p2, p3, nb, scale;
    real hd2_x, hd3_x, thd_x, snr_x, sinad_x;
    string tag;
    n   = 1 << lg;
    tag = $sformatf("%s N=%0d", m.name(), n);
    tol = 24.0 / $sqrt(real'(n));
    @(negedge clk);
    mode = m; log2n = 4'(lg);
    adc.a0 = CA0; adc.a1 = CA1; adc.a2 = CA2; adc.a3 = CA3; adc.noise_lsb = NOISE;
    adc.restart();
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done && cyc < 400000) begin @(negedge clk); cyc++; end
    checks++;
    if (!done) begin failures++; $display("FAIL: %s: no done", tag); return; end
    $display("%s: test took %0d sample periods", tag, (cyc + R - 1) / R);

    // expected figures for a full-scale sine, from the model's cubic
    hd2_x = 20.0 * $log10(rabs(CA2) / 2.0 / FS_CODE);
    hd3_x = 20.0 * $log10(rabs(CA3) / 4.0 / FS_CODE);

    // linear test: cubic from the least-squares sums
    for (int r = 0; r < 4; r++) begin
      b[r] = real'(fit_s[r]);
      for (int q = 0; q < 4; q++) a[r][q] = real'(fit_g[r + q]);
    end
    solve4(a, b, c);
    check_val(tag, "fit HD2", 20.0 * $log10(rabs(c[2]) * real'(R) * real'(R) / 2.0 / FS_CODE),
              hd2_x, tol);
    check_val(tag, "fit HD3", 20.0 * $log10(rabs(c[3]) * real'(R) * real'(R) * real'(R) / 4.0 / FS_CODE),
              hd3_x, tol);

    if (m == MODE_SINE) begin
      scale = real'(n) * TWS;
      sig   = FS_CODE * FS_CODE / 2.0;
      // noise variance: uniform integers in [-k, k], plus the rounding of the
      // model's error term
      var_n = real'(NOISE) * real'(NOISE + 1) / 3.0 + 1.0 / 12.0;
      p2    = 2.0 * to_real(105'(p_hd2)) / (scale * scale);
      p3    = 2.0 * to_real(105'(p_hd3)) / (scale * scale);
      nb    = to_real(p_noise) / (scale * scale);
      // offset (bin 0) and gain error (bin 1, in phase with the stimulus)
      bin_addr = 8'd0;
      #1;
      check_val(tag, "offset", real'(bin_re) / scale, CA0 + CA2 / 2.0,
                3.0 + 5.0 * $sqrt(var_n / real'(n)));
      bin_addr = 8'd1;
      #1;
      check_val(tag, "gain ppm", -real'(bin_im) / (scale / 2.0) / FS_CODE * 1.0e6,
                (CA1 + 0.75 * CA3) / FS_CODE * 1.0e6,
                (3.0 + 5.0 * $sqrt(2.0 * var_n / real'(n))) / FS_CODE * 1.0e6);
      check_val(tag, "HD2", db10(p2 / sig), hd2_x, tol);
      check_val(tag, "HD3", db10(p3 / sig), hd3_x, tol);
      thd_x = db10((CA2 * CA2 / 8.0 + CA3 * CA3 / 32.0) / sig);
      check_val(tag, "THD", db10((p2 + p3) / sig), thd_x, tol);
      // the noise band holds N - 7 of the N two-sided bins
      snr_x = db10(sig / var_n);
      check_val(tag, "SNR", db10(sig / (nb * real'(n) / real'(n - 7))), snr_x, tol);
      sinad_x = db10(sig / (var_n * real'(n - 3) / real'(n) + CA2 * CA2 / 8.0 + CA3 * CA3 / 32.0));
      check_val(tag, "SINAD", db10(sig / (nb + p2 + p3)), sinad_x, tol);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(MODE_TRIANGLE, 4);
    run(MODE_TRIANGLE, 6);
    run(MODE_TRIANGLE, 8);
    run(MODE_SINE, 4);
    run(MODE_SINE, 6);
    run(MODE_SINE, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
