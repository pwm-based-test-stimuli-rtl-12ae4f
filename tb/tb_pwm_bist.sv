// tb_pwm_bist: end-to-end test of the PWM self-test at its default sizes
// (20-bit converter, sequences up to 256 samples, 256 master clocks per
// sample, latency up to 32 samples).
//
// A behavioural converter (adc_model) averages the PWM over each sample
// period, adds a known cubic error and noise, and returns the word after a
// programmable latency. Several runs cover the three stimulus shapes, the
// settling repetitions (zero and non-zero), latencies from 0 to 32 and
// N = 16, 64 and 256. For every run the testbench checks, from the converter
// model's own record of what it saw and returned:
//   - the stimulus: high time of every captured period against the formula
//     of its shape;
//   - the least-squares sums of the fit, recomputed from (h, e) pairs, and,
//     for ramp runs, the cubic solved from them against the error put in;
//   - every DFT bin against a DFT in floating point, the summary powers
//     against the same, and for sine runs the 2nd and 3rd harmonic against the
//     error put in;
//   - the run length in sample periods: (settle + 1) * N + delta + 1, one
//     more when the final spectrum pass runs into the next period.
// Each mechanism (shape, settling, zero and non-zero latency, clipping at full
// scale) is counted and must occur at least once.
module tb_pwm_bist;
  import bist_pkg::*;

  localparam int ADC_BITS = 20;
  localparam int LOG_R    = 8;
  localparam int R        = 2 ** LOG_R;
  localparam int TWS      = 2 ** 14;     // twiddle scale of the spectrum
  localparam real PI      = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start = 1'b0;
  mode_e       mode  = MODE_RAMP;
  logic [3:0]  log2n = 4'd6;
  logic [3:0]  settle = 4'd1;
  logic [5:0]  delta = '0;
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
  int n_ramp = 0, n_tri = 0, n_sine = 0, n_settle = 0, n_nosettle = 0;
  int n_delta0 = 0, n_delta_pos = 0, n_clip = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real pow2real(input logic [104:0] v);
    real r;
    r = 0.0;
    for (int b = 104; b >= 0; b--) r = r * 2.0 + (v[b] ? 1.0 : 0.0);
    return r;
  endfunction

  // expected high time of index i
  function automatic int exp_h(input mode_e m, input int i, input int n);
    real s;
    case (m)
      MODE_RAMP:     return i * R / n;
      MODE_TRIANGLE: return (i <= n / 2) ? 2 * i * R / n : 2 * (n - i) * R / n;
      default: begin
        s = real'(R / 2) * $sin(2.0 * PI * real'(i) / real'(n));
        return R / 2 + $rtoi(s + ((s >= 0.0) ? 0.5 : -0.5));
      end
    endcase
  endfunction

  // solve the 4x4 system a * c = b in place (Gaussian elimination)
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

  task automatic run(input mode_e m, input int lg, input int st, input int dl,
                     input real ca0, input real ca1, input real ca2, input real ca3,
                     input int nz);
    int n, c0, periods, exp_periods, h, e, x, i;
    longint es [4];
    longint eg [7];
    longint xp;
    real re_x [], im_x [], ph, pw, noise_exp, rd, id, clip_err;
    real a [4][4];
    real b [4];
    real c [4];
    string tag;
    n  = 1 << lg;
    c0 = st * n;
    tag = $sformatf("%s N=%0d settle=%0d delta=%0d", m.name(), n, st, dl);
    @(negedge clk);
    mode = m; log2n = 4'(lg); settle = 4'(st); delta = 6'(dl);
    adc.a0 = ca0; adc.a1 = ca1; adc.a2 = ca2; adc.a3 = ca3; adc.noise_lsb = nz;
    adc.restart();
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    periods = 0;
    while (!done) begin
      @(posedge clk);
      if (fs_strobe) periods++;
    end
    @(negedge clk);
    // the last word arrives mid-period; the spectrum then needs about N + 8
    // clocks (transform of that word, summary), which may reach the next period
    exp_periods = (st + 1) * n + dl + 1 + ((R / 2 + n + 8 >= R) ? 1 : 0);
    check(periods == exp_periods,
          $sformatf("%s: run took %0d periods, expected %0d", tag, periods, exp_periods));
    case (m)
      MODE_RAMP: n_ramp++;
      MODE_TRIANGLE: n_tri++;
      default: n_sine++;
    endcase
    if (st > 0) n_settle++; else n_nosettle++;
    if (dl > 0) n_delta_pos++; else n_delta0++;

    // stimulus
    for (i = 0; i < n; i++) begin
      check(adc.h_rec.exists(c0 + i) && adc.h_rec[c0 + i] == exp_h(m, i, n),
            $sformatf("%s: high time of sample %0d: %0d, expected %0d", tag, i, adc.h_rec.exists(c0 + i) ? adc.h_rec[c0 + i] : -1, exp_h(m, i, n)));
      if (adc.h_rec.exists(c0 + i) && adc.h_rec[c0 + i] == R) n_clip++;
    end

    // least-squares sums
    for (int k = 0; k < 4; k++) es[k] = 0;
    for (int k = 0; k < 7; k++) eg[k] = 0;
    for (i = 0; i < n; i++) begin
      if (m != MODE_SINE && i == 0) continue;
      h = adc.h_rec[c0 + i];
      e = adc.e_rec[c0 + i];
      x = 2 * h - R;
      xp = 1;
      for (int k = 0; k < 7; k++) begin
        if (k < 4) es[k] += longint'(e) * xp;
        eg[k] += xp;
        xp = xp * longint'(x);
      end
    end
    for (int k = 0; k < 4; k++)
      check(fit_s[k] == es[k], $sformatf("%s: S[%0d] = %0d, expected %0d", tag, k, fit_s[k], es[k]));
    for (int k = 0; k < 7; k++)
      check(fit_g[k] == eg[k], $sformatf("%s: G[%0d] = %0d, expected %0d", tag, k, fit_g[k], eg[k]));
    if (m == MODE_RAMP) begin
      // c_k are coefficients in x; in u = x / R they are c_k * R^k
      for (int r = 0; r < 4; r++) begin
        b[r] = real'(fit_s[r]);
        for (int q = 0; q < 4; q++) a[r][q] = real'(fit_g[r + q]);
      end
      solve4(a, b, c);
      check(rabs(c[0] - ca0) < 1.0 + nz, $sformatf("%s: fitted a0 %f vs %f", tag, c[0], ca0));
      check(rabs(c[1] * R - ca1) < 2.0 + 2 * nz, $sformatf("%s: fitted a1 %f vs %f", tag, c[1] * R, ca1));
      check(rabs(c[2] * R * R - ca2) < 2.0 + 2 * nz, $sformatf("%s: fitted a2 %f vs %f", tag, c[2] * R * R, ca2));
      check(rabs(c[3] * R * R * R - ca3) < 3.0 + 3 * nz, $sformatf("%s: fitted a3 %f vs %f", tag, c[3] * R * R * R, ca3));
    end

    // spectrum
    re_x = new[n / 2 + 1];
    im_x = new[n / 2 + 1];
    noise_exp = 0.0;
    for (int k = 0; k <= n / 2; k++) begin
      re_x[k] = 0.0;
      im_x[k] = 0.0;
      for (i = 0; i < n; i++) begin
        ph = 2.0 * PI * real'(k * i) / real'(n);
        re_x[k] += real'(adc.e_rec[c0 + i]) * $cos(ph);
        im_x[k] -= real'(adc.e_rec[c0 + i]) * $sin(ph);
      end
      bin_addr = 8'(k);
      #1;
      rd = real'(bin_re) / TWS;
      id = real'(bin_im) / TWS;
      check(rabs(rd - re_x[k]) < 0.5 + 1.0e-4 * n * 1000.0 && rabs(id - im_x[k]) < 0.5 + 1.0e-4 * n * 1000.0,
            $sformatf("%s: bin %0d = (%f, %f), expected (%f, %f)", tag, k, rd, id, re_x[k], im_x[k]));
      pw = re_x[k] * re_x[k] + im_x[k] * im_x[k];
      if (k >= 4) noise_exp += (k == n / 2) ? pw : 2.0 * pw;
    end
    pw = re_x[2] * re_x[2] + im_x[2] * im_x[2];
    check(rabs(pow2real(105'(p_hd2)) / (real'(TWS) * TWS) - pw) < 0.01 * pw + 100.0,
          $sformatf("%s: HD2 power %e, expected %e", tag, pow2real(105'(p_hd2)) / (real'(TWS) * TWS), pw));
    pw = re_x[3] * re_x[3] + im_x[3] * im_x[3];
    check(rabs(pow2real(105'(p_hd3)) / (real'(TWS) * TWS) - pw) < 0.01 * pw + 100.0,
          $sformatf("%s: HD3 power %e, expected %e", tag, pow2real(105'(p_hd3)) / (real'(TWS) * TWS), pw));
    pw = re_x[1] * re_x[1] + im_x[1] * im_x[1];
    check(rabs(pow2real(105'(p_fund)) / (real'(TWS) * TWS) - pw) < 0.01 * pw + 100.0,
          $sformatf("%s: fundamental error power", tag));
    pw = re_x[0] * re_x[0];
    check(rabs(pow2real(105'(p_dc)) / (real'(TWS) * TWS) - pw) < 0.01 * pw + 100.0,
          $sformatf("%s: DC power", tag));
    check(rabs(pow2real(p_noise) / (real'(TWS) * TWS) - noise_exp) < 0.02 * noise_exp + 100.0 * n,
          $sformatf("%s: noise power %e, expected %e", tag, pow2real(p_noise) / (real'(TWS) * TWS), noise_exp));
    if (m == MODE_SINE) begin
      // full-scale samples (near i = N/4) clip and each moves every bin by
      // up to its error: clip_err
      clip_err = 0.0;
      for (i = 0; i < n; i++)
        if (adc.h_rec[c0 + i] == R) clip_err += rabs(ca0 + ca1 + ca2 + ca3) + 1.0;
      // u = sin: u^2 gives -a2/2 cos(2 theta), u^3 gives -a3/4 sin(3 theta)
      check(rabs($sqrt(pow2real(105'(p_hd2))) / TWS - n / 2 * rabs(ca2) / 2.0) < 0.05 * n / 2 * rabs(ca2) / 2.0 + 4.0 * n + clip_err,
            $sformatf("%s: HD2 amplitude %f, error put in %f", tag, $sqrt(pow2real(105'(p_hd2))) / TWS, n / 2 * rabs(ca2) / 2.0));
      check(rabs($sqrt(pow2real(105'(p_hd3))) / TWS - n / 2 * rabs(ca3) / 4.0) < 0.05 * n / 2 * rabs(ca3) / 4.0 + 4.0 * n + clip_err,
            $sformatf("%s: HD3 amplitude %f, error put in %f", tag, $sqrt(pow2real(105'(p_hd3))) / TWS, n / 2 * rabs(ca3) / 4.0));
    end
    $display("run %s: %0d periods, checks so far %0d, failures %0d", tag, periods, checks, failures);
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (300) @(posedge clk);
    run(MODE_RAMP,     6, 1,  3,  5.0, -12.0, 300.0, 150.0, 0);
    run(MODE_TRIANGLE, 4, 0,  0, -3.0,   8.0, 120.0, -60.0, 1);
    run(MODE_SINE,     6, 2,  5,  2.0,  20.0, 400.0, 200.0, 2);
    run(MODE_RAMP,     8, 1, 32,  0.0,   6.0, -90.0, 240.0, 0);
    run(MODE_SINE,     8, 1, 17,  1.0,  -5.0, 250.0, -500.0, 1);
    run(MODE_SINE,     4, 0,  0,  0.0,   0.0, 600.0, 300.0, 0);
    check(n_ramp > 0,      "no ramp run");
    check(n_tri > 0,       "no triangle run");
    check(n_sine > 0,      "no sine run");
    check(n_settle > 0,    "no run with settling sequences");
    check(n_nosettle > 0,  "no run without settling");
    check(n_delta0 > 0,    "no run with zero latency");
    check(n_delta_pos > 0, "no run with latency");
    check(n_clip > 0,      "no full-scale sample");
    $display("mechanisms: ramp=%0d triangle=%0d sine=%0d settle=%0d no_settle=%0d delta0=%0d delta>0=%0d full_scale=%0d",
             n_ramp, n_tri, n_sine, n_settle, n_nosettle, n_delta0, n_delta_pos, n_clip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
