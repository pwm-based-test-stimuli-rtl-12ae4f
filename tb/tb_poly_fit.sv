// tb_poly_fit: streams random error samples and centred duties (full range
// of both, back to back and with gaps, some with the fit flag low) into the
// least-squares accumulator and compares the eleven sums with sums kept here
// in 64-bit integers. Then clears and repeats with a ramp carrying a known
// cubic error, solves the normal equations here in floating point and checks
// that the cubic comes back. A second instance with ORDER = 5 and 96-bit sums
// runs on the same stream and is compared with 128-bit sums kept here.
module tb_poly_fit;

  localparam int E_BITS = 22;
  localparam int X_BITS = 10;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic clear = 1'b0, s_valid = 1'b0, s_fit = 1'b0;
  logic signed [E_BITS-1:0] e = '0;
  logic signed [X_BITS-1:0] x = '0;
  logic signed [63:0] s_sum [4];
  logic signed [63:0] g_sum [7];

  poly_fit dut (.clk, .rst_n, .clear, .s_valid, .s_fit, .e, .x, .s_sum, .g_sum);

  logic signed [95:0] s5_sum [6];
  logic signed [95:0] g5_sum [11];

  poly_fit #(.ORDER(5), .ACC_BITS(96)) dut5 (.clk, .rst_n, .clear, .s_valid, .s_fit, .e, .x,
                                            .s_sum(s5_sum), .g_sum(g5_sum));

  int checks = 0, failures = 0;
  longint es [4];
  longint eg [7];
  logic signed [127:0] es5 [6];
  logic signed [127:0] eg5 [11];

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic push(input int ev, input int xv, input bit fit);
    longint xp;
    logic signed [127:0] xw;
    @(negedge clk);
    s_valid = 1'b1; s_fit = fit; e = E_BITS'(ev); x = X_BITS'(xv);
    if (fit) begin
      xp = 1;
      for (int k = 0; k < 7; k++) begin
        if (k < 4) es[k] += longint'(ev) * xp;
        eg[k] += xp;
        xp *= longint'(xv);
      end
      xw = 128'sd1;
      for (int k = 0; k < 11; k++) begin
        if (k < 6) es5[k] += 128'(signed'(ev)) * xw;
        eg5[k] += xw;
        xw = xw * 128'(signed'(xv));
      end
    end
  endtask

  task automatic compare(input string what);
    @(negedge clk);
    s_valid = 1'b0;
    @(negedge clk);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (s_sum[k] != es[k]) begin failures++; $display("FAIL: %s S[%0d]=%0d exp %0d", what, k, s_sum[k], es[k]); end
    end
    for (int k = 0; k < 7; k++) begin
      checks++;
      if (g_sum[k] != eg[k]) begin failures++; $display("FAIL: %s G[%0d]=%0d exp %0d", what, k, g_sum[k], eg[k]); end
    end
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (128'(s5_sum[k]) != es5[k]) begin failures++; $display("FAIL: %s order 5 S[%0d]=%0d exp %0d", what, k, s5_sum[k], es5[k]); end
    end
    for (int k = 0; k < 11; k++) begin
      checks++;
      if (128'(g5_sum[k]) != eg5[k]) begin failures++; $display("FAIL: %s order 5 G[%0d]=%0d exp %0d", what, k, g5_sum[k], eg5[k]); end
    end
  endtask

  task automatic do_clear();
    @(negedge clk);
    s_valid = 1'b0;
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    foreach (es[k]) es[k] = 0;
    foreach (eg[k]) eg[k] = 0;
    foreach (es5[k]) es5[k] = '0;
    foreach (eg5[k]) eg5[k] = '0;
  endtask

  initial begin
    real a [4][4];
    real b [4];
    real c [4];
    real f, u, err;
    int h, ev;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    do_clear();
    // extremes
    push(-(1 << 21), -256, 1'b1);
    push((1 << 21) - 1, 256, 1'b1);
    push((1 << 21) - 1, -256, 1'b1);
    for (int n = 0; n < 300; n++) begin
      push(int'($urandom_range(32'h3FFFFF)) - (1 << 21), int'($urandom_range(512)) - 256,
           $urandom_range(4) != 0);
      if ($urandom_range(3) == 0) begin
        @(negedge clk);
        s_valid = 1'b0;
      end
    end
    compare("random");

    // ramp of 63 samples with e = 7 - 20u + 150u^2 + 300u^3 (u = x / 256)
    do_clear();
    for (int i = 1; i < 64; i++) begin
      h = i * 4;
      u = real'(2 * h - 256) / 256.0;
      err = 7.0 - 20.0 * u + 150.0 * u * u + 300.0 * u * u * u;
      ev = $rtoi(err + ((err >= 0.0) ? 0.5 : -0.5));
      push(ev, 2 * h - 256, 1'b1);
    end
    compare("ramp");
    for (int r = 0; r < 4; r++) begin
      b[r] = real'(s_sum[r]);
      for (int q = 0; q < 4; q++) a[r][q] = real'(g_sum[r + q]);
    end
    for (int p = 0; p < 4; p++)
      for (int r = p + 1; r < 4; r++) begin
        f = a[r][p] / a[p][p];
        for (int q = p; q < 4; q++) a[r][q] -= f * a[p][q];
        b[r] -= f * b[p];
      end
    for (int p = 3; p >= 0; p--) begin
      c[p] = b[p];
      for (int q = p + 1; q < 4; q++) c[p] -= a[p][q] * c[q];
      c[p] /= a[p][p];
    end
    checks++;
    if (rabs(c[0] - 7.0) > 0.5 || rabs(c[1] * 256.0 + 20.0) > 1.0
        || rabs(c[2] * 65536.0 - 150.0) > 1.0 || rabs(c[3] * 16777216.0 - 300.0) > 1.5) begin
      failures++;
      $display("FAIL: fitted %f %f %f %f", c[0], c[1] * 256.0, c[2] * 65536.0, c[3] * 16777216.0);
    end
    do_clear();
    compare("after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
