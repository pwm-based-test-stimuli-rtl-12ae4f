// tb_dft_engine: feeds sequences of N = 8, 64 and 256 random error samples
// into the running DFT and compares every bin, exactly, with a DFT computed
// here in integers using twiddles rounded from $sin/$cos; then the summary
// powers (DC, fundamental, HD2, HD3, noise) with the same bins. Also checks
// the timing: the clearing sweep takes N_MAX/2 + 1 clocks, one sample keeps
// the engine busy for N/2 + 1 clocks, and `done` rises N/2 + 2 clocks after
// `finish`.
module tb_dft_engine;

  localparam int E_BITS = 22;
  localparam int TWS = 1 << 14;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic clear = 1'b0, s_valid = 1'b0, finish = 1'b0;
  logic [3:0] log2n = 4'd6;
  logic signed [E_BITS-1:0] e = '0;
  logic [7:0] idx = '0;
  logic busy, done;
  logic [7:0] rd_addr = '0;
  logic signed [47:0] rd_re, rd_im;
  logic [95:0] rd_pow, p_dc, p_fund, p_hd2, p_hd3;
  logic [104:0] p_noise;

  dft_engine dut (.clk, .rst_n, .clear, .log2n, .s_valid, .e, .idx, .finish, .busy, .done,
                  .rd_addr, .rd_re, .rd_im, .rd_pow, .p_dc, .p_fund, .p_hd2, .p_hd3, .p_noise);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic longint tw(input real ang, input bit is_cos);
    real v;
    v = (is_cos ? $cos(ang) : $sin(ang)) * real'(TWS);
    return longint'($rtoi(v + ((v >= 0.0) ? 0.5 : -0.5)));
  endfunction

  task automatic run(input int lg, input int amp);
    int n, cyc;
    int ev [];
    longint xr [], xi [];
    logic [127:0] pw [];
    logic [127:0] noise;
    n = 1 << lg;
    ev = new[n];
    xr = new[n / 2 + 1];
    xi = new[n / 2 + 1];
    pw = new[n / 2 + 1];
    @(negedge clk);
    log2n = 4'(lg);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    cyc = 0;
    while (busy) begin @(negedge clk); cyc++; end
    check(cyc == 129, $sformatf("N=%0d: clearing took %0d clocks", n, cyc));
    for (int i = 0; i < n; i++) begin
      ev[i] = int'($urandom_range(2 * amp)) - amp;
      s_valid = 1'b1; e = E_BITS'(ev[i]); idx = 8'(i);
      @(negedge clk);
      s_valid = 1'b0;
      cyc = 0;
      while (busy) begin @(negedge clk); cyc++; end
      if (i == 0) check(cyc == n / 2 + 1, $sformatf("N=%0d: one sample busy %0d clocks", n, cyc));
      repeat ($urandom_range(3)) @(negedge clk);
    end
    finish = 1'b1;
    @(negedge clk);
    finish = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == n / 2 + 2, $sformatf("N=%0d: summary took %0d clocks", n, cyc));
    noise = '0;
    for (int k = 0; k <= n / 2; k++) begin
      xr[k] = 0;
      xi[k] = 0;
      for (int i = 0; i < n; i++) begin
        xr[k] += longint'(ev[i]) * tw(2.0 * PI * real'((k * i) % n) / real'(n), 1'b1);
        xi[k] -= longint'(ev[i]) * tw(2.0 * PI * real'((k * i) % n) / real'(n), 1'b0);
      end
      pw[k] = 128'(xr[k] * xr[k]) + 128'(xi[k] * xi[k]);
      if (k >= 4) noise += (k == n / 2) ? pw[k] : (pw[k] << 1);
      rd_addr = 8'(k);
      #1;
      check(rd_re == 48'(xr[k]) && rd_im == 48'(xi[k]) && rd_pow == 96'(pw[k]),
            $sformatf("N=%0d bin %0d: (%0d, %0d), expected (%0d, %0d)", n, k, rd_re, rd_im, xr[k], xi[k]));
    end
    check(p_dc == 96'(pw[0]) && p_fund == 96'(pw[1]) && p_hd2 == 96'(pw[2]) && p_hd3 == 96'(pw[3]),
          $sformatf("N=%0d: summary bin powers", n));
    check(p_noise == 105'(noise), $sformatf("N=%0d: noise %0d, expected %0d", n, p_noise, noise));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(3, 1000);
    run(6, 1 << 20);
    run(8, 1 << 15);
    run(8, (1 << 21) - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
