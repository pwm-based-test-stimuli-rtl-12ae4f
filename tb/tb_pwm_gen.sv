// tb_pwm_gen: drives the PWM generator with random high times (including 0
// and full period) and checks, period by period, that the period lasts
// exactly 2^LOG_R clocks, that `period_start` marks its first cycle, that
// `load` comes once per period, and that the output is high in exactly the
// first h cycles (h = 0 and h = 2^LOG_R included). Also checks that the output stays low while disabled.
module tb_pwm_gen;

  localparam int LOG_R = 8;
  localparam int R = 2 ** LOG_R;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           en = 1'b0;
  logic [LOG_R:0] duty = '0;
  logic           load, period_start, pwm;

  pwm_gen dut (.clk, .rst_n, .en, .duty, .load, .period_start, .pwm);

  int checks = 0, failures = 0;
  int hs [$];

  // duty source: a new random high time after every load
  always @(posedge clk) begin
    if (load) begin
      hs.push_back(int'(duty));
      duty <= (hs.size() % 10 == 3) ? 9'd0 : 9'($urandom_range(R));
    end
  end

  initial begin
    int h, highs, ok;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) begin
      @(posedge clk);
      checks++;
      if (pwm || period_start) begin failures++; $display("FAIL: active while disabled"); end
    end
    @(negedge clk);
    duty = 9'(R);   // first period fully high
    en = 1'b1;
    // the first load edge; the period starts right after it
    @(posedge clk);
    for (int p = 0; p < 40; p++) begin
      highs = 0;
      ok = 1;
      for (int c = 0; c < R; c++) begin
        #1;
        if ((c == 0) != period_start) ok = 0;
        if ((c == R - 1) != load) ok = 0;
        if (pwm) begin
          highs++;
          if (c >= hs[0]) ok = 0;   // high only at the start of the period
        end
        @(posedge clk);
      end
      h = hs.pop_front();
      checks++;
      if (!ok || highs != h) begin
        failures++;
        $display("FAIL: period %0d: %0d high cycles for h=%0d, framing ok=%0d", p, highs, h, ok);
      end
    end
    @(negedge clk);
    en = 1'b0;
    repeat (3) @(posedge clk);
    checks++;
    if (pwm) begin failures++; $display("FAIL: high after disable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50 * R) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
