// tb_err_extract: feeds the aligner a stream of periods (a `load` every
// PER clocks) with random tags, and returns for each period a random
// converter word `delta` periods later, in the middle of a period. Checks
// that exactly the captured periods give an error sample, and that each
// carries e = Y - (h * 2^(n-8) - 2^(n-1)), x = 2h - 256, the index and the
// fit flag of its own period. Runs latencies 0, 1, 7 and 32, and a `clear`
// between runs that must drop all stored captures.
module tb_err_extract;

  localparam int ADC_BITS = 20;
  localparam int LOG_R = 8;
  localparam int R = 256;
  localparam int PER = 24;          // clocks between loads (any spacing works)

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       clear = 1'b0, load = 1'b0;
  logic       tag_capture = 1'b0, tag_fit = 1'b0;
  logic [7:0] tag_idx = '0;
  logic [8:0] tag_h = '0;
  logic       adc_valid = 1'b0;
  logic signed [ADC_BITS-1:0] adc_data = '0;
  logic [5:0] delta = '0;
  logic       e_valid, e_fit;
  logic signed [ADC_BITS+1:0] e;
  logic signed [LOG_R+1:0] x;
  logic [7:0] e_idx;

  err_extract dut (.clk, .rst_n, .clear, .load, .tag_capture, .tag_fit, .tag_idx, .tag_h,
                   .adc_valid, .adc_data, .delta, .e_valid, .e, .x, .e_idx, .e_fit);

  int checks = 0, failures = 0;
  int got = 0;

  // per period: tag and word
  int t_cap [int], t_fit [int], t_idx [int], t_h [int], y_of [int];
  int exp_q [$];        // periods whose sample is expected next

  always @(posedge clk) begin
    int p;
    if (rst_n && e_valid) begin
      got++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected sample at %0t, e_idx %0d", $time, e_idx);
      end else begin
        p = exp_q.pop_front();
        if (e != (ADC_BITS+2)'(y_of[p] - ((t_h[p] <<< (ADC_BITS - LOG_R)) - (1 <<< (ADC_BITS - 1))))
            || x != (LOG_R+2)'(2 * t_h[p] - R) || e_idx != 8'(t_idx[p]) || e_fit != t_fit[p][0]) begin
          failures++;
          $display("FAIL: period %0d: e=%0d x=%0d idx=%0d fit=%0b", p, e, x, e_idx, e_fit);
        end
      end
    end
  end

  task automatic run(input int dl, input int periods);
    int q, p;
    t_cap.delete(); t_fit.delete(); t_idx.delete(); t_h.delete(); y_of.delete();
    @(negedge clk);
    delta = 6'(dl);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    for (q = 0; q < periods + dl + 2; q++) begin
      // load: period q begins
      t_cap[q] = (q < periods) ? int'($urandom_range(3) != 0) : 0;
      t_fit[q] = int'($urandom_range(1));
      t_idx[q] = int'($urandom_range(255));
      t_h[q]   = int'($urandom_range(R));
      y_of[q]  = int'($urandom_range(32'hFFFFF)) - (1 << 19);
      load = 1'b1;
      tag_capture = t_cap[q][0]; tag_fit = t_fit[q][0];
      tag_idx = 8'(t_idx[q]); tag_h = 9'(t_h[q]);
      @(negedge clk);
      load = 1'b0;
      repeat (PER / 2) @(negedge clk);
      // mid-period q: the word of period q - 1 - delta
      p = q - 1 - dl;
      if (p >= 0) begin
        adc_valid = 1'b1;
        adc_data = ADC_BITS'(y_of[p]);
        if (t_cap[p] != 0) exp_q.push_back(p);
        @(negedge clk);
        adc_valid = 1'b0;
      end
      repeat (PER / 2 - 2) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: delta=%0d: %0d samples missing", dl, exp_q.size());
      exp_q.delete();
    end
  endtask

  initial begin
    int got0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(0, 40);
    run(1, 40);
    run(7, 40);
    run(32, 60);
    // clear must forget captures: words for stored captured periods, after
    // a clear, give nothing
    got0 = got;
    @(negedge clk);
    for (int q = 0; q < 5; q++) begin
      load = 1'b1; tag_capture = 1'b1;
      @(negedge clk);
      load = 1'b0;
      @(negedge clk);
    end
    tag_capture = 1'b0;
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    delta = 6'd1;
    adc_valid = 1'b1;
    @(negedge clk);
    adc_valid = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (got != got0) begin failures++; $display("FAIL: sample after clear"); end
    checks++;
    if (got < 60) begin failures++; $display("FAIL: only %0d samples", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300 * PER) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
