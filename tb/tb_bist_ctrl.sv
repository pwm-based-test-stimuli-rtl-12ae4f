// tb_bist_ctrl: runs the sequencer against a model of its surroundings: a
// period boundary (`load`) every PER clocks while `gen_en` is high, `last`
// on every N-th load (as the duty sequence gives it), an error sample DL
// periods after every captured load, a spectrum engine that is busy for a few
// clocks per sample and finishes its summary some clocks after `finish`.
// For several (N, settle, latency) cases it checks: one `clear` pulse with the
// generator still off, exactly N captured periods starting at sequence index
// 0 after `settle` full sequences, `finish` once, only after the N-th sample
// and with the engine idle, `done` after the engine's summary with the
// generator stopped, and that `start` is ignored during a run.
module tb_bist_ctrl;

  localparam int PER = 10;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       start = 1'b0;
  logic [3:0] log2n = 4'd3, settle = 4'd1;
  logic       load, last, e_valid = 1'b0, eval_busy = 1'b0, eval_done;
  logic       gen_en, clear, capture, finish, busy, done;

  bist_ctrl dut (.clk, .rst_n, .start, .log2n, .settle, .load, .last, .e_valid,
                 .eval_busy, .eval_done, .gen_en, .clear, .capture, .finish, .busy, .done);

  int checks = 0, failures = 0;

  // surroundings
  int ph = 0, nload = 0, n;
  int dl = 0;
  int pending [$];          // clock at which a sample is due
  int now = 0;
  int busy_left = 0, sum_left = -1;
  bit sum_done = 1'b0;

  assign load = gen_en && (ph == 0);
  assign last = load && ((nload % n) == n - 1);

  always @(posedge clk) begin
    now++;
    if (clear) sum_done <= 1'b0;
    if (gen_en) begin
      if (load) begin
        if (capture) pending.push_back(now + (dl + 1) * PER + PER / 2);
        nload++;
      end
      ph <= (ph == PER - 1) ? 0 : ph + 1;
    end else begin
      ph <= 0;
      nload = 0;
    end
    e_valid <= 1'b0;
    if (pending.size() > 0 && pending[0] == now) begin
      void'(pending.pop_front());
      e_valid <= 1'b1;
      busy_left = 3;
    end
    eval_busy <= busy_left > 0;
    if (busy_left > 0) busy_left--;
    if (finish) sum_left = 6;
    if (sum_left > 0) sum_left--;
    if (sum_left == 0) begin sum_done <= 1'b1; sum_left = -1; end
  end
  assign eval_done = sum_done;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(input int lg, input int st, input int d);
    int clears, captured, first_cap, finishes, samples, cyc, nl;
    bit clear_with_gen;
    string tag;
    tag = $sformatf("N=%0d settle=%0d delta=%0d", 1 << lg, st, d);
    @(negedge clk);
    log2n = 4'(lg); settle = 4'(st); dl = d; n = 1 << lg;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    clears = 0; captured = 0; first_cap = -1; finishes = 0; samples = 0; cyc = 0; nl = 0;
    clear_with_gen = 1'b0;
    // the cycle right after the start edge
    if (clear) begin clears++; if (gen_en) clear_with_gen = 1'b1; end
    while (!done && cyc < 100000) begin
      @(posedge clk);
      #1;
      cyc++;
      if (cyc == 50) begin
        // a second start during the run must be ignored
        start = 1'b1;
        @(posedge clk);
        #1;
        start = 1'b0;
      end
      if (clear) begin clears++; if (gen_en) clear_with_gen = 1'b1; end
      if (load) begin
        if (capture) begin
          if (first_cap < 0) first_cap = nl;
          captured++;
        end
        nl++;
      end
      if (e_valid) samples++;
      if (finish) begin
        finishes++;
        check(samples == n && !eval_busy, $sformatf("%s: finish after %0d samples, busy %0b", tag, samples, eval_busy));
      end
    end
    check(done, $sformatf("%s: no done", tag));
    check(clears == 1 && !clear_with_gen, $sformatf("%s: %0d clears", tag, clears));
    check(captured == n, $sformatf("%s: %0d captured periods", tag, captured));
    check(first_cap == st * n, $sformatf("%s: capture began at load %0d", tag, first_cap));
    check(finishes == 1, $sformatf("%s: %0d finishes", tag, finishes));
    check(!gen_en && !busy, $sformatf("%s: generator still on when done", tag));
    // a run is (settle + 1) * N periods of stimulus and the latency
    check(nl >= (st + 1) * n + d && nl <= (st + 1) * n + d + 2,
          $sformatf("%s: %0d periods", tag, nl));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(3, 1, 2);
    run(4, 0, 0);
    run(3, 3, 5);
    run(6, 2, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
