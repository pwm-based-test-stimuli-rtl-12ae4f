// tb_duty_gen: checks the duty-cycle sequence for every shape at every N
// from 2 to 256 against the formulas computed here in floating point (sine) and
// integer arithmetic (ramp, triangle): high time, index, wrap-around after
// N - 1, the `last` flag and the fit flag. Two full sequences per case.
module tb_duty_gen;
  import bist_pkg::*;

  localparam int R = 256;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  mode_e      mode = MODE_RAMP;
  logic [3:0] log2n = 4'd3;
  logic       restart = 1'b0, advance = 1'b0;
  logic [8:0] duty;
  logic [7:0] idx;
  logic       last, fit_en;

  duty_gen dut (.clk, .rst_n, .mode, .log2n, .restart, .advance, .duty, .idx, .last, .fit_en);

  int checks = 0, failures = 0;

  function automatic int exp_h(input mode_e m, input int i, input int n);
    real s;
    case (m)
      MODE_RAMP:     return i * R / n;
      MODE_TRIANGLE: return (i <= n / 2) ? 2 * i * R / n : 2 * (n - i) * R / n;
      default: begin
        s = 128.0 * $sin(2.0 * PI * real'(i) / real'(n));
        return 128 + $rtoi(s + ((s >= 0.0) ? 0.5 : -0.5));
      end
    endcase
  endfunction

  initial begin
    int lgs [8] = '{1, 2, 3, 4, 5, 6, 7, 8};
    mode_e modes [3] = '{MODE_RAMP, MODE_TRIANGLE, MODE_SINE};
    int n, i;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (modes[mi]) foreach (lgs[li]) begin
      n = 1 << lgs[li];
      @(negedge clk);
      mode = modes[mi]; log2n = 4'(lgs[li]); restart = 1'b1;
      @(negedge clk);
      restart = 1'b0;
      for (int step = 0; step < 2 * n; step++) begin
        i = step % n;
        checks++;
        if (duty != 9'(exp_h(mode, i, n)) || idx != 8'(i) || last != (i == n - 1)
            || fit_en != (mode == MODE_SINE || i != 0)) begin
          failures++;
          $display("FAIL: %s N=%0d i=%0d: duty %0d (exp %0d) idx %0d last %0b fit %0b",
                   mode.name(), n, i, duty, exp_h(mode, i, n), idx, last, fit_en);
        end
        advance = 1'b1;
        @(negedge clk);
        advance = 1'b0;
        // idle cycles between advances must not move the index
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
