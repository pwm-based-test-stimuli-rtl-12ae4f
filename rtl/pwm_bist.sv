// pwm_bist: built-in self-test of a high-resolution sigma-delta ADC driven by
// a purely digital PWM stimulus.
//
// A sigma-delta converter responds to the average of its input over each
// sample period. A binary waveform at the sample rate, switching between the
// converter's two references, therefore looks to it like an analog level set
// by the duty cycle: V = VrefL + (VrefH - VrefL) * eta. Changing the duty
// cycle every sample synthesises a test signal with nothing analog on chip
// but a 1-bit switch. This top wires:
//   bist_ctrl    run sequencer (settle, capture one sequence, drain, summary)
//   duty_gen     duty sequence: linear ramp, triangle or sine, N = 2^log2n
//   pwm_gen      synchronous PWM, 2^LOG_R master clocks per sample period
//   err_extract  pairs each ADC word with its stimulus (latency `delta`)
//                and forms the error e = Y - Y_ideal
//   poly_fit     normal-equation sums of the cubic fit of e against the duty
//                cycle (linear test: gain, 2nd and 3rd order error terms);
//                FIT_ORDER raises the order, fit sums then widen to FIT_BITS
//   dft_engine   spectrum of e (sine test: offset, gain error, HD2, HD3,
//                noise), with a summary pass at the end of the run
// Both evaluations run on every capture; which one is meaningful depends on
// the stimulus shape.
//
// Outside this module: the 1-bit DAC that turns `pwm_out` into the two
// reference levels, and the converter under test. The converter must sample
// in step with `fs_strobe` (cycle 0 of each PWM period) and deliver each word
// with `adc_valid` away from the period boundary (`fs_strobe` cycle and the
// cycle before it); `delta` is the number of whole sample periods between the
// end of a stimulus period and the period in which its word arrives.
//
// Clocking: one clock, the master clock at 2^LOG_R times the sample rate;
// asynchronous active-low reset. `start` begins a run when idle; `done` stays
// high, with all results held, until the next `start`.
module pwm_bist
  import bist_pkg::*;
#(
  parameter int unsigned ADC_BITS  = ADC_BITS_DEF,
  parameter int unsigned LOG_NMAX  = LOG_NMAX_DEF,
  parameter int unsigned LOG_R     = LOG_R_DEF,
  parameter int unsigned DELTA_MAX = DELTA_MAX_DEF,
  parameter int unsigned TW_BITS   = TW_BITS_DEF,
  parameter int unsigned FIT_ORDER = 3,
  localparam int unsigned FIT_E      = ADC_BITS + 2 + FIT_ORDER * LOG_R,
  localparam int unsigned FIT_G      = 2 * FIT_ORDER * LOG_R + 1,
  localparam int unsigned FIT_BITS   = ((FIT_E > FIT_G ? FIT_E : FIT_G) + LOG_NMAX + 1 > 64)
                                       ? (FIT_E > FIT_G ? FIT_E : FIT_G) + LOG_NMAX + 1 : 64,
  localparam int unsigned DFT_BITS   = 48,
  localparam int unsigned AW         = $clog2(2 ** (LOG_NMAX - 1) + 1),
  localparam int unsigned POW_BITS   = 2 * DFT_BITS,
  localparam int unsigned NOISE_BITS = 2 * DFT_BITS + LOG_NMAX + 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // run control
  input  logic                         start,
  input  mode_e                        mode,
  input  logic [3:0]                   log2n,
  input  logic [3:0]                   settle,
  input  logic [$clog2(DELTA_MAX+1)-1:0] delta,
  output logic                         busy,
  output logic                         done,
  // stimulus, to the 1-bit DAC
  output logic                         pwm_out,
  output logic                         fs_strobe,
  // converter under test
  input  logic                         adc_valid,
  input  logic signed [ADC_BITS-1:0]   adc_data,
  // linear test: least-squares sums
  output logic signed [FIT_BITS-1:0]   fit_s [FIT_ORDER+1],
  output logic signed [FIT_BITS-1:0]   fit_g [2*FIT_ORDER+1],
  // sine test: spectrum of the error
  input  logic [AW-1:0]                bin_addr,
  output logic signed [DFT_BITS-1:0]   bin_re,
  output logic signed [DFT_BITS-1:0]   bin_im,
  output logic [POW_BITS-1:0]          bin_pow,
  output logic [POW_BITS-1:0]          p_dc,
  output logic [POW_BITS-1:0]          p_fund,
  output logic [POW_BITS-1:0]          p_hd2,
  output logic [POW_BITS-1:0]          p_hd3,
  output logic [NOISE_BITS-1:0]        p_noise
);

  logic                         gen_en, clear, capture, finish;
  logic                         load, last, fit_en;
  logic [LOG_R:0]               duty;
  logic [LOG_NMAX-1:0]          idx;
  logic                         e_valid, e_fit;
  logic signed [ADC_BITS+1:0]   e;
  logic signed [LOG_R+1:0]      x;
  logic [LOG_NMAX-1:0]          e_idx;
  logic                         eval_busy, eval_done;

  bist_ctrl #(.LOG_NMAX(LOG_NMAX)) u_ctrl (
    .clk, .rst_n, .start, .log2n, .settle,
    .load, .last, .e_valid, .eval_busy, .eval_done,
    .gen_en, .clear, .capture, .finish, .busy, .done
  );

  duty_gen #(.LOG_NMAX(LOG_NMAX), .LOG_R(LOG_R)) u_duty (
    .clk, .rst_n, .mode, .log2n,
    .restart (!gen_en),
    .advance (load),
    .duty, .idx, .last, .fit_en
  );

  pwm_gen #(.LOG_R(LOG_R)) u_pwm (
    .clk, .rst_n,
    .en           (gen_en),
    .duty,
    .load,
    .period_start (fs_strobe),
    .pwm          (pwm_out)
  );

  err_extract #(
    .ADC_BITS(ADC_BITS), .LOG_NMAX(LOG_NMAX), .LOG_R(LOG_R), .DELTA_MAX(DELTA_MAX)
  ) u_err (
    .clk, .rst_n, .clear, .load,
    .tag_capture (capture),
    .tag_fit     (fit_en),
    .tag_idx     (idx),
    .tag_h       (duty),
    .adc_valid, .adc_data, .delta,
    .e_valid, .e, .x, .e_idx, .e_fit
  );

  poly_fit #(.ORDER(FIT_ORDER), .E_BITS(ADC_BITS + 2), .X_BITS(LOG_R + 2), .ACC_BITS(FIT_BITS)) u_fit (
    .clk, .rst_n, .clear,
    .s_valid (e_valid),
    .s_fit   (e_fit),
    .e, .x,
    .s_sum   (fit_s),
    .g_sum   (fit_g)
  );

  dft_engine #(
    .E_BITS(ADC_BITS + 2), .LOG_NMAX(LOG_NMAX), .TW_BITS(TW_BITS), .ACC_BITS(DFT_BITS)
  ) u_dft (
    .clk, .rst_n, .clear, .log2n,
    .s_valid (e_valid),
    .e,
    .idx     (e_idx),
    .finish,
    .busy    (eval_busy),
    .done    (eval_done),
    .rd_addr (bin_addr),
    .rd_re   (bin_re),
    .rd_im   (bin_im),
    .rd_pow  (bin_pow),
    .p_dc, .p_fund, .p_hd2, .p_hd3, .p_noise
  );

endmodule
