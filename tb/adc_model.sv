// adc_model: behavioural model of the sigma-delta converter under test, for
// simulation only (not synthesizable).
//
// It reproduces what the PWM test relies on: the converter returns the
// average of its binary input over each sample period. The model counts the
// high cycles h of every PWM period (periods are delimited by `fs_strobe`),
// forms the ideal n-bit two's complement code
//   Y_ideal = h * 2^(n - LOG_R) - 2^(n-1)
// and adds a known static error, a cubic in u = 2*eta - 1 (eta = h / 2^LOG_R),
//   err(u) = a0 + a1*u + a2*u^2 + a3*u^3   [LSB]
// plus uniform integer noise of +-noise_lsb, rounds and clips to n bits. The
// word of period p is delivered in period p + 1 + delta, with `adc_valid`
// high for one clock at the middle of the period.
//
// For the testbenches it records, per period since the last restart(), the
// measured high time (h_rec), the output word (y_rec) and the error it put in
// (e_rec = Y - Y_ideal). The error coefficients and noise are variables that
// a testbench sets directly.
module adc_model #(
  parameter int ADC_BITS = 20,
  parameter int LOG_R    = 8
) (
  input  logic                       clk,
  input  logic                       fs_strobe,
  input  logic                       pwm,
  input  int                         delta,
  output logic                       adc_valid,
  output logic signed [ADC_BITS-1:0] adc_data
);

  localparam int R = 2 ** LOG_R;

  real a0 = 0.0, a1 = 0.0, a2 = 0.0, a3 = 0.0;
  int  noise_lsb = 0;

  int  pcount = 0;        // periods started since restart()
  int  acc    = 0;
  int  phase  = 0;
  bit  in_period = 1'b0;
  int  h_rec [int];
  int  y_rec [int];
  int  e_rec [int];

  initial begin
    adc_valid = 1'b0;
    adc_data  = '0;
  end

  function automatic void restart();
    pcount    = 0;
    acc       = 0;
    phase     = 0;
    in_period = 1'b0;
    h_rec.delete();
    y_rec.delete();
    e_rec.delete();
  endfunction

  function automatic void finalize(input int p, input int h);
    real    u, err;
    longint ideal, y;
    int     nz;
    u     = 2.0 * real'(h) / real'(R) - 1.0;
    err   = a0 + a1 * u + a2 * u * u + a3 * u * u * u;
    nz    = (noise_lsb > 0) ? int'($urandom_range(2 * noise_lsb)) - noise_lsb : 0;
    ideal = (longint'(h) <<< (ADC_BITS - LOG_R)) - (longint'(1) <<< (ADC_BITS - 1));
    y     = ideal + longint'($rtoi(err + ((err >= 0.0) ? 0.5 : -0.5))) + longint'(nz);
    if (y > (longint'(1) <<< (ADC_BITS - 1)) - 1) y = (longint'(1) <<< (ADC_BITS - 1)) - 1;
    if (y < -(longint'(1) <<< (ADC_BITS - 1)))    y = -(longint'(1) <<< (ADC_BITS - 1));
    h_rec[p] = h;
    y_rec[p] = int'(y);
    e_rec[p] = int'(y - ideal);
  endfunction

  always @(posedge clk) begin
    int p;
    adc_valid <= 1'b0;
    if (fs_strobe) begin
      if (in_period) finalize(pcount - 1, acc);
      acc       = int'(pwm);
      in_period = 1'b1;
      pcount    = pcount + 1;
      phase     = 0;
    end else if (in_period) begin
      acc   = acc + int'(pwm);
      phase = phase + 1;
    end
    if (in_period && phase == R / 2) begin
      p = pcount - 2 - delta;
      if (p >= 0 && y_rec.exists(p)) begin
        adc_valid <= 1'b1;
        adc_data  <= ADC_BITS'(y_rec[p]);
      end
    end
  end

endmodule
