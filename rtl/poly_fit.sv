// poly_fit: least-squares sums for the polynomial fit of the converter error
// (linear PWM test).
//
// The linear test models the converter error as a polynomial in the duty
// cycle plus zero-mean noise, by default a cubic,
//   e(x) ~ c0 + c1 x + c2 x^2 + c3 x^3,
// and estimates the coefficients by polynomial regression over the samples of
// one ramp. The least-squares coefficients solve the normal equations
//   sum_j G[j+k] * c_j = S[k],   j, k = 0..ORDER,
// with S[k] = sum e * x^k and G[m] = sum x^m (m = 0..2*ORDER, G[0] the sample
// count). This module accumulates the sums S[0..ORDER] and G[0..2*ORDER]
// (eleven for the cubic) as the error samples arrive; solving the small
// symmetric system (and turning c2, c3 into second and third harmonic
// distortion) is left to whoever reads them. x is the centred duty
// 2h - PWM_R from err_extract, which keeps the powers small and the system
// well conditioned; eta = (x + PWM_R) / (2 PWM_R).
//
// Timing: one sample per clock at most; a sample counts when `s_valid` and
// `s_fit` are both high, and its terms are added at that clock edge. `clear`
// zeroes every sum. Sums are ACC_BITS wide two's complement; the default 64
// bits hold 256 samples of a 22-bit error times x^3, and of x^6 (x up to 2^8
// in magnitude), with room to spare. A higher ORDER needs a wider ACC_BITS:
// about max(E_BITS + ORDER*(X_BITS-2), 2*ORDER*(X_BITS-2) + 1) + log2(N) + 1.
//
// The third-order regression follows the test method, which also allows a
// higher order (the ORDER parameter); accumulating normal-equation sums on
// chip, rather than solving the system too, is this design's choice.
module poly_fit
  import bist_pkg::*;
#(
  parameter int unsigned ORDER    = 3,
  parameter int unsigned E_BITS   = ADC_BITS_DEF + 2,
  parameter int unsigned X_BITS   = LOG_R_DEF + 2,
  parameter int unsigned ACC_BITS = 64
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       s_valid,
  input  logic                       s_fit,
  input  logic signed [E_BITS-1:0]   e,
  input  logic signed [X_BITS-1:0]   x,
  output logic signed [ACC_BITS-1:0] s_sum [ORDER+1],     // sum e * x^k
  output logic signed [ACC_BITS-1:0] g_sum [2*ORDER+1]    // sum x^m
);

  localparam int unsigned NS = ORDER + 1;
  localparam int unsigned NG = 2 * ORDER + 1;

  logic signed [ACC_BITS-1:0] xp [NG];   // x^0 .. x^(2*ORDER)
  logic signed [ACC_BITS-1:0] ex;

  always_comb begin
    ex    = ACC_BITS'(e);
    xp[0] = ACC_BITS'(1);
    for (int m = 1; m < NG; m++) xp[m] = xp[m-1] * ACC_BITS'(x);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NS; k++) s_sum[k] <= '0;
      for (int m = 0; m < NG; m++) g_sum[m] <= '0;
    end else if (clear) begin
      for (int k = 0; k < NS; k++) s_sum[k] <= '0;
      for (int m = 0; m < NG; m++) g_sum[m] <= '0;
    end else if (s_valid && s_fit) begin
      for (int k = 0; k < NS; k++) s_sum[k] <= s_sum[k] + ex * xp[k];
      for (int m = 0; m < NG; m++) g_sum[m] <= g_sum[m] + xp[m];
    end
  end

endmodule
