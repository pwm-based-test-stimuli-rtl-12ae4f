// dft_engine: spectrum of the converter error for the sine-wave PWM test.
//
// The sine test drives the converter with a duty cycle that follows one period
// of a sine over N samples and reads gain, offset, harmonic distortion and
// noise from the spectrum of the output. The stimulus is quantised in a fully
// known way, so its own harmonics can be removed exactly: this engine
// transforms the error sequence e_i = Y_i - Y_ideal_i (from err_extract), which
// is the converter's output spectrum with the ideal stimulus spectrum already
// subtracted. Bin 0 carries the offset error, bin 1 the gain error of the
// fundamental, bins 2 and 3 the second and third harmonics, the rest the noise.
//
// How: a running DFT. Each arriving sample e_i (index i, 0 <= i < N) is
// multiplied into every bin k = 0 .. N/2, one bin per clock:
//   X_k += e_i * exp(-j 2 pi k i / N)
// so a sample occupies the engine for N/2 + 1 clocks. The twiddles come from
// a 2^LOG_NMAX-entry sine table of TW_BITS signed bits, scaled by 2^(TW_BITS-2),
// built at elaboration time; the phase k*i is kept modulo N by an adder. With
// the PWM's 256 master clocks per sample and N <= 256 the engine is always
// free again before the next sample (checked by an assertion).
//
// After `finish` the engine makes a summary pass over the bins, one per clock,
// computing |X_k|^2 = re^2 + im^2 and latching
//   p_dc = |X_0|^2, p_fund = |X_1|^2, p_hd2 = |X_2|^2, p_hd3 = |X_3|^2,
//   p_noise = sum over 4 <= k < N/2 of 2|X_k|^2, plus |X_{N/2}|^2,
// then raises `done` until `clear`. `clear` (and reset) start a sweep of
// N_MAX/2 + 1 clocks that zeroes the bins; `busy` is high meanwhile. All powers carry the twiddle scale
// 2^(2*(TW_BITS-2)); the one-sided power of a bin 1 <= k < N/2 is
// 2|X_k|^2 / N^2 times that scale. Any bin can also be read at `rd_addr`.
// N must be at least 8 so that the harmonics do not fold.
//
// The use of the error sequence and the running (one-sample-at-a-time) DFT
// are this design's choices; the method asks for an FFT of the output with
// the known stimulus harmonics subtracted.
module dft_engine
  import bist_pkg::*;
#(
  parameter int unsigned E_BITS   = ADC_BITS_DEF + 2,
  parameter int unsigned LOG_NMAX = LOG_NMAX_DEF,
  parameter int unsigned TW_BITS  = TW_BITS_DEF,
  parameter int unsigned ACC_BITS = 48,
  localparam int unsigned NBINS    = 2 ** (LOG_NMAX - 1) + 1,
  localparam int unsigned AW       = $clog2(NBINS),
  localparam int unsigned POW_BITS = 2 * ACC_BITS,
  localparam int unsigned NOISE_BITS = 2 * ACC_BITS + LOG_NMAX + 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  input  logic [3:0]                   log2n,
  input  logic                         s_valid,
  input  logic signed [E_BITS-1:0]     e,
  input  logic [LOG_NMAX-1:0]          idx,
  input  logic                         finish,
  output logic                         busy,
  output logic                         done,
  // random access to the bins
  input  logic [AW-1:0]                rd_addr,
  output logic signed [ACC_BITS-1:0]   rd_re,
  output logic signed [ACC_BITS-1:0]   rd_im,
  output logic [POW_BITS-1:0]          rd_pow,
  // summary
  output logic [POW_BITS-1:0]          p_dc,
  output logic [POW_BITS-1:0]          p_fund,
  output logic [POW_BITS-1:0]          p_hd2,
  output logic [POW_BITS-1:0]          p_hd3,
  output logic [NOISE_BITS-1:0]        p_noise
);

  localparam int unsigned NMAX = 2 ** LOG_NMAX;

  typedef logic [NMAX*TW_BITS-1:0] table_t;

  // entry j: round(2^(TW_BITS-2) * sin(2*pi*j/NMAX))
  function automatic table_t twiddle_table();
    table_t t;
    longint v;
    begin
      t = '0;
      for (int j = 0; j < int'(NMAX); j++) begin
        v = sin_round(longint'(j), longint'(NMAX), longint'(1) << (TW_BITS - 2));
        t[j*TW_BITS +: TW_BITS] = v[TW_BITS-1:0];
      end
      return t;
    end
  endfunction

  localparam table_t TW = twiddle_table();

  typedef enum logic [2:0] {S_CLR, S_IDLE, S_MAC, S_SUM, S_DONE} state_e;
  state_e state;

  logic signed [ACC_BITS-1:0] re [NBINS];
  logic signed [ACC_BITS-1:0] im [NBINS];

  logic [3:0]               log2n_c;
  logic [AW-1:0]            k_last;       // N/2
  logic [LOG_NMAX-1:0]      step;         // i * NMAX / N
  logic [AW-1:0]            k;
  logic [LOG_NMAX-1:0]      ph;           // k * i * NMAX / N modulo NMAX
  logic [LOG_NMAX-1:0]      step_q;
  logic signed [E_BITS-1:0] e_q;

  always_comb begin
    log2n_c = log2n;
    if (log2n_c > 4'(LOG_NMAX)) log2n_c = 4'(LOG_NMAX);
    if (log2n_c < 4'd3)         log2n_c = 4'd3;
    k_last = AW'((AW+1)'(1) << (log2n_c - 4'd1));
    step   = LOG_NMAX'({idx, {LOG_NMAX{1'b0}}} >> log2n_c);
  end

  logic signed [TW_BITS-1:0] tw_sin, tw_cos;
  logic [LOG_NMAX-1:0]       ph_cos;
  always_comb begin
    ph_cos = ph + LOG_NMAX'(NMAX / 4);
    tw_sin = TW[ph * TW_BITS +: TW_BITS];
    tw_cos = TW[ph_cos * TW_BITS +: TW_BITS];
  end

  logic signed [ACC_BITS-1:0] prod_re, prod_im;
  assign prod_re = ACC_BITS'(e_q) * ACC_BITS'(tw_cos);
  assign prod_im = ACC_BITS'(e_q) * ACC_BITS'(tw_sin);

  // |X_k|^2 of the bin under the summary pointer and of the read port
  function automatic logic [POW_BITS-1:0] power(input logic signed [ACC_BITS-1:0] a,
                                                 input logic signed [ACC_BITS-1:0] b);
    logic signed [POW_BITS-1:0] a2, b2;
    begin
      a2 = POW_BITS'(a) * POW_BITS'(a);
      b2 = POW_BITS'(b) * POW_BITS'(b);
      return POW_BITS'(a2) + POW_BITS'(b2);
    end
  endfunction

  logic [POW_BITS-1:0] pow_k;
  assign pow_k  = power(re[k], im[k]);
  assign rd_re  = re[rd_addr];
  assign rd_im  = im[rd_addr];
  assign rd_pow = power(re[rd_addr], im[rd_addr]);

  assign busy = (state == S_CLR) || (state == S_MAC) || (state == S_SUM);
  assign done = (state == S_DONE);

  // bin memories: one write port, written by the clearing sweep and the MAC
  always_ff @(posedge clk) begin
    if (state == S_CLR) begin
      re[k] <= '0;
      im[k] <= '0;
    end else if (state == S_MAC) begin
      re[k] <= re[k] + prod_re;
      im[k] <= im[k] - prod_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_CLR;
      k       <= '0;
      ph      <= '0;
      step_q  <= '0;
      e_q     <= '0;
      p_dc    <= '0;
      p_fund  <= '0;
      p_hd2   <= '0;
      p_hd3   <= '0;
      p_noise <= '0;
    end else if (clear) begin
      state   <= S_CLR;
      k       <= '0;
      ph      <= '0;
      p_dc    <= '0;
      p_fund  <= '0;
      p_hd2   <= '0;
      p_hd3   <= '0;
      p_noise <= '0;
    end else begin
      unique case (state)
        S_CLR: begin
          if (k == AW'(NBINS - 1)) begin
            state <= S_IDLE;
            k     <= '0;
          end else begin
            k     <= k + 1'b1;
          end
        end
        S_IDLE: begin
          if (s_valid) begin
            state  <= S_MAC;
            e_q    <= e;
            step_q <= step;
            k      <= '0;
            ph     <= '0;
          end else if (finish) begin
            state   <= S_SUM;
            k       <= '0;
            p_noise <= '0;
          end
        end
        S_MAC: begin
          ph    <= ph + step_q;
          if (k == k_last) state <= S_IDLE;
          else             k     <= k + 1'b1;
        end
        S_SUM: begin
          if (k == AW'(0)) p_dc   <= pow_k;
          if (k == AW'(1)) p_fund <= pow_k;
          if (k == AW'(2)) p_hd2  <= pow_k;
          if (k == AW'(3)) p_hd3  <= pow_k;
          if (k >= AW'(4)) begin
            if (k == k_last) p_noise <= p_noise + NOISE_BITS'(pow_k);
            else             p_noise <= p_noise + (NOISE_BITS'(pow_k) << 1);
          end
          if (k == k_last) state <= S_DONE;
          else             k     <= k + 1'b1;
        end
        S_DONE: ;
        default: state <= S_IDLE;
      endcase
    end
  end

  // a new sample must not arrive while the previous one is being transformed
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ;
    else if (!clear) a_no_overrun: assert (!(s_valid && state != S_IDLE));
  end

endmodule
