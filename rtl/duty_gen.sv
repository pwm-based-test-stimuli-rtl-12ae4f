// duty_gen: duty-cycle sequence of the PWM test stimulus.
//
// Steps through the sample index i = 0 .. N-1 of a test sequence, one step per
// `advance` pulse (one per ADC sample period), wrapping back to 0 so that the
// sequence repeats as long as the test runs. For the current index it presents
// the PWM high time h, in master-clock cycles out of PWM_R = 2^LOG_R per
// sample period, so that the duty cycle is eta = h / PWM_R:
//   MODE_RAMP      h = i * PWM_R / N                      (eta = i/N)
//   MODE_TRIANGLE  h = 2*i * PWM_R / N      for i <= N/2
//                  h = 2*(N-i) * PWM_R / N  for i >  N/2
//   MODE_SINE      h = PWM_R/2 + round(PWM_R/2 * sin(2*pi*i/N))
// N = 2^log2n is chosen at run time, 2 <= N <= 2^LOG_NMAX.
//
// The linear ramp and the sine follow the test method; the triangle is this
// design's reading of the "triangular" stimulus named among the measured
// results (up and down within one sequence of N samples). The sine values come
// from a 2^LOG_NMAX-entry table built at elaboration time and read at index
// i * 2^LOG_NMAX / N. `fit_en` is low for the zero-duty sample (i = 0) of the
// ramp and the triangle: the polynomial fit of the linear test uses the N-1
// samples 0 < i < N only.
//
// Timing: `duty`, `idx`, `last` and `fit_en` are combinational from the index
// register. `restart` sets the index to 0; `advance` moves it on at the clock
// edge, so the value shown in the cycle of `advance` belongs to the index
// being left (that is the value the PWM generator loads).
module duty_gen
  import bist_pkg::*;
#(
  parameter int unsigned LOG_NMAX = LOG_NMAX_DEF,
  parameter int unsigned LOG_R    = LOG_R_DEF
) (
  input  logic                clk,
  input  logic                rst_n,
  input  mode_e               mode,
  input  logic [3:0]          log2n,     // N = 2^log2n, 1 <= log2n <= LOG_NMAX
  input  logic                restart,
  input  logic                advance,
  output logic [LOG_R:0]      duty,      // high time h, 0 .. 2^LOG_R
  output logic [LOG_NMAX-1:0] idx,       // current sample index i
  output logic                last,      // i == N-1
  output logic                fit_en     // sample takes part in the polynomial fit
);

  localparam int unsigned NMAX = 2 ** LOG_NMAX;
  localparam int unsigned R    = 2 ** LOG_R;

  typedef logic [NMAX*(LOG_R+1)-1:0] table_t;

  // entry j: R/2 + round(R/2 * sin(2*pi*j/NMAX)), LOG_R+1 bits per entry
  function automatic table_t sine_table();
    table_t t;
    longint v;
    begin
      t = '0;
      for (int j = 0; j < int'(NMAX); j++) begin
        v = longint'(R) / 2 + sin_round(longint'(j), longint'(NMAX), longint'(R) / 2);
        t[j*(LOG_R+1) +: LOG_R+1] = v[LOG_R:0];
      end
      return t;
    end
  endfunction

  localparam table_t SINE = sine_table();

  logic [LOG_NMAX-1:0] i_q;
  logic [LOG_NMAX:0]   n_val;     // N
  logic [LOG_NMAX-1:0] n_last;    // N-1
  logic [3:0]          log2n_c;   // clamped to 1 .. LOG_NMAX

  always_comb begin
    log2n_c = log2n;
    if (log2n_c > 4'(LOG_NMAX)) log2n_c = 4'(LOG_NMAX);
    if (log2n_c == 4'd0)        log2n_c = 4'd1;
    n_val  = (LOG_NMAX+1)'(1) << log2n_c;
    n_last = LOG_NMAX'(n_val - 1'b1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       i_q <= '0;
    else if (restart)                 i_q <= '0;
    else if (advance)                 i_q <= (i_q == n_last) ? '0 : i_q + 1'b1;
  end

  // h = (i * R) / N for the ramp, (2*i*R)/N or (2*(N-i)*R)/N for the triangle.
  logic [LOG_NMAX+LOG_R+1:0] scaled;
  logic [LOG_NMAX:0]         tri_pos;
  logic [LOG_NMAX-1:0]       tab_idx;

  always_comb begin
    duty    = '0;
    scaled  = '0;
    tri_pos = '0;
    tab_idx = LOG_NMAX'({i_q, {LOG_NMAX{1'b0}}} >> log2n_c);   // i * NMAX / N
    unique case (mode)
      MODE_RAMP: begin
        scaled = (LOG_NMAX+LOG_R+2)'(i_q) << LOG_R;
        duty   = (LOG_R+1)'(scaled >> log2n_c);
      end
      MODE_TRIANGLE: begin
        // position along the triangle, 0 .. N, counted in half-steps of N/2
        tri_pos = ({1'b0, i_q} <= (n_val >> 1)) ? (LOG_NMAX+1)'(i_q) << 1
                                               : (n_val - (LOG_NMAX+1)'(i_q)) << 1;
        scaled  = (LOG_NMAX+LOG_R+2)'(tri_pos) << LOG_R;
        duty    = (LOG_R+1)'(scaled >> log2n_c);
      end
      MODE_SINE: duty = SINE[tab_idx*(LOG_R+1) +: LOG_R+1];
      default:   duty = '0;
    endcase
  end

  assign idx    = i_q;
  assign last   = (i_q == n_last);
  assign fit_en = (mode == MODE_SINE) || (i_q != '0);

endmodule
