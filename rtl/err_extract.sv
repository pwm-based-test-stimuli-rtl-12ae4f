// err_extract: pairs each ADC output word with the stimulus that produced it
// and forms the converter's error sample.
//
// A converter driven by a PWM period of duty cycle eta = h / PWM_R ideally
// returns the code
//   Y_ideal = 2^n * eta - 2^(n-1) = h * 2^(n-LOG_R) - 2^(n-1)
// (n-bit two's complement, VrefL at the most negative code, VrefH one step
// above the most positive). The error sample is e = Y - Y_ideal, i.e. the
// converter error of the method scaled to LSBs, with the unknown constant of
// the pulse edges folded into its offset.
//
// Alignment: the module keeps the tag (capture flag, fit flag, index i, high
// time h) of the running PWM period and of the last DELTA_MAX+1 completed
// ones. `load` marks the edge at which a new period begins; `tag_*` is the
// tag of that new period (the values the PWM generator loads). A word flagged by `adc_valid` belongs to the period that ended
// `delta` periods before the most recent period boundary: delta = 0 means the
// word arrives during the period right after its own. `adc_valid` must not
// fall in a `load` cycle. Only tags flagged for capture give an output.
//
// Output: `e_valid` pulses one cycle after `adc_valid` with e, the centred
// duty x = 2h - PWM_R (so eta = (x + PWM_R) / (2 PWM_R)), the index i and the
// fit flag.
//
// Latency is run-time programmable because the method leaves it to the
// converter (mostly the decimator's delay); the two's complement code and the
// period-based latency count are this design's choices.
module err_extract
  import bist_pkg::*;
#(
  parameter int unsigned ADC_BITS  = ADC_BITS_DEF,
  parameter int unsigned LOG_NMAX  = LOG_NMAX_DEF,
  parameter int unsigned LOG_R     = LOG_R_DEF,
  parameter int unsigned DELTA_MAX = DELTA_MAX_DEF
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,         // forget all stored tags
  // tag of the period that begins at this `load` edge
  input  logic                       load,
  input  logic                       tag_capture,
  input  logic                       tag_fit,
  input  logic [LOG_NMAX-1:0]        tag_idx,
  input  logic [LOG_R:0]             tag_h,
  // converter output
  input  logic                       adc_valid,
  input  logic signed [ADC_BITS-1:0] adc_data,
  input  logic [$clog2(DELTA_MAX+1)-1:0] delta,
  // error sample
  output logic                       e_valid,
  output logic signed [ADC_BITS+1:0] e,
  output logic signed [LOG_R+1:0]    x,
  output logic [LOG_NMAX-1:0]        e_idx,
  output logic                       e_fit
);

  localparam int unsigned DEPTH = DELTA_MAX + 1;

  logic                 c_cap, c_fit;        // running period
  logic [LOG_NMAX-1:0]  c_idx;
  logic [LOG_R:0]       c_h;
  logic [DEPTH-1:0]     h_cap, h_fit;        // completed periods, newest at 0
  logic [LOG_NMAX-1:0]  h_idx [DEPTH];
  logic [LOG_R:0]       h_h   [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_cap <= 1'b0;
      c_fit <= 1'b0;
      c_idx <= '0;
      c_h   <= '0;
      h_cap <= '0;
      h_fit <= '0;
      for (int k = 0; k < int'(DEPTH); k++) begin
        h_idx[k] <= '0;
        h_h[k]   <= '0;
      end
    end else if (clear) begin
      c_cap <= 1'b0;
      h_cap <= '0;
      h_fit <= '0;
    end else if (load) begin
      c_cap <= tag_capture;
      c_fit <= tag_fit;
      c_idx <= tag_idx;
      c_h   <= tag_h;
      h_cap <= {h_cap[DEPTH-2:0], c_cap};
      h_fit <= {h_fit[DEPTH-2:0], c_fit};
      h_idx[0] <= c_idx;
      h_h[0]   <= c_h;
      for (int k = 1; k < int'(DEPTH); k++) begin
        h_idx[k] <= h_idx[k-1];
        h_h[k]   <= h_h[k-1];
      end
    end
  end

  // ideal code of the selected tag
  logic [LOG_R:0]              sel_h;
  logic signed [ADC_BITS+1:0]  y_ideal;
  logic signed [ADC_BITS+1:0]  y_ext;
  logic [$clog2(DELTA_MAX+1)-1:0] d_c;

  always_comb begin
    d_c     = (int'(delta) > int'(DELTA_MAX)) ? ($clog2(DELTA_MAX+1))'(DELTA_MAX) : delta;
    sel_h   = h_h[d_c];
    y_ideal = ((ADC_BITS+2)'(sel_h) <<< (ADC_BITS - LOG_R))
            - ((ADC_BITS+2)'(1) <<< (ADC_BITS - 1));
    y_ext   = (ADC_BITS+2)'(adc_data);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_valid <= 1'b0;
      e       <= '0;
      x       <= '0;
      e_idx   <= '0;
      e_fit   <= 1'b0;
    end else begin
      e_valid <= adc_valid && !clear && h_cap[d_c];
      if (adc_valid) begin
        e     <= y_ext - y_ideal;
        x     <= $signed({sel_h, 1'b0} - (LOG_R+2)'(2 ** LOG_R));
        e_idx <= h_idx[d_c];
        e_fit <= h_fit[d_c];
      end
    end
  end

  // the alignment needs the word and the period boundary in different cycles
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ;
    else a_valid_not_on_load: assert (!(adc_valid && load));
  end

endmodule
