// pwm_gen: synchronous pulse-width modulator for the ADC test stimulus.
//
// One PWM period lasts exactly one ADC sample period, PWM_R = 2^LOG_R master
// clock cycles, so the pulse train is synchronous with the converter's sample
// rate. A period starts high and stays high for h cycles, h taken from `duty`
// (0 .. PWM_R; h = 0 is low for the whole period, h = PWM_R high for the whole
// period); the duty cycle is eta = h / PWM_R. The two output levels are the
// converter's own references, switched by a 1-bit DAC outside this module.
//
// Timing: while `en` is low the counter rests and the output is low. In the
// first cycle with `en` high, and then in the last cycle of every period,
// `load` is high: `duty` is taken at that clock edge for the period that
// starts with it, and the duty source should move on to its next value at the
// same edge. `pwm` is a register output, aligned with the period counter:
// in the period's cycle c (0 .. PWM_R-1) it is high when c < h.
// `period_start` marks cycle 0 of every period.
//
// Left-aligned pulses and the one-cycle `load` handshake are this design's
// choices; the method only asks for a binary waveform at the sample rate with
// a duty cycle that changes every sample.
module pwm_gen
  import bist_pkg::*;
#(
  parameter int unsigned LOG_R = LOG_R_DEF
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic [LOG_R:0] duty,          // high time h in master clocks
  output logic           load,          // duty is taken at this edge
  output logic           period_start,  // cycle 0 of a period
  output logic           pwm
);

  logic             running;
  logic [LOG_R-1:0] cnt;
  logic [LOG_R:0]   h_q;

  assign load         = en && (!running || cnt == '1);
  assign period_start = running && cnt == '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      cnt     <= '0;
      h_q     <= '0;
      pwm     <= 1'b0;
    end else if (!en) begin
      running <= 1'b0;
      cnt     <= '0;
      h_q     <= '0;
      pwm     <= 1'b0;
    end else if (load) begin
      running <= 1'b1;
      cnt     <= '0;
      h_q     <= duty;
      pwm     <= (duty != '0);
    end else begin
      cnt     <= cnt + 1'b1;
      pwm     <= ({1'b0, cnt} + 1'b1) < h_q;
    end
  end

endmodule
