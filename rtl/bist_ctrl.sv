// bist_ctrl: sequencer of one PWM self-test run.
//
// A run repeats the stimulus sequence of N samples continuously, so that the
// converter's filters reach a steady state, and evaluates one of the
// repetitions:
//   S_IDLE    waits for `start`.
//   S_START   one cycle: `clear` empties the evaluation, the generator is idle.
//   S_SETTLE  the stimulus runs `settle` full sequences that are not evaluated
//             (settle = 0 skips this state).
//   S_CAPTURE the next full sequence is tagged for capture (`capture` high
//             while its periods are loaded).
//   S_DRAIN   the stimulus keeps running while the N error samples of the
//             captured sequence come back through the converter's latency;
//             the state ends when all N have arrived and the spectrum engine
//             is idle.
//   S_FINISH  one-cycle `finish` starts the spectrum summary.
//   S_WAIT    waits for the summary to end.
//   S_DONE    `done` is high and the stimulus stops until the next `start`.
//
// Interface: `load` and `last` come from the PWM generator and the duty
// sequence (`last` = the period being loaded is index N-1); `gen_en` enables
// both; `clear` is a one-cycle pulse after `start`, before `gen_en` rises. A run takes
// (settle + 1) * N sample periods for the stimulus, plus the converter's
// latency, plus N/2 + 2 clocks for the summary.
//
// The settling repetitions and the handshake are this design's choices; the
// method only states that a sequence of N samples is applied and evaluated.
module bist_ctrl
  import bist_pkg::*;
#(
  parameter int unsigned LOG_NMAX = LOG_NMAX_DEF
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [3:0] log2n,
  input  logic [3:0] settle,        // unevaluated sequences before the capture
  input  logic       load,
  input  logic       last,
  input  logic       e_valid,       // an error sample of the capture arrived
  input  logic       eval_busy,     // spectrum engine working
  input  logic       eval_done,     // spectrum summary finished
  output logic       gen_en,
  output logic       clear,
  output logic       capture,
  output logic       finish,
  output logic       busy,
  output logic       done
);

  typedef enum logic [3:0] {
    S_IDLE, S_START, S_SETTLE, S_CAPTURE, S_DRAIN, S_FINISH, S_WAIT, S_DONE
  } state_e;

  state_e            state;
  logic [3:0]        seq_cnt;
  logic [LOG_NMAX:0] got;       // error samples received
  logic [LOG_NMAX:0] n_val;
  logic [3:0]        log2n_c;

  always_comb begin
    log2n_c = log2n;
    if (log2n_c > 4'(LOG_NMAX)) log2n_c = 4'(LOG_NMAX);
    if (log2n_c == 4'd0)        log2n_c = 4'd1;
    n_val = (LOG_NMAX+1)'(1) << log2n_c;
  end

  assign gen_en  = (state == S_SETTLE) || (state == S_CAPTURE) || (state == S_DRAIN)
                || (state == S_FINISH) || (state == S_WAIT);
  assign capture = (state == S_CAPTURE);
  assign finish  = (state == S_FINISH);
  assign busy    = (state != S_IDLE) && (state != S_DONE);
  assign done    = (state == S_DONE);
  assign clear   = (state == S_START);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      seq_cnt <= '0;
      got     <= '0;
    end else begin
      if (start && !busy) begin
        state   <= S_START;
        seq_cnt <= '0;
        got     <= '0;
      end else begin
        if (e_valid && (state == S_CAPTURE || state == S_DRAIN)) got <= got + 1'b1;
        unique case (state)
          S_START:
            state <= (settle == 4'd0) ? S_CAPTURE : S_SETTLE;
          S_SETTLE:
            if (load && last) begin
              seq_cnt <= seq_cnt + 1'b1;
              if (seq_cnt + 1'b1 == settle) state <= S_CAPTURE;
            end
          S_CAPTURE:
            if (load && last) state <= S_DRAIN;
          S_DRAIN:
            if (got == n_val && !eval_busy) state <= S_FINISH;
          S_FINISH:
            state <= S_WAIT;
          S_WAIT:
            if (eval_done) state <= S_DONE;
          default: ;
        endcase
      end
    end
  end

endmodule
