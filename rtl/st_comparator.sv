`timescale 1ns / 1ps
// Behavioural model (not synthesizable): self-timed dynamic comparator of the
// reference-free voltage sensor.
//
// A clocked dynamic latch comparator is made into a free-running one by
// putting it in front of a toggle-logic back end: the result of each
// comparison produces the clock of the next. While `en` (the document's Reset
// input) is low, Q, Clock, Vo1 and Vo2 are held high. Once it is high the
// comparator evaluates: if Vi1 wins, Vo1 pulses low and sets Q; if Vi2 wins,
// Vo2 pulses low and clears Q. The low Clock that follows ends the evaluation,
// Vo1 and Vo2 return high, Clock rises again and the next comparison starts.
// Transistor M1 is wider than M2, so Vi1 wins when the inputs are equal;
// ADV_UV models that advantage.
//
// Interface: `vi1_uv` (reference generator output) and `vi2_uv` (capacitor
// voltage) in microvolts; `q`/`qn` the latched decision; `vo1`, `vo2`,
// `clock` the internal handshake signals; `n_cmp` counts comparisons (each
// one costs energy, which is why the document calls this polling). Timing: one
// comparison every T_EVAL_NS + 2 ns. The sequence of signals follows the
// document; the timing constants and the size of the advantage are this
// model's choices.
module st_comparator
  import vsense_pkg::*;
#(
  parameter int unsigned T_EVAL_NS = 3,
  parameter uv_t         ADV_UV    = 32'd10_000
) (
  input  logic        en,
  input  uv_t         vi1_uv,
  input  uv_t         vi2_uv,
  output logic        q,
  output logic        qn,
  output logic        vo1,
  output logic        vo2,
  output logic        clock,
  output int unsigned n_cmp
);

  logic        q_r, vo1_r, vo2_r, clock_r;
  int unsigned n_r;

  initial n_r = 0;

  always begin
    if (!en) begin
      // Reset: Q, Clock, Vo1 and Vo2 held high.
      q_r     = 1'b1;
      vo1_r   = 1'b1;
      vo2_r   = 1'b1;
      clock_r = 1'b1;
      wait (en);
    end else begin
      #(T_EVAL_NS);               // evaluation while Clock is high
      if (en) begin
        n_r++;
        if (longint'(vi1_uv) + longint'(ADV_UV) > longint'(vi2_uv)) begin
          vo1_r = 1'b0;           // Vi1 wins: falling Vo1 sets Q
          q_r   = 1'b1;
        end else begin
          vo2_r = 1'b0;           // Vi2 wins: falling Vo2 clears Q
          q_r   = 1'b0;
        end
        clock_r = 1'b0;           // ends the evaluation
        #1;
        vo1_r = 1'b1;
        vo2_r = 1'b1;
        #1;
        clock_r = 1'b1;           // next comparison
      end
    end
  end

  assign q     = q_r;
  assign qn    = ~q_r;
  assign vo1   = vo1_r;
  assign vo2   = vo2_r;
  assign clock = clock_r;
  assign n_cmp = n_r;

endmodule
