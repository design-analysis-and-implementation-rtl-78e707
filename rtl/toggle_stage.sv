`timescale 1ns / 1ps
// One stage of the toggle counter: a toggle flip-flop.
//
// The stage changes state on every rising edge of `trig` and is cleared
// asynchronously by `clr_n`. In the counter, stage 0 is triggered by the
// self-timed oscillation and every later stage by the complement of the stage
// before it, which mirrors the document's chaining of the complemented
// output of one toggle cell into the request of the next.
module toggle_stage (
  input  logic trig,
  input  logic clr_n,
  output logic q
);

  always_ff @(posedge trig or negedge clr_n) begin
    if (!clr_n) q <= 1'b0;
    else        q <= ~q;
  end

endmodule
