`timescale 1ns / 1ps
// Binary counter built from toggle stages: the charge-to-digital converter of
// the reference-free voltage sensor, and the oscillator/counter of the PWM
// generator.
//
// In silicon each stage is a speed-independent toggle cell whose front end and
// back end hand a request/acknowledge pair back and forth; the acknowledge of
// stage i+1 is its feedback and the complemented output of stage i is the
// request of stage i+1, so bit i+1 changes once for every two changes of bit
// i. Stage 0 closes its own loop and therefore runs on its own for as long as
// its supply allows; here that self-timed loop is the `osc` input, one rising
// edge per completed toggle of stage 0. Every later stage toggles when the
// previous bit falls, which gives an ordinary binary up-count.
//
// Interface: `run` high lets `osc` events reach stage 0; when `run` is low the
// stages hold their value (the sensor latches its code this way). `clr_n` low
// clears all stages asynchronously. `count` is the binary code, bit 0 the
// fastest.
//
// Timing: bit i is a ripple-generated clock for bit i+1, as in the document's
// structure; `count` settles WIDTH stage delays after an `osc` edge. WIDTH=8
// follows the 8-bit code of the sensor and C[7:0] of the PWM generator; the
// clear input and the run gate are choices of this design.
module toggle_counter #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             osc,    // completed toggle of stage 0's self-timed loop
  input  logic             run,    // supply/enable of the counter
  input  logic             clr_n,  // asynchronous clear, active low
  output logic [WIDTH-1:0] count
);

  logic [WIDTH-1:0] trig;

  assign trig[0] = osc & run;
  for (genvar i = 1; i < WIDTH; i++) begin : g_chain
    assign trig[i] = ~count[i-1];   // bit i toggles when bit i-1 falls
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    toggle_stage u_stage (
      .trig  (trig[i]),
      .clr_n (clr_n),
      .q     (count[i])
    );
  end

endmodule
