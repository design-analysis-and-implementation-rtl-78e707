`timescale 1ns / 1ps
// Adjustable delay line of the buck-converter controller, built as a loadable
// counter.
//
// After the PMU changes the duty cycle the converter output needs time to
// settle before it is measured again. The PMU therefore does not request a
// sensing round directly: it raises `en`, this counter counts down the
// loaded delay in PMU clock cycles, and only then raises `req` to the voltage
// sensor. `req` stays high until `en` falls, which keeps the sensor's
// four-phase handshake intact.
//
// Interface: `delay` is the load value, tuned to the off-chip LC filter; it
// is sampled while `en` is low. Timing: `req` rises on the (delay+1)-th rising
// clock edge that sees `en` high and falls on the first edge that sees `en`
// low. The document gives the role of the counter and its enable; its width
// and the exact count are this design's choices.
module delay_counter #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] delay,
  output logic             req
);

  logic [WIDTH-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      req <= 1'b0;
    end else if (!en) begin
      cnt <= delay;
      req <= 1'b0;
    end else if (cnt != '0) begin
      cnt <= cnt - 1'b1;
    end else begin
      req <= 1'b1;
    end
  end

endmodule
