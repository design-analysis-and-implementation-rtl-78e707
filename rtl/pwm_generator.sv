`timescale 1ns / 1ps
// Asynchronous PWM generator of the buck converter; also the clock source of
// the PMU.
//
// A free-running toggle counter C counts the events of its own self-timed
// oscillation, whose rate follows the supply voltage, so no clock or voltage
// reference is needed. Each time C wraps to zero a load pulse resets the PWM
// output (R of the output latch) and loads a second, loadable down-counter Q
// with 256-PWM_DC. When Q reaches zero it sets the output (S). C wraps again
// PWM_DC events later, so the output is low for 256-PWM_DC events and high
// for PWM_DC events of every 256. One bit of C, C[CLK_TAP], is also the PMU
// clock: the document picks C[5] as the fastest tap that stays below the
// PMU's worst-case clock limit.
//
// Interface: `osc` is one rising edge per stage-0 toggle of the counter,
// `pwm_dc` the duty cycle in 1/256 steps (0 gives a constant low output), `pwm`
// the output pulse, `clk_pmu` the derived clock and `c` the counter state.
// Timing: `pwm_dc` is sampled at each load, so a new value takes effect at
// the next period boundary.
//
// The two counters, the S/R output and the tap follow the document. Holding
// the duty cycle for a whole period and the synchronous form of the
// loadable counter are this design's choices.
module pwm_generator #(
  parameter int unsigned WIDTH   = 8,
  parameter int unsigned CLK_TAP = 5
) (
  input  logic             osc,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] pwm_dc,
  output logic             pwm,
  output logic             clk_pmu,
  output logic [WIDTH-1:0] c
);

  logic [WIDTH-1:0] q;
  logic             load_en;

  toggle_counter #(.WIDTH(WIDTH)) u_c (
    .osc   (osc),
    .run   (1'b1),
    .clr_n (rst_n),
    .count (c)
  );

  // C is about to wrap to zero on this event.
  assign load_en = (c == '1);

  always_ff @(posedge osc or negedge rst_n) begin
    if (!rst_n) begin
      q   <= '0;
      pwm <= 1'b0;
    end else if (load_en) begin
      q   <= WIDTH'(-pwm_dc);     // 2**WIDTH - PWM_DC
      pwm <= 1'b0;                // R
    end else if (q != '0) begin
      q <= q - 1'b1;
      if (q == WIDTH'(1)) pwm <= 1'b1;  // S
    end
  end

  assign clk_pmu = c[CLK_TAP];

endmodule
