`timescale 1ns / 1ps
// Dead-time generator between the PWM generator and the power switches of the
// buck converter.
//
// The PWM pulse is passed through a fixed delay line. The high-side PMOS gate
// is the NAND of the pulse and its delayed copy, so the PMOS (on when its gate
// is low) turns on only once both are high and turns off as soon as the pulse
// falls. The low-side NMOS gate is the NOR of the two, so the NMOS turns on
// only once both are low. Each edge of the pulse therefore leaves a gap of
// one delay-line length in which neither switch conducts, and no
// short-circuit path through the power train can form.
//
// Interface: `clk` times the delay line (the PWM generator's oscillation),
// `pwm_in` is the PWM pulse, `p_gate`/`n_gate` drive the PMOS and NMOS power
// switches (the buffer inverters in front of them are omitted; they are an
// even number and do not change polarity). The delay line and the NAND/NOR
// pair follow the document's circuit figure. The text names the NOR for the
// PMOS and the NAND for the NMOS, which would make both switches conduct
// together, so the figure's assignment is used. Building the delay line as
// DEAD_STAGES clocked stages is this design's choice; its length is not
// given.
module dead_time #(
  parameter int unsigned DEAD_STAGES = 2  // at least 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pwm_in,
  output logic p_gate,
  output logic n_gate
);

  logic [DEAD_STAGES-1:0] line;
  logic                   pwm_dly;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) line <= '0;
    else        line <= DEAD_STAGES'({line, pwm_in});
  end

  assign pwm_dly = line[DEAD_STAGES-1];
  assign p_gate  = ~(pwm_in & pwm_dly);
  assign n_gate  = ~(pwm_in | pwm_dly);

endmodule
