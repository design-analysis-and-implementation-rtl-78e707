`timescale 1ns / 1ps
// Behavioural model (not synthesizable): voltage level shifter between the
// power domains of the buck converter, built from a zero-bias current
// comparator.
//
// One comparator input is tied to ground on the wider of the two input
// transistors, so the other input must exceed ground by a margin xi before it
// wins: the comparator then acts as a level detector that turns any voltage
// above xi into a logic 1 of the controller's domain. While `en` is low the
// internal nodes are precharged and the output, taken through an inverter, is
// 0.
//
// Interface: `vin_uv` the input in microvolts, `vo` the result, valid
// T_RES_NS after `en` rises or the input changes. The grounded input, the
// enable and the output inverter follow the document and its circuit figure;
// xi is "slightly above 100 mV" there, so XI_UV = 100 mV. The resolution time
// is this model's choice.
module level_shifter
  import vsense_pkg::*;
#(
  parameter uv_t         XI_UV    = 32'd100_000,
  parameter int unsigned T_RES_NS = 2
) (
  input  logic en,
  input  uv_t  vin_uv,
  output logic vo
);

  logic decision;
  assign decision = en && (vin_uv > XI_UV);
  assign #(T_RES_NS) vo = decision;

endmodule
