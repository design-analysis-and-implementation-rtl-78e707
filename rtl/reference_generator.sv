`timescale 1ns / 1ps
// Behavioural model (not synthesizable): reference generator (RG) of the
// reference-free voltage sensor.
//
// In silicon a voltage divider and a buffer pair, both supplied from the
// discharging sampling capacitor, produce a "soft" reference from transistor
// thresholds. Above the first threshold the buffer output follows the
// supply. Between the first and the second threshold the pull-down wins and
// the output is at ground. Below the second threshold both buffer transistors
// are off, the output is pulled back up to the supply, and this rise is the
// indication pulse that tells the comparator to stop the round.
//
// Interface: `vdd_uv` the RG supply (capacitor voltage), `vbuf_uv` its output,
// both in microvolts, with a response delay of T_RESP_NS. The shape of the
// response and the 170 mV second threshold follow the document. The first
// threshold is not given as a number; 400 mV is this model's choice, above the
// 250 mV lowest supply at which the sensor works.
module reference_generator
  import vsense_pkg::*;
#(
  parameter uv_t         VTH1_UV   = 32'd400_000,
  parameter uv_t         VTH2_UV   = 32'd170_000,
  parameter int unsigned T_RESP_NS = 1
) (
  input  uv_t vdd_uv,
  output uv_t vbuf_uv
);

  uv_t vbuf_now;

  always_comb begin
    if (vdd_uv > VTH1_UV)      vbuf_now = vdd_uv;   // before first threshold
    else if (vdd_uv > VTH2_UV) vbuf_now = '0;       // pulled down by N_Buf
    else                       vbuf_now = vdd_uv;   // indication: pulled up again
  end

  assign #(T_RESP_NS) vbuf_uv = vbuf_now;

endmodule
