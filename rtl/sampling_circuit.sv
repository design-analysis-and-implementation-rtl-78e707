`timescale 1ns / 1ps
// Behavioural model (not synthesizable): sampling capacitor C_sample of the
// reference-free voltage sensor with its switches S1, S2 and S3, together
// with the self-timed oscillation of the counter that it powers.
//
// With S1 closed the capacitor charges towards the sensed supply with a time
// constant of CHARGE_TAU_NS and reports `cs_charged` once S1 has been closed
// for T_CHARGE_NS (the document: under a microsecond for 10 pF, so at least
// 1 us between rounds). With S1 open and S2 closed the capacitor is the
// counter's supply. The counter's stage 0 then completes one toggle every
// PERIOD_1V_NS * (1 V / V) nanoseconds, emitted as a one-nanosecond pulse on
// `osc`, and each toggle takes a fixed share, DROP_PPM parts per million, of
// the capacitor voltage: charge sharing with the switched parasitic
// capacitance, as in the document's circuit model of a capacitor discharged by
// switching logic. Below VMIN_UV (140 mV in the document) the counter stops.
// S3 connects the counter to the supply to hold its code at full level.
//
// Interface: voltages in microvolts. `vcs_uv` is the capacitor voltage (the
// reference generator's supply and the comparator's second input), `vcnt_uv`
// the counter supply. Time advances in 1 ns steps.
//
// The switch roles, the charging time and the minimum counting voltage follow
// the document. The geometric per-toggle voltage loss, the inverse speed law
// and their constants are this model's choices. With the defaults a round
// started at 1.0 V counts about 53 before the voltage reaches 170 mV, and a
// round at 1.8 V about 70.
module sampling_circuit
  import vsense_pkg::*;
#(
  parameter int unsigned T_CHARGE_NS   = 1000,
  parameter int unsigned CHARGE_TAU_NS = 64,
  parameter int unsigned PERIOD_1V_NS  = 10,
  parameter int unsigned DROP_PPM      = 32880,
  parameter uv_t         VMIN_UV       = 32'd140_000
) (
  input  uv_t  vdd0_uv,
  input  logic s1_close,
  input  logic s2_close,
  input  logic s3_close,
  output uv_t  vcs_uv,
  output uv_t  vcnt_uv,
  output logic osc,
  output logic cs_charged
);

  longint unsigned acc;
  int unsigned     timer;
  longint          v;
  uv_t             vcs_q;
  logic            osc_q;
  logic            charged_q;

  initial begin
    acc       = 0;
    timer     = 0;
    v         = 0;
    vcs_q     = '0;
    osc_q     = 1'b0;
    charged_q = 1'b0;
  end

  // One nanosecond per pass.
  always begin
    #1;
    osc_q = 1'b0;
    v     = longint'(vcs_q);
    if (s1_close && !s2_close) begin
      // Charging through S1: first-order approach to the supply.
      v = v + (longint'(vdd0_uv) - v) / longint'(CHARGE_TAU_NS);
      if ((longint'(vdd0_uv) - v) < longint'(CHARGE_TAU_NS) &&
          (v - longint'(vdd0_uv)) < longint'(CHARGE_TAU_NS))
        v = longint'(vdd0_uv);
      if (timer < T_CHARGE_NS) timer++;
      acc = 0;
    end else begin
      timer = 0;
      if (s2_close && v > longint'(VMIN_UV)) begin
        // Counting: event rate proportional to the capacitor voltage.
        acc += longint'(v);
        if (acc >= longint'(PERIOD_1V_NS) * 1_000_000) begin
          acc  -= longint'(PERIOD_1V_NS) * 1_000_000;
          osc_q = 1'b1;
          v     = v - (v * longint'(DROP_PPM)) / 1_000_000;
        end
      end
    end
    vcs_q     = uv_t'(v);
    charged_q = (timer >= T_CHARGE_NS);
  end

  assign vcs_uv     = vcs_q;
  assign osc        = osc_q;
  assign cs_charged = charged_q;
  assign vcnt_uv = s3_close ? vdd0_uv : (s2_close ? vcs_uv : '0);

endmodule
