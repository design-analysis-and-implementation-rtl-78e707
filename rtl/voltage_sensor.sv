`timescale 1ns / 1ps
// Reference-free voltage sensor: converts the voltage of a supply into a
// digital code without any voltage or timing reference.
//
// A sensing round samples the supply into a small capacitor, disconnects the
// capacitor from the supply and lets it power an asynchronous toggle counter.
// The counter runs as fast as the falling capacitor voltage allows and spends
// a small share of the stored charge on every count, so the count it reaches
// grows with the energy sampled, and with it the sensed voltage. A reference
// generator, supplied by the same capacitor, produces an indication pulse
// when the capacitor reaches about 170 mV, just above the voltage at which
// the counter would lose its state. A self-timed comparator detects the
// pulse and the controlling unit stops the counter, which holds its code,
// recharges the capacitor and acknowledges.
//
// Interface: `req`/`ack` four-phase handshake; `code` is valid while `ack` is
// high and is cleared while `req` is low. `vdd0_uv` is the sensed supply in
// microvolts, which also supplies the controlling unit and the comparator.
// `busy` is high while the counter runs; `vcs_uv`/`vcounter_uv` show the
// capacitor and counter supply; `n_cmp` counts comparator decisions.
//
// The structure follows the document: sampling circuit (S1, S2, S3 and the
// capacitor), counter, reference generator, comparator and controlling unit.
// The counter and the controlling unit are synthesizable; the sampling
// circuit, reference generator and comparator are behavioural models of
// analog circuits.
module voltage_sensor
  import vsense_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic             rst_n,
  input  uv_t              vdd0_uv,
  input  logic             req,
  output logic             ack,
  output logic [WIDTH-1:0] code,
  output logic             busy,
  output uv_t              vcs_uv,      // sampling capacitor voltage
  output uv_t              vcounter_uv, // counter supply
  output int unsigned      n_cmp
);

  logic s1_close, s2_close, s3_close;
  logic counter_run, counter_clr_n, cmp_en, cmp_q;
  logic cs_charged, osc;
  logic unused_qn, unused_vo1, unused_vo2, unused_clock;
  uv_t  vrg_uv;

  sampling_circuit u_sampling (
    .vdd0_uv    (vdd0_uv),
    .s1_close   (s1_close),
    .s2_close   (s2_close),
    .s3_close   (s3_close),
    .vcs_uv     (vcs_uv),
    .vcnt_uv    (vcounter_uv),
    .osc        (osc),
    .cs_charged (cs_charged)
  );

  reference_generator u_rg (
    .vdd_uv  (vcs_uv),
    .vbuf_uv (vrg_uv)
  );

  st_comparator u_cmp (
    .en     (cmp_en),
    .vi1_uv (vrg_uv),
    .vi2_uv (vcs_uv),
    .q      (cmp_q),
    .qn     (unused_qn),
    .vo1    (unused_vo1),
    .vo2    (unused_vo2),
    .clock  (unused_clock),
    .n_cmp  (n_cmp)
  );

  sensor_control u_ctrl (
    .rst_n         (rst_n),
    .req           (req),
    .cmp_q         (cmp_q),
    .cs_charged    (cs_charged),
    .s1_close      (s1_close),
    .s2_close      (s2_close),
    .s3_close      (s3_close),
    .counter_run   (counter_run),
    .counter_clr_n (counter_clr_n),
    .cmp_en        (cmp_en),
    .ack           (ack)
  );

  toggle_counter #(.WIDTH(WIDTH)) u_counter (
    .osc   (osc),
    .run   (counter_run),
    .clr_n (counter_clr_n),
    .count (code)
  );

  assign busy = counter_run;

endmodule
