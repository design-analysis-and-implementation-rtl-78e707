`timescale 1ns / 1ps
// Energy-aware power platform for an energy-harvesting system, built around
// two reference-free voltage sensors.
//
// Part 1 (computational load): a voltage sensor reads the unregulated supply
// `vdc_uv` of a load that tolerates voltage variation; the load manager turns
// each reading into one of four FFT configurations, on request of the load.
//
// Part 2 (controllable supply): a buck-converter controller. The PWM
// generator's self-timed counter, stepped by `osc`, produces the PWM pulse and
// the PMU clock (bit 5 of the counter). The PMU starts in cold start at the
// maximum duty cycle, watches the converter output `v_l_uv` through a level
// detector, and then repeatedly asks, through the delay-line counter, for a
// sensing round of the second sensor, which is supplied by the converter
// output itself. It reads the code and the load's demanded code through level
// shifters and sets the duty cycle to current * demanded / measured. The
// dead-time stage turns the PWM pulse into non-overlapping gate signals for
// the PMOS and NMOS power switches.
//
// Interface: voltages in microvolts come from the analog world (harvester
// storage, converter output); `p_gate`/`n_gate` go to the off-chip power
// train, whose inductor and capacitor close the loop. Digital handshakes and
// codes as described in the modules below. The power train, harvester,
// storage, protection/start-up and the FFT load are not part of this RTL.
module power_platform
  import vsense_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic       rst_n,
  // part 1: computational load
  input  logic       clk_lm,
  input  uv_t        vdc_uv,
  input  logic       load_req,
  output logic       load_ack,
  output fft_cfg_t   load_cfg,
  output logic [1:0] load_cfg_idx,
  output logic [7:0] load_code,
  // part 2: buck converter controller
  input  logic       osc,
  input  uv_t        v_l_uv,
  input  logic [7:0] v_demanded,
  input  logic [7:0] delay,
  output logic       pwm,
  output logic       p_gate,
  output logic       n_gate,
  output logic [7:0] pwm_dc,
  output logic       clk_pmu,
  output pmu_state_e pmu_state,
  output logic       pmu_normal,
  output logic       sensor2_req,
  output logic       sensor2_ack,
  output logic [7:0] sensor2_code,
  output logic [7:0] pwm_count,
  // observation of both sensors
  output logic       sensor1_busy,
  output logic       sensor2_busy,
  output uv_t        sensor1_vcs_uv,
  output uv_t        sensor2_vcs_uv,
  output uv_t        sensor1_vcounter_uv,
  output int unsigned sensor1_ncmp,
  output int unsigned sensor2_ncmp
);

  // ---------------- part 1 ----------------
  logic             s1_req, s1_ack;
  logic [WIDTH-1:0] s1_code;

  voltage_sensor #(.WIDTH(WIDTH)) u_sensor_load (
    .rst_n   (rst_n),
    .vdd0_uv (vdc_uv),
    .req     (s1_req),
    .ack     (s1_ack),
    .code    (s1_code),
    .busy    (sensor1_busy),
    .vcs_uv      (sensor1_vcs_uv),
    .vcounter_uv (sensor1_vcounter_uv),
    .n_cmp   (sensor1_ncmp)
  );

  load_manager u_load_manager (
    .clk         (clk_lm),
    .rst_n       (rst_n),
    .load_req    (load_req),
    .load_ack    (load_ack),
    .sensor_req  (s1_req),
    .sensor_ack  (s1_ack),
    .sensor_code (8'(s1_code)),
    .cfg_idx     (load_cfg_idx),
    .cfg         (load_cfg),
    .code_q      (load_code)
  );

  // ---------------- part 2 ----------------
  logic             counter_en, ls_reading, ov_reading, ack_sense_en;
  logic             ov_detect, ack_ls;
  logic [7:0]       meas_ls, dem_ls;
  logic [WIDTH-1:0] s2_code;

  assign sensor2_code = 8'(s2_code);
  uv_t              s2_vcnt;

  pwm_generator #(.WIDTH(WIDTH), .CLK_TAP(5)) u_pwm (
    .osc     (osc),
    .rst_n   (rst_n),
    .pwm_dc  (WIDTH'(pwm_dc)),
    .pwm     (pwm),
    .clk_pmu (clk_pmu),
    .c       (pwm_count)
  );

  dead_time u_dead_time (
    .clk    (osc),
    .rst_n  (rst_n),
    .pwm_in (pwm),
    .p_gate (p_gate),
    .n_gate (n_gate)
  );

  pmu u_pmu (
    .clk                    (clk_pmu),
    .rst_n                  (rst_n),
    .v_measured             (meas_ls),
    .v_demanded             (dem_ls),
    .ack                    (ack_ls),
    .output_voltage         (ov_detect),
    .counter_en             (counter_en),
    .level_shifters_reading (ls_reading),
    .output_voltage_reading (ov_reading),
    .ack_sense_en           (ack_sense_en),
    .pwm_dc                 (pwm_dc),
    .state                  (pmu_state),
    .normal_mode            (pmu_normal)
  );

  delay_counter u_delay (
    .clk   (clk_pmu),
    .rst_n (rst_n),
    .en    (counter_en),
    .delay (delay),
    .req   (sensor2_req)
  );

  voltage_sensor #(.WIDTH(WIDTH)) u_sensor_out (
    .rst_n   (rst_n),
    .vdd0_uv (v_l_uv),
    .req     (sensor2_req),
    .ack     (sensor2_ack),
    .code    (s2_code),
    .busy    (sensor2_busy),
    .vcs_uv      (sensor2_vcs_uv),
    .vcounter_uv (s2_vcnt),
    .n_cmp   (sensor2_ncmp)
  );

  // Level shifters from the converter-output domain into the PMU domain.
  // A logic 1 of that domain is the converter output voltage itself.
  // The counter outputs of the second sensor are driven to its supply by S3.
  level_shifter u_ls_ov (
    .en (ov_reading), .vin_uv (v_l_uv), .vo (ov_detect)
  );
  level_shifter u_ls_ack (
    .en (ack_sense_en), .vin_uv (sensor2_ack ? v_l_uv : '0), .vo (ack_ls)
  );
  for (genvar i = 0; i < 8; i++) begin : g_ls
    level_shifter u_ls_meas (
      .en (ls_reading), .vin_uv (s2_code[i] ? s2_vcnt : '0), .vo (meas_ls[i])
    );
    level_shifter u_ls_dem (
      .en (ls_reading), .vin_uv (v_demanded[i] ? v_l_uv : '0), .vo (dem_ls[i])
    );
  end

endmodule
