`timescale 1ns / 1ps
// End-to-end testbench of power_platform at its default parameters.
//
// Part 2 is closed through a model of the off-chip power train written here:
// an ideal buck converter whose output settles towards Vin * PWM_DC / 256 with
// a first-order time constant of 1 us (standing in for the LC filter), and
// which also follows the PWM generator's actual output pulse ratio. Part 1
// gets a stepped unregulated supply and a load that requests configurations.
//
// Mechanisms made to happen and counted (each must occur at least once):
//   cold start (monitoring fails, duty at 250), entry into normal mode,
//   sensing rounds of each sensor, a duty-cycle result above 255 replaced by
//   250, a duty-cycle decrease and increase, regulation to the demanded code
//   (0x35, the document's 1 V case) before and after an input drop from
//   1.8 V to 1.4 V, loss of output and return to cold start, dead-time gaps
//   on both PWM edges, and every one of the four load configurations.
// Checked: each new duty cycle equals floor(old * demanded / measured) (or
// 250) using the code the sensor reported; the PWM high time per period
// equals PWM_DC; no shoot-through; the PMU clock is counter bit 5; the load
// configuration matches the code read; sensor codes follow the
// charge-sharing law.
module tb_power_platform;
  import vsense_pkg::*;

  logic       rst_n = 1, clk_lm = 0, load_req = 0, load_ack, osc = 0;
  uv_t        vdc_uv = 0, v_l_uv = 0;
  logic [7:0] v_demanded = 8'h35, delay = 8'd6;
  fft_cfg_t   load_cfg;
  logic [1:0] load_cfg_idx;
  logic [7:0] load_code, pwm_dc, pwm_count, sensor2_code;
  logic       pwm, p_gate, n_gate, clk_pmu, pmu_normal, sensor2_req, sensor2_ack;
  logic       sensor1_busy, sensor2_busy;
  uv_t        sensor1_vcs_uv, sensor2_vcs_uv, sensor1_vcounter_uv;
  int unsigned sensor1_ncmp, sensor2_ncmp;
  pmu_state_e pmu_state;

  power_platform dut (.*);

  int unsigned checks = 0, failures = 0;
  // mechanism counters
  int unsigned n_cold = 0, n_normal = 0, n_round1 = 0, n_round2 = 0, n_clamp = 0;
  int unsigned n_dec = 0, n_inc = 0, n_dead_rise = 0, n_dead_fall = 0, n_lost = 0;
  int unsigned n_cfg [4] = '{0, 0, 0, 0};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  // ---------------- stimulus clocks ----------------
  always #2  osc    = ~osc;     // self-timed oscillation of the PWM counter
  always #25 clk_lm = ~clk_lm;  // clock of the load manager

  // ---------------- power-train model ----------------
  uv_t vin = 32'd1_800_000;
  int unsigned pwm_hi_win = 0, pwm_win = 0;
  longint target;
  bit short_out = 0;   // output shorted by a load fault
  initial begin
    forever begin
      #10;
      if (short_out) v_l_uv = '0;
      target = (longint'(vin) * pwm_hi_win) / ((pwm_win == 0) ? 1 : pwm_win);
      v_l_uv = uv_t'(longint'(v_l_uv) + (target - longint'(v_l_uv)) / 100);
    end
  end
  // pulse ratio of the PWM output over the last 256 events
  logic [255:0] pwm_hist = '0;
  always @(posedge osc) begin
    pwm_hist = {pwm_hist[254:0], pwm};
    pwm_hi_win = $countones(pwm_hist);
    pwm_win = 256;
  end

  // ---------------- checkers ----------------
  // No shoot-through; dead-time gaps on both edges.
  logic prev_pwm = 0;
  always @(negedge osc) if (rst_n) begin
    checks++;
    if (!p_gate && n_gate) begin failures++; $display("FAIL: shoot-through"); end
    if (p_gate && !n_gate) begin
      if (pwm && !prev_pwm) n_dead_rise++;
      if (!pwm && prev_pwm) n_dead_fall++;
    end
    prev_pwm = pwm;
  end

  // PMU clock is bit 5 of the PWM counter.
  always @(posedge osc) #1 if (rst_n) begin
    checks++;
    if (clk_pmu != pwm_count[5]) begin failures++; $display("FAIL: PMU clock tap"); end
  end

  // PWM high time per period.
  int unsigned hi_cnt = 0;
  bit pwm_state_ok = 0;
  logic [7:0] dc_at_load = 8'd250;
  always @(posedge osc) if (rst_n) begin
    if (pwm) hi_cnt++;
    if (pwm_count == 8'hFF) begin
      if (pwm_state_ok) begin
        checks++;
        if (hi_cnt != dc_at_load) begin
          failures++;
          $display("FAIL: PWM high %0d events, duty cycle %0d", hi_cnt, dc_at_load);
        end
      end
      hi_cnt = 0;
      dc_at_load = pwm_dc;
      pwm_state_ok = 1;
    end
  end

  // Duty-cycle updates against the formula, with the code the sensor sent.
  logic [7:0] last_code2 = 0, prev_dc = 8'd250;
  logic       prev_normal = 0;
  pmu_state_e prev_state = PMU_MON_EN;
  always @(posedge sensor2_ack) begin
    #3;
    last_code2 = sensor2_code;
    n_round2++;
    if (n_round2 < 60) $display("round %0d: code %0d dc %0d v_l %0d uV at %0t", n_round2, last_code2, pwm_dc, v_l_uv, $time);
  end
  always @(posedge clk_pmu) if (rst_n) begin
    #1;
    if (pmu_state == PMU_WAIT_REL && prev_state == PMU_COMPUTE) begin
      int unsigned e;
      e = (last_code2 == 0) ? 256 : (int'(prev_dc) * int'(v_demanded)) / int'(last_code2);
      if (e > 255) begin e = 250; n_clamp++; end
      checks++;
      if (pwm_dc != 8'(e)) begin
        failures++;
        $display("FAIL: duty %0d*%0d/%0d -> %0d, got %0d", prev_dc, v_demanded, last_code2, e, pwm_dc);
      end
      if (pwm_dc < prev_dc) n_dec++;
      if (pwm_dc > prev_dc) n_inc++;
    end
    if (pmu_state == PMU_MON_DIS && prev_state == PMU_MON_RD) begin
      if (!pmu_normal) begin
        n_cold++;
        if (prev_normal) n_lost++;
      end else if (!prev_normal) n_normal++;
      prev_normal = pmu_normal;
    end
    if (pmu_state == PMU_MON_EN && prev_state == PMU_MON_DIS && !pmu_normal) begin
      checks++;
      if (pwm_dc != 8'd250) begin failures++; $display("FAIL: cold start duty"); end
    end
    prev_state = pmu_state;
    prev_dc = pwm_dc;
  end

  // ---------------- part 1: load requests ----------------
  function automatic int unsigned ref_code(input int unsigned uv);
    real v;
    int unsigned n;
    v = real'(uv) / 1.0e6;
    n = 0;
    while (v > 0.170) begin v = v * (1.0 - 0.03288); n++; end
    return n;
  endfunction

  task automatic load_round(input int unsigned mv);
    int unsigned exp_n, exp_idx;
    vdc_uv = uv_t'(mv * 1000);
    #1500;
    @(negedge clk_lm) load_req = 1;
    wait (load_ack);
    #1;
    n_round1++;
    exp_n = ref_code(mv * 1000);
    check(load_code >= exp_n && load_code <= exp_n + 3,
          $sformatf("load sensor %0d mV: code %0d, expected %0d", mv, load_code, exp_n));
    exp_idx = (load_code >= 60) ? 3 : (load_code >= 45) ? 2 : (load_code >= 30) ? 1 : 0;
    check(load_cfg_idx == 2'(exp_idx), "load configuration from code");
    n_cfg[load_cfg_idx]++;
    @(negedge clk_lm) load_req = 0;
    wait (!load_ack);
  endtask

  initial begin
    #2000;
    load_round(500);
    load_round(900);
    load_round(1300);
    load_round(1800);
    load_round(700);
    load_round(250);
  end

  // ---------------- watchdog ----------------
  initial begin
    #3_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- part 2 scenario ----------------
  task automatic wait_rounds(input int unsigned n);
    int unsigned start;
    start = n_round2;
    wait (n_round2 >= start + n);
  endtask

  initial begin
    #1 rst_n = 0;
    #20 rst_n = 1;
    // cold start: output rises from 0 V at 250/256 duty
    wait_rounds(10);
    $display("regulated: dc %0d code %0d v_l_uv %0d uV", pwm_dc, last_code2, v_l_uv);
    check(last_code2 >= 8'h33 && last_code2 <= 8'h37, $sformatf("regulated code %0d", last_code2));
    // demand higher than anything measurable: result above 255 -> 250
    v_demanded = 8'hC0;
    wait_rounds(2);
    v_demanded = 8'h35;
    wait_rounds(10);
    check(last_code2 >= 8'h33 && last_code2 <= 8'h37, "regulated again");
    // input drops from 1.8 V to 1.4 V: output falls, PMU raises the duty cycle
    vin = 32'd1_400_000;
    wait_rounds(10);
    $display("after input drop: dc %0d code %0d v_l_uv %0d uV", pwm_dc, last_code2, v_l_uv);
    check(last_code2 >= 8'h33 && last_code2 <= 8'h37, "regulated after input drop");
    // output lost (shorted while the PMU monitors it): back to cold start
    vin = 32'd1_800_000;
    wait (pmu_state == PMU_MON_EN);
    short_out = 1;
    wait (n_lost > 0);
    #3000;
    short_out = 0;
    wait_rounds(6);
    wait (n_round1 >= 6);
    #1000;
    $display("mechanisms: cold %0d normal %0d rounds1 %0d rounds2 %0d clamp %0d dec %0d inc %0d dead_rise %0d dead_fall %0d lost %0d cfg %0d/%0d/%0d/%0d",
             n_cold, n_normal, n_round1, n_round2, n_clamp, n_dec, n_inc, n_dead_rise,
             n_dead_fall, n_lost, n_cfg[0], n_cfg[1], n_cfg[2], n_cfg[3]);
    check(n_cold > 0, "cold start happened");
    check(n_normal > 0, "normal mode entered");
    check(n_round1 > 0 && n_round2 > 0, "sensing rounds");
    check(n_clamp > 0, "duty-cycle clamp happened");
    check(n_dec > 0 && n_inc > 0, "duty cycle moved both ways");
    check(n_dead_rise > 0 && n_dead_fall > 0, "dead time on both edges");
    check(n_lost > 0, "return to cold start");
    foreach (n_cfg[i]) check(n_cfg[i] > 0, $sformatf("load configuration %0d used", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
