`timescale 1ns / 1ps
// Self-checking testbench of the buck-converter PMU. A small environment plays
// the output-voltage detector, the delay line plus sensor (Ack some cycles
// after counter_en) and the level-shifted codes. It checks:
//  - reset and cold start give the maximum duty cycle 250 (0xFA) and the
//    three-stage monitoring (enable, read, disable) repeats while the output
//    is low;
//  - the document's case study: demanded 0x35, measured 0x4C from 250 gives
//    0xAE, then measured 0x3F gives 0x92;
//  - a result above 255 is replaced by 250, and a drop of the output
//    detector returns to cold start;
//  - every computed duty cycle equals floor(dc*dem/meas), worked out here;
//  - the number of clock cycles from Ack to the new duty cycle.
module tb_pmu;
  import vsense_pkg::*;
  logic clk = 0, rst_n = 0, ack = 0, output_voltage = 0;
  logic [7:0] v_measured = 0, v_demanded = 0;
  logic counter_en, lsr, ovr, ack_sense_en, normal_mode;
  logic [7:0] pwm_dc;
  pmu_state_e state;
  int unsigned checks = 0, failures = 0;

  pmu dut (.clk(clk), .rst_n(rst_n), .v_measured(v_measured), .v_demanded(v_demanded),
           .ack(ack), .output_voltage(output_voltage), .counter_en(counter_en),
           .level_shifters_reading(lsr), .output_voltage_reading(ovr),
           .ack_sense_en(ack_sense_en), .pwm_dc(pwm_dc), .state(state),
           .normal_mode(normal_mode));

  always #40 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  // One sensing round seen from the PMU: wait for counter_en, answer with Ack
  // after `lat` cycles, check the result and release Ack.
  task automatic round(input logic [7:0] meas, input logic [7:0] dem, input int unsigned lat);
    int unsigned expected, cycles;
    logic [7:0] dc_before;
    while (!counter_en) @(posedge clk);
    dc_before = pwm_dc;
    repeat (lat) @(negedge clk);
    v_measured = meas;
    v_demanded = dem;
    ack = 1;
    expected = (meas == 0) ? 256 : (int'(dc_before) * int'(dem)) / int'(meas);
    if (expected > 255) expected = 250;
    cycles = 0;
    // level shifters must be enabled while the codes are read
    do begin
      @(posedge clk); #1; cycles++;
    end while (counter_en && cycles < 50);
    check(pwm_dc == 8'(expected), $sformatf("dc %0d*%0d/%0d -> %0d, got %0d",
          dc_before, dem, meas, expected, pwm_dc));
    check(cycles == 5, $sformatf("Ack to new duty cycle in %0d cycles", cycles));
    @(negedge clk) ack = 0;
  endtask

  initial begin
    #400000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The data level shifters must be enabled whenever the PMU is sampling.
  always @(posedge clk) if (rst_n && state == PMU_RD_RD) begin
    checks++;
    if (!lsr) begin failures++; $display("FAIL: read without level shifters enabled"); end
  end

  initial begin
    int unsigned mon_rounds;
    repeat (2) @(negedge clk);
    check(pwm_dc == 8'd250, "reset duty cycle 250");
    rst_n = 1;
    // Cold start: output low, monitoring repeats, no request.
    mon_rounds = 0;
    repeat (30) begin
      @(posedge clk); #1;
      if (ovr && state == PMU_MON_RD) mon_rounds++;
      check(!counter_en, "no request during cold start");
    end
    check(mon_rounds >= 8, $sformatf("monitoring repeated %0d times", mon_rounds));
    check(pwm_dc == 8'd250, "cold start duty cycle");
    output_voltage = 1;
    // Case study of the document.
    round(8'd2,    8'h35, 3);   // 250*53/2 > 255 -> 250
    check(pwm_dc == 8'd250, "clamp to 250");
    round(8'h4C, 8'h35, 4);
    check(pwm_dc == 8'hAE, "case study 0xAE");
    round(8'h3F, 8'h35, 2);
    check(pwm_dc == 8'h92, "case study 0x92");
    round(8'h35, 8'h35, 6);
    check(pwm_dc == 8'h92, "on target, unchanged");
    round(8'h2A, 8'h35, 3);
    round(8'h35, 8'h35, 3);
    for (int i = 0; i < 20; i++)
      round(8'($urandom_range(1, 255)), 8'($urandom_range(0, 255)), $urandom_range(1, 8));
    // Output lost: back to cold start at the maximum duty cycle.
    round(8'h10, 8'h08, 2);
    output_voltage = 0;
    repeat (10) @(posedge clk);
    #1 check(pwm_dc == 8'd250 && !normal_mode, "return to cold start");
    check(!counter_en, "no request after output loss");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
