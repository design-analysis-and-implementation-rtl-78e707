`timescale 1ns / 1ps
// Self-checking testbench of pwm_generator: for several duty-cycle values the
// output must be high for exactly PWM_DC of every 256 oscillation events and
// low for the rest, with its period starting when the counter wraps, and the
// PMU clock tap C[5] must have a period of 64 events.
module tb_pwm_generator;
  logic osc = 0, rst_n = 0, pwm, clk_pmu;
  logic [7:0] pwm_dc = 8'd250, c;
  int unsigned checks = 0, failures = 0;

  pwm_generator dut (.osc(osc), .rst_n(rst_n), .pwm_dc(pwm_dc), .pwm(pwm),
                     .clk_pmu(clk_pmu), .c(c));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step();
    #2 osc = 1; #2 osc = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned high, first_high, pmu_rises;
    logic prev_clk;
    logic [7:0] dcs [7] = '{8'd250, 8'd240, 8'd174, 8'd146, 8'd1, 8'd0, 8'd255};
    #3 rst_n = 1;
    foreach (dcs[k]) begin
      pwm_dc = dcs[k];
      // Finish the current period, then measure one whole period.
      while (c != 8'hFF) step();
      step();   // wrap: new duty cycle loaded
      high = (pwm ? 1 : 0);
      first_high = 0;
      pmu_rises = 0;
      prev_clk = clk_pmu;
      for (int e = 1; e < 256; e++) begin
        step();
        if (pwm) begin
          high++;
          if (first_high == 0) first_high = e;
        end
        if (clk_pmu && !prev_clk) pmu_rises++;
        prev_clk = clk_pmu;
      end
      check(high == dcs[k], $sformatf("dc %0d: high for %0d events", dcs[k], high));
      if (dcs[k] != 0)
        check(first_high == 256 - dcs[k], $sformatf("dc %0d: rise at event %0d", dcs[k], first_high));
      check(pmu_rises == 4, $sformatf("PMU clock rises per period %0d", pmu_rises));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
