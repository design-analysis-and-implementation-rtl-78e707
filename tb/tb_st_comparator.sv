`timescale 1ns / 1ps
// Self-checking testbench of the self-timed comparator model: outputs held
// high in reset; once enabled it polls by itself (Vo1 or Vo2 pulses low each
// round); Q follows the winner; equal inputs are won by Vi1.
module tb_st_comparator;
  import vsense_pkg::*;
  logic en = 0, q, qn, vo1, vo2, clock;
  uv_t vi1 = 0, vi2 = 0;
  int unsigned n_cmp, checks = 0, failures = 0, vo1_pulses = 0, vo2_pulses = 0;

  st_comparator dut (.en(en), .vi1_uv(vi1), .vi2_uv(vi2), .q(q), .qn(qn), .vo1(vo1),
                     .vo2(vo2), .clock(clock), .n_cmp(n_cmp));

  always @(negedge vo1) vo1_pulses++;
  always @(negedge vo2) vo2_pulses++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned n_before;
    #10;
    check(q && !qn && vo1 && vo2 && clock, "reset state");
    vi1 = 500_000; vi2 = 500_000;       // equal: Vi1 wins
    en = 1;
    #100;
    check(q == 1, "equal inputs: Vi1 wins");
    check(vo1_pulses >= 10 && vo2_pulses == 0, "Vo1 oscillates");
    vi1 = 0;                             // between thresholds: Vi2 wins
    #50;
    check(q == 0 && qn == 1, "Vi2 larger: Q low");
    n_before = vo2_pulses;
    #100;
    check(vo2_pulses >= n_before + 10, "Vo2 oscillates");
    vi1 = 160_000; vi2 = 160_000;        // after the indication
    #20;
    check(q == 1, "indication: Q high");
    for (int i = 0; i < 50; i++) begin
      vi1 = uv_t'($urandom_range(0, 1_000_000));
      vi2 = uv_t'($urandom_range(0, 1_000_000));
      #20;
      check(q == (vi1 + 10_000 > vi2), "random comparison");
    end
    n_before = n_cmp;
    en = 0;
    #20;
    check(q && vo1 && vo2 && clock, "reset again");
    #50 check(n_cmp == n_before, "no polling in reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
