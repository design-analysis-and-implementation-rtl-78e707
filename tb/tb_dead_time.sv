`timescale 1ns / 1ps
// Self-checking testbench of dead_time: with a random PWM input the two gate
// signals must never turn both power switches on (PMOS on = p_gate low, NMOS
// on = n_gate high), must match a reference built from the testbench's own
// delayed copy of the input, and each input edge must produce a gap of
// DEAD_STAGES clocks with both switches off.
module tb_dead_time;
  localparam int unsigned D = 2;
  logic clk = 0, rst_n = 0, pwm_in = 0, p_gate, n_gate;
  logic [D-1:0] hist = '0;
  int unsigned checks = 0, failures = 0, both_off = 0, edges = 0;

  dead_time #(.DEAD_STAGES(D)) dut (.clk(clk), .rst_n(rst_n), .pwm_in(pwm_in),
                                    .p_gate(p_gate), .n_gate(n_gate));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic dly;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 5) == 0) begin pwm_in = ~pwm_in; edges++; end
      #1;
      dly = hist[D-1];
      check(!(p_gate == 1'b0 && n_gate == 1'b1), "shoot-through");
      check(p_gate == !(pwm_in && dly), "p_gate");
      check(n_gate == !(pwm_in || dly), "n_gate");
      if (p_gate && !n_gate) both_off++;
      @(posedge clk);
      hist = {hist[D-2:0], pwm_in};
    end
    check(both_off >= D, "dead time observed");
    check(edges > 100, "enough edges");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
