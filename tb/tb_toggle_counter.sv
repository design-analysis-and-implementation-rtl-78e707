`timescale 1ns / 1ps
// Self-checking testbench of toggle_counter: pulses on `osc` must advance the
// binary count by one each while `run` is high, be ignored while it is low,
// and `clr_n` must clear the count. The expected count is kept by the
// testbench as an integer modulo 2**WIDTH.
module tb_toggle_counter;
  localparam int unsigned WIDTH = 8;
  logic osc = 0, run = 0, clr_n = 0;
  logic [WIDTH-1:0] count;
  int unsigned checks = 0, failures = 0;
  int unsigned expected = 0;

  toggle_counter #(.WIDTH(WIDTH)) dut (.osc(osc), .run(run), .clr_n(clr_n), .count(count));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse();
    #2 osc = 1; #2 osc = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5 clr_n = 1;
    #5;
    check(count == 0, "clear");
    run = 1;
    for (int n = 0; n < 600; n++) begin
      pulse();
      expected = (expected + 1) % (1 << WIDTH);
      #1;
      check(count == WIDTH'(expected), $sformatf("count %0d expected %0d", count, expected));
    end
    // Stopped counter holds its code.
    run = 0;
    repeat (20) pulse();
    #1 check(count == WIDTH'(expected), "hold while run low");
    // Random bursts.
    run = 1;
    for (int k = 0; k < 10; k++) begin
      int unsigned n = $urandom_range(1, 40);
      repeat (n) pulse();
      expected = (expected + n) % (1 << WIDTH);
      #1 check(count == WIDTH'(expected), "burst");
    end
    clr_n = 0;
    #1 check(count == 0, "clear after counting");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
