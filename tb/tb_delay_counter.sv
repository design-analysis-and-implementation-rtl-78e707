`timescale 1ns / 1ps
// Self-checking testbench of delay_counter: for several load values the
// request must rise exactly delay+1 clock edges after `en` is seen high, stay
// high while `en` stays high, and fall on the first edge with `en` low.
module tb_delay_counter;
  logic clk = 0, rst_n = 0, en = 0, req;
  logic [7:0] delay = 0;
  int unsigned checks = 0, failures = 0;

  delay_counter dut (.clk(clk), .rst_n(rst_n), .en(en), .delay(delay), .req(req));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned d, edges;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      d = (t < 4) ? t : $urandom_range(0, 60);
      delay = 8'(d);
      repeat (2) @(negedge clk);
      en = 1;
      edges = 0;
      do begin
        @(posedge clk); #1; edges++;
      end while (!req && edges < 300);
      check(edges == d + 1, $sformatf("delay %0d: req after %0d edges", d, edges));
      repeat (5) @(posedge clk);
      #1 check(req == 1'b1, "req held while en");
      @(negedge clk) en = 0;
      @(posedge clk); #1;
      check(req == 1'b0, "req released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
