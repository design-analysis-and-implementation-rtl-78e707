`timescale 1ns / 1ps
// Self-checking testbench of the reference generator model: sweeping the
// supply down from 1.8 V, the output must follow the supply above the first
// threshold (400 mV), be at ground between the thresholds, and follow the
// supply again at and below the second threshold (170 mV): the indication.
module tb_reference_generator;
  import vsense_pkg::*;
  uv_t vdd = 0, vbuf;
  int unsigned checks = 0, failures = 0, indications = 0;
  logic was_low = 0;

  reference_generator dut (.vdd_uv(vdd), .vbuf_uv(vbuf));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int mv = 1800; mv >= 50; mv -= 5) begin
      vdd = uv_t'(mv * 1000);
      #5;
      if (mv > 400)      check(vbuf == vdd, $sformatf("%0d mV: follows", mv));
      else if (mv > 170) check(vbuf == 0,   $sformatf("%0d mV: pulled down", mv));
      else               check(vbuf == vdd, $sformatf("%0d mV: indication", mv));
      if (vbuf == 0) was_low = 1;
      else if (was_low) begin indications++; was_low = 0; end
    end
    check(indications == 1, "one indication pulse per sweep");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
