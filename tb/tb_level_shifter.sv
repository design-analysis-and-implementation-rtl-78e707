`timescale 1ns / 1ps
// Self-checking testbench of the level shifter model: 0 while disabled; when
// enabled, 1 only for inputs above the ~100 mV margin, resolved within a few
// nanoseconds.
module tb_level_shifter;
  import vsense_pkg::*;
  logic en = 0, vo;
  uv_t vin = 0;
  int unsigned checks = 0, failures = 0;

  level_shifter dut (.en(en), .vin_uv(vin), .vo(vo));

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
    for (int i = 0; i < 200; i++) begin
      en  = ($urandom_range(0, 3) != 0);
      vin = uv_t'($urandom_range(0, 1_800_000));
      if (i < 4) vin = (i[0]) ? 32'd1_000_000 : 32'd50_000;
      #5;
      check(vo == (en && vin > 100_000), $sformatf("en %0b vin %0d uV -> %0b", en, vin, vo));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
