`timescale 1ns / 1ps
// Self-checking end-to-end testbench of the reference-free voltage sensor.
// For supply voltages from 0.25 V to 1.8 V it runs full four-phase sensing
// rounds and checks: the code equals the number of charge-sharing steps from
// the supply down to the 170 mV indication (computed here in real
// arithmetic), within a small detection latency; codes grow with voltage;
// Ack comes only after the 1 us recharge; the code is stable while Ack is
// high and cleared after the request is withdrawn; the comparator polled.
module tb_voltage_sensor;
  import vsense_pkg::*;
  logic rst_n = 1, req = 0, ack, busy;
  logic [7:0] code;
  uv_t vdd0 = 0, vcs, vcnt;
  int unsigned n_cmp, checks = 0, failures = 0;

  voltage_sensor dut (.rst_n(rst_n), .vdd0_uv(vdd0), .req(req), .ack(ack), .code(code),
                      .busy(busy), .vcs_uv(vcs), .vcounter_uv(vcnt), .n_cmp(n_cmp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mv_list [9] = '{250, 400, 600, 800, 1000, 1200, 1500, 1600, 1800};
    real v;
    int unsigned expect_n, prev_code, t_req, t_stop, cmp0;
    logic [7:0] held;
    prev_code = 0;
    #1 rst_n = 0;
    #10 rst_n = 1;
    foreach (mv_list[k]) begin
      vdd0 = uv_t'(mv_list[k] * 1000);
      #1500;                                  // capacitor charged
      v = real'(mv_list[k]) / 1000.0;
      expect_n = 0;
      while (v > 0.170) begin v = v * (1.0 - 0.03288); expect_n++; end
      cmp0 = n_cmp;
      t_req = $time;
      req = 1;
      #1 check(busy, "counter running after request");
      wait (!busy);
      t_stop = $time;
      #1 check(vcnt == vdd0, "counter outputs at supply (S3)");
      wait (ack);
      check($time - t_stop >= 1000, "Ack after recharge");
      held = code;
      check(code >= expect_n && code <= expect_n + 3,
            $sformatf("%0d mV: code %0d, expected %0d..%0d", mv_list[k], code, expect_n, expect_n + 3));
      check(code >= prev_code, "code grows with voltage");
      check(n_cmp > cmp0, "comparator polled");
      #200 check(code == held, "code held while Ack");
      $display("%0d mV -> code %0d (round %0d ns, %0d comparisons)", mv_list[k], code,
               t_stop - t_req, n_cmp - cmp0);
      prev_code = code;
      req = 0;
      #1 check(!ack, "Ack released");
      check(code == 0, "code cleared while idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
