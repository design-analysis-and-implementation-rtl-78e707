`timescale 1ns / 1ps
// Self-checking testbench of the sampling circuit model. For several supply
// voltages it checks that the capacitor reaches the supply and reports
// "charged" only after the 1 us charging time, and that with S2 closed the
// number of counter events until 170 mV matches the charge-sharing law
// V(k+1) = V(k)*(1-DROP_PPM/1e6), computed here in real arithmetic (within
// one count); that the events speed up with voltage; that counting stops near
// 140 mV; and that S3 puts the supply on the counter.
module tb_sampling_circuit;
  import vsense_pkg::*;
  uv_t vdd0 = 0, vcs, vcnt;
  logic s1 = 0, s2 = 0, s3 = 0, osc, charged;
  int unsigned checks = 0, failures = 0, events = 0;

  sampling_circuit dut (.vdd0_uv(vdd0), .s1_close(s1), .s2_close(s2), .s3_close(s3),
                        .vcs_uv(vcs), .vcnt_uv(vcnt), .osc(osc), .cs_charged(charged));

  always @(posedge osc) events++;

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
    int mv_list [5] = '{1800, 1000, 600, 300, 250};
    real v, p;
    int unsigned expect_n, n170, t0, t_first;
    p = 32880.0 / 1.0e6;
    foreach (mv_list[k]) begin
      vdd0 = uv_t'(mv_list[k] * 1000);
      s2 = 0; s3 = 0; s1 = 1;
      #900;
      check(!charged, "not charged before 1 us");
      #150;
      check(charged, "charged after 1 us");
      check(vcs == vdd0, $sformatf("capacitor at supply %0d", vcs));
      // reference count down to 170 mV
      v = real'(mv_list[k]) / 1000.0;
      expect_n = 0;
      while (v > 0.170) begin v = v * (1.0 - p); expect_n++; end
      s1 = 0;
      #1 s2 = 1;
      events = 0;
      t0 = $time;
      wait (events == 1);
      t_first = $time - t0;
      check(t_first <= 10 * 1000 / mv_list[k] + 2 && t_first + 2 >= 10 * 1000 / mv_list[k],
            $sformatf("first event after %0d ns at %0d mV", t_first, mv_list[k]));
      wait (vcs <= 170_000);
      n170 = events;
      check(n170 + 1 >= expect_n && n170 <= expect_n + 1,
            $sformatf("%0d mV: %0d events to 170 mV, expected %0d", mv_list[k], n170, expect_n));
      #3000;
      check(vcs > 130_000 && vcs <= 140_000, $sformatf("counting stops near 140 mV (%0d)", vcs));
      s2 = 0; s3 = 1;
      #1 check(vcnt == vdd0, "S3 connects counter to supply");
      s3 = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
