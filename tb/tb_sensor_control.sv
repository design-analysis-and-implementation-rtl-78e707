`timescale 1ns / 1ps
// Self-checking testbench of sensor_control. The testbench drives the
// comparator output and the capacitor-charged flag by hand and checks the
// document's sequence: idle S1 closed / S2 open; request -> S1 open, S2 closed,
// comparator and counter enabled; Q falling changes nothing; Q rising stops
// the round, closes S1 and S3; Ack only once the capacitor is recharged; Ack
// and S3 drop when the request is withdrawn; the counter is cleared while no
// request is pending.
module tb_sensor_control;
  logic rst_n = 1, req = 0, cmp_q = 1, cs_charged = 1;
  logic s1, s2, s3, run, clr_n, cmp_en, ack;
  int unsigned checks = 0, failures = 0;

  sensor_control dut (.rst_n(rst_n), .req(req), .cmp_q(cmp_q), .cs_charged(cs_charged),
                      .s1_close(s1), .s2_close(s2), .s3_close(s3), .counter_run(run),
                      .counter_clr_n(clr_n), .cmp_en(cmp_en), .ack(ack));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  // The comparator is held in reset (Q high) while not enabled.
  always @(negedge cmp_en) cmp_q = 1;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    #10 rst_n = 1;
    for (int r = 0; r < 10; r++) begin
      #10;
      check(s1 && !s2 && !s3 && !run && !cmp_en && !ack, "idle switches");
      check(!clr_n, "counter cleared while idle");
      req = 1;
      #1;
      check(!s1 && s2 && run && cmp_en && !ack && clr_n, "sensing started");
      cs_charged = 0;
      #($urandom_range(5, 50));
      cmp_q = 0;                       // first threshold passed
      #1 check(!s1 && s2 && run, "Q falling keeps sensing");
      // a few polls with Q low
      repeat ($urandom_range(0, 3)) begin #3 cmp_q = 0; end
      #($urandom_range(5, 50));
      cmp_q = 1;                       // indication pulse
      #1;
      check(s1 && !s2 && !run && s3 && !cmp_en, "stopped, S1 and S3 closed");
      check(!ack, "no Ack before recharge");
      #($urandom_range(5, 30));
      cs_charged = 1;
      #1 check(ack, "Ack after recharge");
      check(clr_n, "code held while Ack");
      #($urandom_range(5, 30));
      req = 0;
      #1 check(!ack && !s3, "Ack and S3 released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
