`timescale 1ns / 1ps
// Self-checking testbench of load_manager. The testbench plays both the load
// (four-phase load_req/load_ack) and the voltage sensor (Ack a random time
// after its request, with a code). For codes on and around every threshold it
// checks the selected configuration index and the FFT size and precision the
// document lists for it, and that each handshake completes in order.
module tb_load_manager;
  import vsense_pkg::*;
  logic clk = 0, rst_n = 0, load_req = 0, load_ack, sensor_req, sensor_ack = 0;
  logic [7:0] sensor_code = 0, code_q;
  logic [1:0] cfg_idx;
  fft_cfg_t cfg;
  int unsigned checks = 0, failures = 0;
  int unsigned seen [4] = '{0, 0, 0, 0};

  load_manager dut (.clk(clk), .rst_n(rst_n), .load_req(load_req), .load_ack(load_ack),
                    .sensor_req(sensor_req), .sensor_ack(sensor_ack), .sensor_code(sensor_code),
                    .cfg_idx(cfg_idx), .cfg(cfg), .code_q(code_q));

  always #10 clk = ~clk;

  // Sensor side.
  always begin
    wait (sensor_req);
    repeat ($urandom_range(1, 10)) @(negedge clk);
    sensor_ack = 1;
    wait (!sensor_req);
    repeat ($urandom_range(1, 5)) @(negedge clk);
    sensor_ack = 0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic request(input logic [7:0] code);
    int unsigned exp_idx;
    exp_idx = (code >= 60) ? 3 : (code >= 45) ? 2 : (code >= 30) ? 1 : 0;
    sensor_code = code;
    @(negedge clk) load_req = 1;
    wait (load_ack);
    #1;
    check(!sensor_req && !sensor_ack, "sensor released before load_ack");
    check(code_q == code, "code captured");
    check(cfg_idx == 2'(exp_idx), $sformatf("code %0d -> cfg %0d (got %0d)", code, exp_idx, cfg_idx));
    case (exp_idx)
      0: check(cfg.points == 512  && cfg.precision == 12, "cfg 0: 512 points, 12 bits");
      1: check(cfg.points == 512  && cfg.precision == 16, "cfg 1: 512 points, 16 bits");
      2: check(cfg.points == 1024 && cfg.precision == 8,  "cfg 2: 1024 points, 8 bits");
      default: check(cfg.points == 1024 && cfg.precision == 12, "cfg 3: 1024 points, 12 bits");
    endcase
    seen[exp_idx]++;
    @(negedge clk) load_req = 0;
    wait (!load_ack);
  endtask

  initial begin
    #500000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    check(cfg_idx == 0, "preset configuration after reset");
    rst_n = 1;
    request(8'd0);  request(8'd29); request(8'd30); request(8'd44);
    request(8'd45); request(8'd59); request(8'd60); request(8'd255);
    for (int i = 0; i < 30; i++) request(8'($urandom_range(0, 90)));
    foreach (seen[i]) check(seen[i] > 0, $sformatf("configuration %0d used", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
