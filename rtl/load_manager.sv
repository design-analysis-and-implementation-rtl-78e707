`timescale 1ns / 1ps
// Power management unit for the computational load (first part of the power
// platform).
//
// The load runs directly from the unregulated supply and can change its
// computational configuration at run time. At the start of one or more of
// its operations it raises `load_req`. The manager forwards a request to the
// voltage sensor, captures the sensor code when Ack arrives, compares it with
// three preset thresholds and so places the available energy in one of four
// ranges. Each range selects one FFT configuration, in the order the document
// lists them: 512 points at 12 bits, 512 points at 16 bits, 1024 points at 8
// bits, 1024 points at 12 bits. It then withdraws the sensor request, waits
// for Ack to fall and acknowledges the load with `load_ack`, which stays high
// until the load drops `load_req`.
//
// Interface: two four-phase handshakes (load_req/load_ack with the load,
// sensor_req/sensor_ack with the sensor), `cfg`/`cfg_idx` the selected
// configuration, `code_q` the last code read. Timing: one state per clock.
//
// Comparing the reading with preset values, the four configurations and the
// handshakes follow the document. The thresholds are given in the document
// as stored energy (20 mJ, 30 mJ), not as codes, so the code thresholds are
// parameters of this design; so is starting from configuration 0 after reset.
module load_manager
  import vsense_pkg::*;
#(
  parameter logic [7:0] TH1 = 8'd30,
  parameter logic [7:0] TH2 = 8'd45,
  parameter logic [7:0] TH3 = 8'd60
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load_req,
  output logic       load_ack,
  output logic       sensor_req,
  input  logic       sensor_ack,
  input  logic [7:0] sensor_code,
  output logic [1:0] cfg_idx,
  output fft_cfg_t   cfg,
  output logic [7:0] code_q
);

  typedef enum logic [1:0] {LM_IDLE, LM_SENSE, LM_RELEASE, LM_DONE} lm_state_e;
  lm_state_e state;

  logic [1:0] idx_of_code;
  always_comb begin
    if      (sensor_code >= TH3) idx_of_code = 2'd3;
    else if (sensor_code >= TH2) idx_of_code = 2'd2;
    else if (sensor_code >= TH1) idx_of_code = 2'd1;
    else                         idx_of_code = 2'd0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= LM_IDLE;
      sensor_req <= 1'b0;
      load_ack   <= 1'b0;
      cfg_idx    <= 2'd0;
      code_q     <= '0;
    end else begin
      unique case (state)
        LM_IDLE: if (load_req && !sensor_ack) begin
          sensor_req <= 1'b1;
          state      <= LM_SENSE;
        end
        LM_SENSE: if (sensor_ack) begin
          code_q     <= sensor_code;
          cfg_idx    <= idx_of_code;
          sensor_req <= 1'b0;
          state      <= LM_RELEASE;
        end
        LM_RELEASE: if (!sensor_ack) begin
          load_ack <= 1'b1;
          state    <= LM_DONE;
        end
        LM_DONE: if (!load_req) begin
          load_ack <= 1'b0;
          state    <= LM_IDLE;
        end
        default: state <= LM_IDLE;
      endcase
    end
  end

  always_comb begin
    unique case (cfg_idx)
      2'd0:    cfg = '{points: 11'd512,  precision: 5'd12};
      2'd1:    cfg = '{points: 11'd512,  precision: 5'd16};
      2'd2:    cfg = '{points: 11'd1024, precision: 5'd8};
      default: cfg = '{points: 11'd1024, precision: 5'd12};
    endcase
  end

endmodule
