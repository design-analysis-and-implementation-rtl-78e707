`timescale 1ns / 1ps
// Power management unit (PMU) of the reference-free buck converter.
//
// The PMU closes the loop between the voltage sensor and the PWM generator
// without any voltage or timing reference. After reset it is in cold start:
// the duty cycle is set to its maximum so that the converter output rises
// quickly. It then monitors the output in three clock stages: enable the
// output-voltage level shifter, read it, disable it. While the read is 0 the
// duty cycle is held at maximum (cold start). Once it is 1 the PMU is in
// normal mode: it enables the delay-line counter, which after the programmed
// delay requests a sensing round. When the sensor's Ack arrives the PMU reads
// the sensor code and the load's demanded voltage in the same three stages,
// then computes
//     PWM_DC(next) = PWM_DC(current) * demanded / measured
// replacing the result by the maximum duty cycle when it exceeds 255 (or
// when the measurement is zero). It then withdraws the request, waits for Ack
// to fall and starts the next round with monitoring.
//
// Interface: `v_measured`/`v_demanded` are 8-bit sensor codes read through
// level shifters enabled by `level_shifters_reading`; `output_voltage` is the
// level-shifted output-voltage detector enabled by `output_voltage_reading`;
// `ack_sense_en` enables the Ack level shifter while an Ack edge is awaited;
// `counter_en` drives the delay-line counter; `pwm_dc` goes to the PWM
// generator. Timing: one state per clock; a full round takes 3 monitoring
// cycles, the delay and sensing time, 3 reading cycles, one compute cycle
// and the Ack release.
//
// The three states, the three-stage reads, the formula, the maximum 250
// (0xFA) and the >255 replacement follow the document. The state encoding,
// the zero-measurement guard and the explicit Ack-release wait are this
// design's choices.
module pmu
  import vsense_pkg::*;
#(
  parameter logic [7:0] DC_MAX = 8'd250
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] v_measured,
  input  logic [7:0] v_demanded,
  input  logic       ack,
  input  logic       output_voltage,
  output logic       counter_en,
  output logic       level_shifters_reading,
  output logic       output_voltage_reading,
  output logic       ack_sense_en,
  output logic [7:0] pwm_dc,
  output pmu_state_e state,
  output logic       normal_mode
);

  logic [7:0]  meas_q, dem_q;
  logic [15:0] product;
  logic [15:0] quotient;
  logic [7:0]  dc_next;

  assign product  = pwm_dc * dem_q;
  assign quotient = (meas_q == 8'd0) ? 16'hFFFF : product / {8'd0, meas_q};
  assign dc_next  = (quotient > 16'd255) ? DC_MAX : quotient[7:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state                  <= PMU_MON_EN;
      pwm_dc                 <= DC_MAX;
      counter_en             <= 1'b0;
      level_shifters_reading <= 1'b0;
      output_voltage_reading <= 1'b0;
      normal_mode            <= 1'b0;
      meas_q                 <= '0;
      dem_q                  <= '0;
    end else begin
      unique case (state)
        PMU_MON_EN: begin
          output_voltage_reading <= 1'b1;
          state                  <= PMU_MON_RD;
        end
        PMU_MON_RD: begin
          normal_mode <= output_voltage;
          state       <= PMU_MON_DIS;
        end
        PMU_MON_DIS: begin
          output_voltage_reading <= 1'b0;
          if (normal_mode) begin
            counter_en <= 1'b1;
            state      <= PMU_WAIT_ACK;
          end else begin
            pwm_dc <= DC_MAX;          // cold start
            state  <= PMU_MON_EN;
          end
        end
        PMU_WAIT_ACK: begin
          if (ack) begin
            level_shifters_reading <= 1'b1;
            state                  <= PMU_RD_EN;
          end
        end
        PMU_RD_EN: begin
          state <= PMU_RD_RD;
        end
        PMU_RD_RD: begin
          meas_q <= v_measured;
          dem_q  <= v_demanded;
          state  <= PMU_RD_DIS;
        end
        PMU_RD_DIS: begin
          level_shifters_reading <= 1'b0;
          state                  <= PMU_COMPUTE;
        end
        PMU_COMPUTE: begin
          pwm_dc     <= dc_next;
          counter_en <= 1'b0;
          state      <= PMU_WAIT_REL;
        end
        PMU_WAIT_REL: begin
          if (!ack) state <= PMU_MON_EN;
        end
        default: state <= PMU_MON_EN;
      endcase
    end
  end

  assign ack_sense_en = (state == PMU_WAIT_ACK) || (state == PMU_WAIT_REL);

endmodule
