`timescale 1ns / 1ps
// Shared types and constants of the reference-free voltage sensor and of the
// power platform built around it.
//
// Voltages that cross between the behavioural analog models and the digital
// blocks are carried as unsigned integers in microvolts (uv_t). The PMU
// state encoding and the load-configuration record used by the load manager
// are defined here too.
package vsense_pkg;

  // Analog quantity in microvolts (enough for several volts).
  typedef logic [31:0] uv_t;

  // Power management unit of the buck converter: monitoring (three stages),
  // waiting for the sensor, reading (three stages), computing.
  typedef enum logic [3:0] {
    PMU_MON_EN   = 4'd0,  // enable the output-voltage level shifter
    PMU_MON_RD   = 4'd1,  // sample its output
    PMU_MON_DIS  = 4'd2,  // disable it, decide cold start or normal mode
    PMU_WAIT_ACK = 4'd3,  // delay line and sensing round in progress
    PMU_RD_EN    = 4'd4,  // enable the data level shifters
    PMU_RD_RD    = 4'd5,  // sample sensor code and demanded voltage
    PMU_RD_DIS   = 4'd6,  // disable them
    PMU_COMPUTE  = 4'd7,  // compute the next duty cycle
    PMU_WAIT_REL = 4'd8   // wait for the sensor to release Ack
  } pmu_state_e;

  // One computational configuration of the FFT load.
  typedef struct packed {
    logic [10:0] points;     // transformation size
    logic [4:0]  precision;  // bits of precision
  } fft_cfg_t;

endpackage
