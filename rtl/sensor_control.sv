`timescale 1ns / 1ps
// Controlling unit of the reference-free voltage sensor.
//
// It runs one sensing round per four-phase request/acknowledge handshake with
// the unit that wants a reading. Its heart is one toggle flip-flop, FF1,
// whose clock is the request ANDed with the Q output of the self-timed
// comparator. While idle the comparator is held in reset, so Q is high and
// the rising request is a clock edge: FF1 sets, the sampling capacitor is
// disconnected from the supply (S1 open) and connected to the counter (S2
// closed), and the comparator and the counter are enabled. While the
// capacitor discharges, Q first falls (the reference generator output is
// below the capacitor voltage) and rises again when the reference generator
// fires its indication pulse at the second threshold. That rising edge
// toggles FF1 back: S1 closes again to recharge the capacitor, S2 opens and
// the counter stops and holds its code, and S3 connects the counter outputs
// to the full supply. Ack rises once the capacitor is recharged and falls,
// with S3 opening, when the request is withdrawn.
//
// Interface: req/ack is a four-phase handshake. s1/s2/s3 are the switch
// controls (1 = closed). `rst_n` must see a falling edge at power-up (there
// is no free-running clock to apply a held reset). counter_run enables the counter, counter_clr_n
// clears it while no request is pending, cmp_en releases the comparator from
// reset.
//
// The use of FF1, its clocking by request and comparator, the switch
// sequence and Ack after recharge follow the document. The exact gate that
// forms FF1's clock (an AND here), the "done" flag that holds S3 and Ack,
// and clearing the counter while req is low are this design's choices.
module sensor_control (
  input  logic rst_n,          // power-on reset of the control domain
  input  logic req,            // sensing request
  input  logic cmp_q,          // Q of the self-timed comparator
  input  logic cs_charged,     // sampling capacitor recharged to the supply
  output logic s1_close,       // supply -> sampling capacitor
  output logic s2_close,       // sampling capacitor -> counter
  output logic s3_close,       // supply -> counter outputs (latch)
  output logic counter_run,
  output logic counter_clr_n,
  output logic cmp_en,         // comparator Reset input (active high enable)
  output logic ack
);

  logic ff1;   // 1 during the sensing (operational) time
  logic done;  // round finished, code held
  logic ff1_clk;
  logic done_clr_n;

  assign ff1_clk    = req & cmp_q;
  assign done_clr_n = req & rst_n;

  always_ff @(posedge ff1_clk or negedge rst_n) begin
    if (!rst_n) ff1 <= 1'b0;
    else        ff1 <= ~ff1;
  end

  always_ff @(posedge ff1_clk or negedge done_clr_n) begin
    if (!done_clr_n) done <= 1'b0;
    else if (ff1) done <= 1'b1;
  end

  assign s1_close      = ~ff1;
  assign s2_close      = ff1;
  assign s3_close      = done;
  assign counter_run   = ff1;
  assign counter_clr_n = req;
  assign cmp_en        = ff1;
  assign ack           = done & cs_charged & ~ff1;

endmodule
