// adc0804_model: behavioural model of an ADC0804-style 8-bit
// successive-approximation converter, for simulation only (not synthesizable
// and not part of the design).
//
// WR pulsed low while CS is low starts a conversion (on the first of the
// two to rise) of the analog
// input vin (volts, span 0 .. VSPAN). The successive-approximation register
// is cleared, then from the MSB down each bit is set, the internal DAC
// voltage code*LSB is compared with vin and the bit is kept only if the DAC
// voltage does not exceed vin; each bit takes T_CONV/8. At the end the code
// goes to the output latch and INTR falls. While CS and RD are low the latch
// drives the data bus and INTR is released. This model has two-state
// outputs, so the bus reads 0 while it is not enabled.
//
// busy_read counts reads that happened while a conversion was still running
// (the previous result is returned then).
module adc0804_model #(
  parameter real VSPAN  = 4.0,
  parameter time T_CONV = 100us
) (
  input  logic       cs_n,
  input  logic       rd_n,
  input  logic       wr_n,
  input  real        vin,
  output logic       intr_n,
  output logic [7:0] db,
  output int         conversions,
  output int         busy_read
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [7:0] latch_q = 8'h80;
  logic       converting = 1'b0;
  int         gen = 0;   // restarts abandon a running conversion

  initial begin
    intr_n      = 1'b1;
    conversions = 0;
    busy_read   = 0;
  end

  assign db = (!cs_n && !rd_n) ? latch_q : 8'h00;

  always @(negedge rd_n or negedge cs_n) if (!cs_n && !rd_n) begin
    intr_n = 1'b1;
    if (converting) busy_read++;
  end

  // WR low while CS is low arms a start; the conversion begins when the
  // first of WR and CS rises.
  logic armed = 1'b0;
  always @(negedge wr_n or negedge cs_n) if (!wr_n && !cs_n) armed = 1'b1;

  always @(posedge wr_n or posedge cs_n) if (armed) begin
    automatic int   my_gen;
    automatic logic [7:0] sar;
    armed      = 1'b0;
    gen++;
    my_gen     = gen;
    converting = 1'b1;
    intr_n     = 1'b1;
    sar        = 8'h00;
    for (int b = 7; b >= 0; b--) begin
      #(T_CONV / 8);
      if (my_gen != gen) break;
      sar[b] = 1'b1;
      if (real'(sar) * VSPAN / 256.0 > vin) sar[b] = 1'b0;
    end
    if (my_gen == gen) begin
      latch_q     = sar;
      converting  = 1'b0;
      intr_n      = 1'b0;
      conversions++;
    end
  end
endmodule
