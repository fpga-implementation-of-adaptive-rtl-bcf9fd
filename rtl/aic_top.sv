// aic_top: adaptive interference canceler for periodic signals.
//
// An LMS transversal filter predicts the current input sample x(n) from a
// delayed copy of the input itself. Periodic components stay correlated over
// the delay and are predicted; broadband interference is not. The filter
// output y(n) is therefore the periodic signal with the interference
// reduced, and e(n) = x(n) - y(n) mostly the interference. After each sample
// the weights move along the LMS gradient: w_l += 2*mu * e(n) * x(n-1-DELAY-l).
//
// The filter is built as a "queue": instead of ORDER multipliers, two
// processors with two multipliers each work through the taps two at a time,
// one tap pair per CLOCK1 period. PROCESSOR1 and an accumulator form y,
// PROCESSOR2 updates the weights, and a control unit with three counters
// sequences ADC, processors, data registers and output. All arithmetic is
// sign-magnitude; samples, weights, y and e use an 8-bit magnitude scaled
// 128 = 1.0, products and the accumulator a 16-bit magnitude. These choices,
// the order 28, the 8 MHz / 500 kHz clocks and the 8 kHz sampling rate
// follow the document. DELAY = 2 follows the document's simulated baseline;
// MU_SHIFT = 3 (2*mu = 1/8) is this design's choice, since the step size of
// the built canceler is not given and the document's simulated 0.005 is
// below the 1/128 resolution of an 8-bit weight. The output code is taken
// from y (the extracted periodic signal), which is also a choice.
//
// Interface: clk is CLOCK2. The ADC side follows an ADC0804-style bus
// (active-low CS, RD, WR; 8-bit offset-binary data valid while RD is low).
// dac_data is an offset-binary code for a DAC0800 in symmetrical offset
// mode. y_out and e_out give the sign-magnitude results of the last
// iteration; sample_done pulses once per iteration when dac_data changes;
// ovf is a sticky flag raised when any stage saturated.
// Timing: one iteration takes (ORDER + 5) CLOCK1 periods, 33 x 16 = 528
// CLOCK2 cycles (66 us at 8 MHz) for the defaults, within the 1000-cycle
// (125 us) sampling period. The control unit's CLOCK1 tick (ce1) is left
// open here: every strobe derived from it already comes out of the control
// unit.
module aic_top
  import aic_pkg::*;
#(
  parameter int unsigned ORDER       = 28,
  parameter int unsigned DELAY       = 2,
  parameter int unsigned MU_SHIFT    = 3,
  parameter int unsigned CLK_RATIO   = 16,
  parameter int unsigned SAMPLE_CLKS = 1000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] adc_data,
  output logic       adc_cs_n,
  output logic       adc_rd_n,
  output logic       adc_wr_n,
  output logic [7:0] dac_data,
  output sm8_t       y_out,
  output sm8_t       e_out,
  output logic       sample_done,
  output logic       ovf
);

  localparam int unsigned NPAIR = ORDER / 2;
  localparam int unsigned PW    = (NPAIR > 1) ? $clog2(NPAIR) : 1;

  phase_t        phase;
  logic [PW-1:0] pair_sel;
  logic          adc_latch, acc_clr, p1_start, p2_start, w_we;
  logic          err_latch, out_latch, p1_done, p2_done;

  sm8_t  din, x_now, xa, xb, wa, wb, wa_new, wb_new, y8, e8, y_reg, e_reg;
  sm16_t p1_sum, acc;
  logic  p1_ovf, acc_ovf, p2_sat, y_sat, e_ovf, dac_clip;
  logic [7:0] dac_code;

  aic_control_unit #(
    .ORDER(ORDER), .CLK_RATIO(CLK_RATIO), .SAMPLE_CLKS(SAMPLE_CLKS)
  ) u_ctrl (
    .clk, .rst_n, .p1_done, .p2_done, .phase, .pair_sel, .ce1(),
    .adc_cs_n, .adc_rd_n, .adc_wr_n, .adc_latch, .acc_clr,
    .p1_start, .p2_start, .w_we, .err_latch, .out_latch,
    .iter_done(sample_done)
  );

  // input: offset-binary ADC code to sign-magnitude
  u2s_conv u_u2s (.code(adc_data), .sign(din.sign), .mag(din.mag));

  aic_sample_regs #(.ORDER(ORDER), .DELAY(DELAY)) u_samples (
    .clk, .rst_n, .push(adc_latch), .din, .pair_sel, .x_now, .xa, .xb
  );

  aic_weight_regs #(.ORDER(ORDER)) u_weights (
    .clk, .rst_n, .pair_sel, .we(w_we), .wa_in(wa_new), .wb_in(wb_new),
    .wa, .wb
  );

  aic_processor1 #(.W(DATA_W)) u_proc1 (
    .clk, .rst_n, .start(p1_start),
    .x1_sign(xa.sign), .x1_mag(xa.mag), .w1_sign(wa.sign), .w1_mag(wa.mag),
    .x2_sign(xb.sign), .x2_mag(xb.mag), .w2_sign(wb.sign), .w2_mag(wb.mag),
    .sum_sign(p1_sum.sign), .sum_mag(p1_sum.mag), .ovf(p1_ovf), .done(p1_done)
  );

  aic_accumulator #(.MAG_W(PROD_W)) u_acc (
    .clk, .rst_n, .clr(acc_clr), .add(p1_done),
    .in_sign(p1_sum.sign), .in_mag(p1_sum.mag),
    .acc_sign(acc.sign), .acc_mag(acc.mag), .ovf(acc_ovf)
  );

  // filter output back to 8-bit format
  sm_narrow #(.IN_W(PROD_W), .OUT_W(DATA_W), .FRAC(7)) u_narrow (
    .in_sign(acc.sign), .in_mag(acc.mag),
    .out_sign(y8.sign), .out_mag(y8.mag), .sat(y_sat)
  );

  // error e = x - y: a sign binary adder with y's sign inverted
  sm_adder #(.MAG_W(DATA_W)) u_err (
    .a_sign(x_now.sign), .a_mag(x_now.mag), .b_sign(~y8.sign), .b_mag(y8.mag),
    .s_sign(e8.sign), .s_mag(e8.mag), .ovf(e_ovf)
  );

  aic_processor2 #(.W(DATA_W), .SHIFT(7 + MU_SHIFT)) u_proc2 (
    .clk, .rst_n, .start(p2_start),
    .x1_sign(xa.sign), .x1_mag(xa.mag), .e1_sign(e_reg.sign), .e1_mag(e_reg.mag),
    .w1_sign(wa.sign), .w1_mag(wa.mag),
    .x2_sign(xb.sign), .x2_mag(xb.mag), .e2_sign(e_reg.sign), .e2_mag(e_reg.mag),
    .w2_sign(wb.sign), .w2_mag(wb.mag),
    .w1n_sign(wa_new.sign), .w1n_mag(wa_new.mag),
    .w2n_sign(wb_new.sign), .w2n_mag(wb_new.mag),
    .sat(p2_sat), .done(p2_done)
  );

  // output: sign-magnitude y to the offset-binary DAC code
  s2u_conv u_s2u (.sign(y_reg.sign), .mag(y_reg.mag), .code(dac_code), .clip(dac_clip));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_reg    <= '0;
      e_reg    <= '0;
      dac_data <= 8'h80;
      ovf      <= 1'b0;
    end else begin
      if (err_latch) begin
        y_reg <= y8;
        e_reg <= e8;
        ovf   <= ovf | acc_ovf | y_sat | e_ovf;
      end
      if (w_we)      ovf <= ovf | p2_sat;
      if (out_latch) begin
        dac_data <= dac_code;
        ovf      <= ovf | dac_clip;
      end
    end
  end

  assign y_out = y_reg;
  assign e_out = e_reg;

  // The accumulator's per-pair flag is folded into its sticky flag.
  logic unused_p1_ovf;
  assign unused_p1_ovf = p1_ovf;

  // The control unit never drives a pair index beyond the last pair.
  a_pair_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    int'(pair_sel) < NPAIR);
  // Only PROCESSOR1 results of the filter phase reach the accumulator.
  a_acc_in_filt: assert property (@(posedge clk) disable iff (!rst_n)
    p1_done |-> phase == PH_FILT);
  // The ADC is read and started only while it is selected.
  a_adc_selected: assert property (@(posedge clk) disable iff (!rst_n)
    (!adc_rd_n || !adc_wr_n) |-> !adc_cs_n);

endmodule
