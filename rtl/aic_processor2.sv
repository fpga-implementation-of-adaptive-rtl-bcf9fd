// aic_processor2: weight-update processor, two weights per operation.
//
// Each of the two identical paths computes the LMS update
//     w' = w + (x * e) / 2^SHIFT
// with a sequential multiplier (x*e in 16-bit format), a divisor that
// right-shifts the product back into 8-bit format and by the step size, and
// a sign binary adder that adds the step to the old weight. This chain is
// the document's. SHIFT = 7 + MU_SHIFT: seven bits return the product to
// the 8-bit scale, MU_SHIFT sets the step size 2*mu = 2^-MU_SHIFT.
// Divisor and adder results saturate at the 8-bit magnitude limit.
//
// Interface: start samples x, e and w of both paths; w1n/w2n hold the new
// weights from the cycle done is high. Timing: done is high one cycle after
// the multipliers' done (12 edges after start for W = 8).
module aic_processor2
  import aic_pkg::*;
#(
  parameter int unsigned W     = DATA_W,
  parameter int unsigned SHIFT = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         x1_sign,
  input  logic [W-1:0] x1_mag,
  input  logic         e1_sign,
  input  logic [W-1:0] e1_mag,
  input  logic         w1_sign,
  input  logic [W-1:0] w1_mag,
  input  logic         x2_sign,
  input  logic [W-1:0] x2_mag,
  input  logic         e2_sign,
  input  logic [W-1:0] e2_mag,
  input  logic         w2_sign,
  input  logic [W-1:0] w2_mag,
  output logic         w1n_sign,
  output logic [W-1:0] w1n_mag,
  output logic         w2n_sign,
  output logic [W-1:0] w2n_mag,
  output logic         sat,
  output logic         done
);

  logic           p1_sign, p2_sign;
  logic [2*W-1:0] p1_mag, p2_mag;
  logic           m1_done, m2_done, m1_busy, m2_busy;
  logic           d1_sign, d2_sign, d1_sat, d2_sat;
  logic [W-1:0]   d1_mag, d2_mag;
  logic           a1_sign, a2_sign, a1_ovf, a2_ovf;
  logic [W-1:0]   a1_mag, a2_mag;
  // weights captured at start, so the operand multiplexers may move on
  logic           w1_sign_q, w2_sign_q;
  logic [W-1:0]   w1_mag_q, w2_mag_q;

  sm_multiplier #(.W(W)) u_mul1 (
    .clk, .rst_n, .start,
    .a_sign(x1_sign), .a_mag(x1_mag), .b_sign(e1_sign), .b_mag(e1_mag),
    .p_sign(p1_sign), .p_mag(p1_mag), .busy(m1_busy), .done(m1_done)
  );

  sm_multiplier #(.W(W)) u_mul2 (
    .clk, .rst_n, .start,
    .a_sign(x2_sign), .a_mag(x2_mag), .b_sign(e2_sign), .b_mag(e2_mag),
    .p_sign(p2_sign), .p_mag(p2_mag), .busy(m2_busy), .done(m2_done)
  );

  sm_divisor #(.IN_W(2*W), .OUT_W(W), .SHIFT(SHIFT)) u_div1 (
    .in_sign(p1_sign), .in_mag(p1_mag),
    .out_sign(d1_sign), .out_mag(d1_mag), .sat(d1_sat)
  );

  sm_divisor #(.IN_W(2*W), .OUT_W(W), .SHIFT(SHIFT)) u_div2 (
    .in_sign(p2_sign), .in_mag(p2_mag),
    .out_sign(d2_sign), .out_mag(d2_mag), .sat(d2_sat)
  );

  sm_adder #(.MAG_W(W)) u_add1 (
    .a_sign(w1_sign_q), .a_mag(w1_mag_q), .b_sign(d1_sign), .b_mag(d1_mag),
    .s_sign(a1_sign), .s_mag(a1_mag), .ovf(a1_ovf)
  );

  sm_adder #(.MAG_W(W)) u_add2 (
    .a_sign(w2_sign_q), .a_mag(w2_mag_q), .b_sign(d2_sign), .b_mag(d2_mag),
    .s_sign(a2_sign), .s_mag(a2_mag), .ovf(a2_ovf)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w1_sign_q <= 1'b0;  w1_mag_q <= '0;
      w2_sign_q <= 1'b0;  w2_mag_q <= '0;
      w1n_sign  <= 1'b0;  w1n_mag  <= '0;
      w2n_sign  <= 1'b0;  w2n_mag  <= '0;
      sat       <= 1'b0;
      done      <= 1'b0;
    end else begin
      if (start && !m1_busy) begin
        w1_sign_q <= w1_sign;  w1_mag_q <= w1_mag;
        w2_sign_q <= w2_sign;  w2_mag_q <= w2_mag;
      end
      done <= m1_done & m2_done;
      if (m1_done & m2_done) begin
        w1n_sign <= a1_sign;  w1n_mag <= a1_mag;
        w2n_sign <= a2_sign;  w2n_mag <= a2_mag;
        sat      <= d1_sat | d2_sat | a1_ovf | a2_ovf;
      end
    end
  end

  a_paths_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    (m1_done == m2_done) && (m1_busy == m2_busy));

endmodule
