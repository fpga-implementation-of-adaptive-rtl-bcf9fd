// aic_processor1: filter-output processor, two taps per operation.
//
// Two sequential multipliers form x1*w1 and x2*w2 in parallel (the "dual
// computation path") and a sign binary adder sums the two 16-bit-format
// products; the sum is registered. The structure (two multipliers feeding
// one sign binary adder) is the document's. The result goes to the
// accumulator outside this block.
//
// Interface: start (one-cycle pulse) samples the four operands; sum_sign /
// sum_mag hold x1*w1 + x2*w2 (16-bit format) from the cycle done is high;
// ovf flags a saturated sum.
// Timing: done is high one cycle after the multipliers' done, i.e. in the
// cycle after the (W+4)-th edge following start (12 edges for W = 8).
module aic_processor1
  import aic_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           x1_sign,
  input  logic [W-1:0]   x1_mag,
  input  logic           w1_sign,
  input  logic [W-1:0]   w1_mag,
  input  logic           x2_sign,
  input  logic [W-1:0]   x2_mag,
  input  logic           w2_sign,
  input  logic [W-1:0]   w2_mag,
  output logic           sum_sign,
  output logic [2*W-1:0] sum_mag,
  output logic           ovf,
  output logic           done
);

  logic           p1_sign, p2_sign, s_sign, s_ovf;
  logic [2*W-1:0] p1_mag, p2_mag, s_mag;
  logic           m1_done, m2_done, m1_busy, m2_busy;

  sm_multiplier #(.W(W)) u_mul1 (
    .clk, .rst_n, .start,
    .a_sign(x1_sign), .a_mag(x1_mag), .b_sign(w1_sign), .b_mag(w1_mag),
    .p_sign(p1_sign), .p_mag(p1_mag), .busy(m1_busy), .done(m1_done)
  );

  sm_multiplier #(.W(W)) u_mul2 (
    .clk, .rst_n, .start,
    .a_sign(x2_sign), .a_mag(x2_mag), .b_sign(w2_sign), .b_mag(w2_mag),
    .p_sign(p2_sign), .p_mag(p2_mag), .busy(m2_busy), .done(m2_done)
  );

  sm_adder #(.MAG_W(2*W)) u_add (
    .a_sign(p1_sign), .a_mag(p1_mag), .b_sign(p2_sign), .b_mag(p2_mag),
    .s_sign, .s_mag, .ovf(s_ovf)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_sign <= 1'b0;
      sum_mag  <= '0;
      ovf      <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= m1_done & m2_done;
      if (m1_done & m2_done) begin
        sum_sign <= s_sign;
        sum_mag  <= s_mag;
        ovf      <= s_ovf;
      end
    end
  end

  // Both paths are started together and must finish together.
  a_paths_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    (m1_done == m2_done) && (m1_busy == m2_busy));

endmodule
