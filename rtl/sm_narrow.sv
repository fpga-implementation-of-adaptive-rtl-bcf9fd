// sm_narrow: converts a 16-bit-format product back to 8-bit format.
//
// Two 8-bit-format operands scaled 128 = 1.0 give a 16-bit product scaled
// 2^14 = 1.0; dividing it by 2^7 returns it to the 8-bit scale so that it
// can be added to other 8-bit words. The document does this with a 7-bit
// right shift that truncates; that is kept here. A value of 2.0 or more
// does not fit in 8 magnitude bits and saturates to 255 (this design's
// choice), raising sat.
//
// The FRAC low input bits are dropped by design (truncation), so a lint
// tool reports them as unused.
//
// Interface: in_sign/in_mag (16-bit format) in, out_sign/out_mag (8-bit
// format) and sat out. Timing: purely combinational.
module sm_narrow #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 8,
  parameter int unsigned FRAC  = 7   // fractional bits removed
) (
  input  logic             in_sign,
  input  logic [IN_W-1:0]  in_mag,
  output logic             out_sign,
  output logic [OUT_W-1:0] out_mag,
  output logic             sat
);

  logic [IN_W-FRAC-1:0] kept;  // integer-scaled magnitude after the shift

  always_comb begin
    kept     = in_mag[IN_W-1:FRAC];
    out_sign = in_sign;
    if (IN_W - FRAC > OUT_W) begin
      sat     = |(kept >> OUT_W);
      out_mag = sat ? '1 : OUT_W'(kept);
    end else begin
      sat     = 1'b0;
      out_mag = OUT_W'(kept);
    end
  end

endmodule
