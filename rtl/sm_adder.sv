// sm_adder: sign binary adder for sign-magnitude numbers (combinational).
//
// Equal signs: the magnitudes are added and the sum takes the common sign.
// Different signs: b's magnitude is subtracted from a's; if that borrows
// (|a| < |b|) the two's-complement difference is complemented back to a
// magnitude and the result takes b's sign, otherwise it keeps a's sign. This
// is the four-case procedure of the document. A magnitude sum that does not
// fit in MAG_W bits saturates to the largest magnitude and raises ovf; the
// saturation is this design's choice (the document does not say what the
// adder does on overflow). A zero difference keeps a's sign, as the
// procedure implies, so a negative zero can appear.
//
// Interface: a_sign/a_mag, b_sign/b_mag in; s_sign/s_mag, ovf out.
// Timing: purely combinational.
module sm_adder #(
  parameter int unsigned MAG_W = 16
) (
  input  logic             a_sign,
  input  logic [MAG_W-1:0] a_mag,
  input  logic             b_sign,
  input  logic [MAG_W-1:0] b_mag,
  output logic             s_sign,
  output logic [MAG_W-1:0] s_mag,
  output logic             ovf
);

  logic [MAG_W:0] sum;   // magnitude sum with carry
  logic [MAG_W:0] diff;  // a - b with borrow in the top bit

  always_comb begin
    sum  = {1'b0, a_mag} + {1'b0, b_mag};
    diff = {1'b0, a_mag} - {1'b0, b_mag};
    ovf  = 1'b0;
    if (a_sign == b_sign) begin
      s_sign = a_sign;
      if (sum[MAG_W]) begin
        s_mag = '1;
        ovf   = 1'b1;
      end else begin
        s_mag = sum[MAG_W-1:0];
      end
    end else if (diff[MAG_W]) begin
      // borrow: result is negative in two's complement, re-complement it
      s_sign = b_sign;
      s_mag  = ~diff[MAG_W-1:0] + 1'b1;
    end else begin
      s_sign = a_sign;
      s_mag  = diff[MAG_W-1:0];
    end
  end

endmodule
