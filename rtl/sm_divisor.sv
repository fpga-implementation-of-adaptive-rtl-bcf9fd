// sm_divisor: division of a sign-magnitude number by 2^SHIFT.
//
// As in the document, the division is a plain right shift of the magnitude:
// only powers of two are possible and the bits shifted out are truncated.
// The sign passes through unchanged. The result is narrowed to OUT_W
// magnitude bits; a quotient that does not fit saturates to the largest
// magnitude and raises sat (this design's choice).
//
// Interface: in_sign/in_mag in, out_sign/out_mag/sat out.
// Timing: purely combinational.
module sm_divisor #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 8,
  parameter int unsigned SHIFT = 10
) (
  input  logic             in_sign,
  input  logic [IN_W-1:0]  in_mag,
  output logic             out_sign,
  output logic [OUT_W-1:0] out_mag,
  output logic             sat
);

  logic [IN_W-1:0] q;  // truncated quotient

  always_comb begin
    q        = in_mag >> SHIFT;
    out_sign = in_sign;
    sat      = (q > IN_W'({OUT_W{1'b1}}));
    out_mag  = sat ? '1 : q[OUT_W-1:0];
  end

endmodule
