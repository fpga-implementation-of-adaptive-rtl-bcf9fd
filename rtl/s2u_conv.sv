// s2u_conv: sign-magnitude 8-bit format to the unsigned DAC code.
//
// The reverse of u2s_conv, as the document describes it: the code's MSB is
// the inverse of the sign; a positive number keeps its low seven magnitude
// bits; a negative number's low seven bits are the two's complement of its
// magnitude. Three cases the document leaves open are this design's
// choices: a positive magnitude above 127 saturates to code 255, a negative
// magnitude above 128 saturates to code 0 (both raise clip), and a negative
// zero gives code 128 like a positive zero.
//
// Interface: sign/mag in; code, clip out. Timing: purely combinational.
module s2u_conv (
  input  logic       sign,
  input  logic [7:0] mag,
  output logic [7:0] code,
  output logic       clip
);

  logic [6:0] neg_low;  // two's complement of the low magnitude bits

  always_comb begin
    neg_low = ~mag[6:0] + 7'd1;
    clip    = 1'b0;
    if (!sign || mag == 8'd0) begin
      if (mag[7]) begin
        code = 8'hFF;
        clip = 1'b1;
      end else begin
        code = {1'b1, mag[6:0]};
      end
    end else if (mag > 8'd128) begin
      code = 8'h00;
      clip = 1'b1;
    end else begin
      code = {1'b0, neg_low};
    end
  end

endmodule
