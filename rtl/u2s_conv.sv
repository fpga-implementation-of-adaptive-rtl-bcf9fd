// u2s_conv: unsigned (offset-binary) ADC code to sign-magnitude 8-bit format.
//
// The analog input is shifted up by half the ADC range before conversion,
// so codes 128..255 are positive and 0..127 negative. The sign bit is the
// inverse of the code's MSB. For positive codes the magnitude is the code
// with its MSB cleared; for negative codes it is the two's complement of the
// low seven bits, taken over eight bits so that code 0 maps to magnitude
// 128 (-1.0). This is the mapping of the document's format table.
//
// Interface: code in; sign/mag out. Timing: purely combinational.
module u2s_conv (
  input  logic [7:0] code,
  output logic       sign,
  output logic [7:0] mag
);

  always_comb begin
    sign = ~code[7];
    if (code[7]) mag = {1'b0, code[6:0]};
    else         mag = {1'b0, ~code[6:0]} + 8'd1;
  end

endmodule
