// aic_accumulator: running sum of PROCESSOR1 results (16-bit format).
//
// The document connects PROCESSOR1's output to an accumulator that holds the
// partial filter output until all tap pairs have been processed. Here it is
// a sign-magnitude register plus a sign binary adder: clr empties it (+0),
// add adds the input to it. A sum that overflows saturates and sets the
// sticky ovf flag, which clr also clears (both this design's choices).
//
// Interface: clr, add, in_sign/in_mag in; acc_sign/acc_mag, ovf out.
// Timing: one clock edge per clear or addition; clr wins over add.
module aic_accumulator #(
  parameter int unsigned MAG_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             add,
  input  logic             in_sign,
  input  logic [MAG_W-1:0] in_mag,
  output logic             acc_sign,
  output logic [MAG_W-1:0] acc_mag,
  output logic             ovf
);

  logic             n_sign, n_ovf;
  logic [MAG_W-1:0] n_mag;

  sm_adder #(.MAG_W(MAG_W)) u_add (
    .a_sign(acc_sign), .a_mag(acc_mag), .b_sign(in_sign), .b_mag(in_mag),
    .s_sign(n_sign), .s_mag(n_mag), .ovf(n_ovf)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_sign <= 1'b0;
      acc_mag  <= '0;
      ovf      <= 1'b0;
    end else if (clr) begin
      acc_sign <= 1'b0;
      acc_mag  <= '0;
      ovf      <= 1'b0;
    end else if (add) begin
      acc_sign <= n_sign;
      acc_mag  <= n_mag;
      ovf      <= ovf | n_ovf;
    end
  end

endmodule
