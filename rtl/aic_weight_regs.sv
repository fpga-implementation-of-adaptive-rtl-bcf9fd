// aic_weight_regs: the ORDER filter weights with pair read and write ports.
//
// The weights are kept in data registers, cleared to zero on reset (the
// document gives no starting weights; zero is this design's choice). Two
// read multiplexers present weights 2p and 2p+1 for pair_sel = p to the
// processors, and on we the two updated weights from PROCESSOR2 are written
// back to the same pair.
//
// Interface: pair_sel, we, wa_in, wb_in in; wa, wb out (8-bit format).
// Timing: write on the clock edge with we high; reads are combinational.
module aic_weight_regs
  import aic_pkg::*;
#(
  parameter int unsigned ORDER = 28,
  localparam int unsigned NPAIR = ORDER / 2,
  localparam int unsigned PW    = (NPAIR > 1) ? $clog2(NPAIR) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [PW-1:0] pair_sel,
  input  logic          we,
  input  sm8_t          wa_in,
  input  sm8_t          wb_in,
  output sm8_t          wa,
  output sm8_t          wb
);

  sm8_t w [ORDER];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ORDER; i++) w[i] <= '0;
    end else if (we) begin
      w[2*pair_sel]     <= wa_in;
      w[2*pair_sel + 1] <= wb_in;
    end
  end

  always_comb begin
    wa = w[2*pair_sel];
    wb = w[2*pair_sel + 1];
  end

endmodule
