// aic_sample_regs: input sample register and the delayed reference line.
//
// The canceler has no separate reference input: its reference is the input
// itself, delayed so that broadband interference decorrelates while the
// periodic signal stays correlated with its own past. On push the new
// sample x(n) enters; the register chain then holds x(n-1) ... x(n-LEN),
// LEN = DELAY + ORDER. Filter tap l (l = 0 .. ORDER-1) reads
// x(n - 1 - DELAY - l), so DELAY counts the extra delay elements in front of
// the tap line; with DELAY = 0 the reference is still one sample behind the
// primary input. The tap pair selected by pair_sel (taps 2p and 2p+1) is
// presented to the processors through two read multiplexers.
//
// Interface: push + din (8-bit format) in; pair_sel in; x_now (the primary
// input x(n)), xa (tap 2p), xb (tap 2p+1) out.
// Timing: one edge per push; the multiplexer outputs are combinational.
module aic_sample_regs
  import aic_pkg::*;
#(
  parameter int unsigned ORDER = 28,
  parameter int unsigned DELAY = 2,
  localparam int unsigned NPAIR = ORDER / 2,
  localparam int unsigned PW    = (NPAIR > 1) ? $clog2(NPAIR) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  sm8_t          din,
  input  logic [PW-1:0] pair_sel,
  output sm8_t          x_now,
  output sm8_t          xa,
  output sm8_t          xb
);

  localparam int unsigned LEN = DELAY + ORDER;

  sm8_t line [LEN];  // line[i] = x(n-1-i)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_now <= '0;
      for (int i = 0; i < LEN; i++) line[i] <= '0;
    end else if (push) begin
      x_now   <= din;
      line[0] <= x_now;
      for (int i = 1; i < LEN; i++) line[i] <= line[i-1];
    end
  end

  always_comb begin
    xa = line[DELAY + 2*pair_sel];
    xb = line[DELAY + 2*pair_sel + 1];
  end

  initial begin
    assert (ORDER >= 2 && ORDER % 2 == 0)
      else $error("ORDER must be even and at least 2");
  end

endmodule
