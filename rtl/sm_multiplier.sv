// sm_multiplier: sequential shift-and-add sign-magnitude multiplier.
//
// The W-bit magnitudes are multiplied one multiplier bit per clock: the
// multiplicand is added into the upper half of a 2W-bit partial-product
// register whenever the bit shifted out at the bottom is 1, and the register
// shifts right. The product sign is the XOR of the operand signs. The
// document gives the method, the XOR sign rule and the 11-cycle latency of
// the 8-bit unit; the split of those cycles (one to load, W shift-add steps,
// one to set the sign, one to raise done) is this design's choice.
//
// Interface: start (one-cycle pulse) samples a and b; p_sign/p_mag hold the
// product from the cycle done is high until the next start. busy is high
// while a multiplication runs; a start while busy is ignored.
// Timing: done is high in the cycle that follows the (W+3)-th rising edge
// after the edge that sampled start, i.e. 11 edges for W = 8.
module sm_multiplier #(
  parameter int unsigned W = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           a_sign,
  input  logic [W-1:0]   a_mag,
  input  logic           b_sign,
  input  logic [W-1:0]   b_mag,
  output logic           p_sign,
  output logic [2*W-1:0] p_mag,
  output logic           busy,
  output logic           done
);

  typedef enum logic [2:0] {M_IDLE, M_LOAD, M_STEP, M_SIGN, M_DONE} mstate_t;

  localparam int unsigned CW = $clog2(W + 1);

  mstate_t        state;
  logic [W-1:0]   mcand;     // multiplicand
  logic           sgn;       // product sign
  logic [2*W-1:0] pp;        // {upper partial sum, remaining multiplier bits}
  logic [CW-1:0]  step;
  logic [W:0]     upper_sum; // upper half plus multiplicand, with carry

  assign upper_sum = {1'b0, pp[2*W-1:W]} + (pp[0] ? {1'b0, mcand} : '0);
  assign busy      = (state != M_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= M_IDLE;
      mcand  <= '0;
      sgn    <= 1'b0;
      pp     <= '0;
      step   <= '0;
      p_sign <= 1'b0;
      p_mag  <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        M_IDLE: if (start) begin
          mcand <= a_mag;
          sgn   <= a_sign ^ b_sign;
          pp    <= {{W{1'b0}}, b_mag};
          state <= M_LOAD;
        end
        M_LOAD: begin
          step  <= '0;
          state <= M_STEP;
        end
        M_STEP: begin
          pp   <= {upper_sum, pp[W-1:1]};
          step <= step + 1'b1;
          if (step == CW'(W - 1)) state <= M_SIGN;
        end
        M_SIGN: begin
          p_sign <= sgn;
          p_mag  <= pp;
          state  <= M_DONE;
        end
        M_DONE: begin
          done  <= 1'b1;
          state <= M_IDLE;
        end
        default: state <= M_IDLE;
      endcase
    end
  end

endmodule
