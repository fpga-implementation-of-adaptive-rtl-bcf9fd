// aic_control_unit: sequencer of the queue-structure canceler.
//
// The datapath runs on the fast processor clock (CLOCK2, nominally 8 MHz).
// The control unit steps once per CLOCK1 period, CLOCK1 = CLOCK2 / CLK_RATIO
// (500 kHz for the document's ratio of 16). Instead of a second clock net,
// CLOCK1 is a clock enable: COUNTER3 counts CLOCK2 cycles within a CLOCK1
// period and so times each multiplication window; COUNTER2 selects the tap
// pair loaded into a processor; COUNTER1 counts the CLOCK1 periods of an
// iteration and guides input and output. Three counters with these roles
// are the document's; that COUNTER3 doubles as the clock divider, and the
// sampling timer, are this design's choices.
//
// One iteration, started by the sampling timer every SAMPLE_CLKS CLOCK2
// cycles (8 kHz), takes 2*ORDER/2 + 5 = 33 CLOCK1 periods for ORDER = 28:
//   RD    read the sample converted during the previous period (RD, CS low)
//   WR    start the next conversion (WR, CS low), shift the delay line,
//         clear the accumulator
//   FILT  ORDER/2 periods, one tap pair each into PROCESSOR1
//   ERR   latch y and e = x - y
//   UPD   ORDER/2 periods, one weight pair each through PROCESSOR2
//   OUT   load the output register
//   DONE  COUNTER1 back to zero
// After reset one PRIME period starts the first conversion, so that every
// RD finds a finished one (the ADC needs about 100 us of the 125 us period).
//
// Interface: p1_done/p2_done from the processors; strobes, pair_sel and the
// ADC control lines (active low) out. Strobes are one CLOCK2 cycle long:
// *_start and acc_clr in the first cycle of a CLOCK1 period, adc_latch,
// err_latch, out_latch and iter_done in the last.
module aic_control_unit
  import aic_pkg::*;
#(
  parameter int unsigned ORDER       = 28,
  parameter int unsigned CLK_RATIO   = 16,
  parameter int unsigned SAMPLE_CLKS = 1000,
  localparam int unsigned NPAIR = ORDER / 2,
  localparam int unsigned PW    = (NPAIR > 1) ? $clog2(NPAIR) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          p1_done,
  input  logic          p2_done,
  output phase_t        phase,
  output logic [PW-1:0] pair_sel,
  output logic          ce1,        // last CLOCK2 cycle of a CLOCK1 period
  output logic          adc_cs_n,
  output logic          adc_rd_n,
  output logic          adc_wr_n,
  output logic          adc_latch,  // take the ADC data, push the delay line
  output logic          acc_clr,
  output logic          p1_start,
  output logic          p2_start,
  output logic          w_we,
  output logic          err_latch,
  output logic          out_latch,
  output logic          iter_done
);

  localparam int unsigned C3W    = (CLK_RATIO > 1) ? $clog2(CLK_RATIO) : 1;
  localparam int unsigned ITER   = 2 * NPAIR + 5;  // CLOCK1 periods per iteration
  localparam int unsigned C1W    = $clog2(ITER + 1);
  localparam int unsigned SW     = $clog2(SAMPLE_CLKS);

  logic [C3W-1:0] counter3;  // CLOCK2 cycles within a CLOCK1 period
  logic [C1W-1:0] counter1;  // CLOCK1 periods within an iteration
  logic [SW-1:0]  sample_tmr;
  logic           pending;   // a sampling instant has passed, not yet served
  logic           first;     // first CLOCK2 cycle of a CLOCK1 period

  assign ce1   = (counter3 == C3W'(CLK_RATIO - 1));
  assign first = (counter3 == '0);

  // COUNTER3 / CLOCK1 enable
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   counter3 <= '0;
    else if (ce1) counter3 <= '0;
    else          counter3 <= counter3 + 1'b1;
  end

  // sampling timer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sample_tmr <= '0;
      pending    <= 1'b0;
    end else begin
      if (sample_tmr == SW'(SAMPLE_CLKS - 1)) begin
        sample_tmr <= '0;
        pending    <= 1'b1;
      end else begin
        sample_tmr <= sample_tmr + 1'b1;
        if (ce1 && phase == PH_IDLE) pending <= 1'b0;
      end
    end
  end

  // phase sequencing, COUNTER1 and COUNTER2, stepped by CLOCK1
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= PH_PRIME;
      counter1 <= '0;
      pair_sel <= '0;
    end else if (ce1) begin
      counter1 <= (phase == PH_IDLE || phase == PH_PRIME || phase == PH_DONE)
                  ? '0 : counter1 + 1'b1;
      unique case (phase)
        PH_PRIME: phase <= PH_IDLE;
        PH_IDLE:  if (pending) phase <= PH_RD;
        PH_RD:    phase <= PH_WR;
        PH_WR: begin
          phase    <= PH_FILT;
          pair_sel <= '0;   // COUNTER2 reset
        end
        PH_FILT:
          if (pair_sel == PW'(NPAIR - 1)) begin
            phase    <= PH_ERR;
            pair_sel <= '0;
          end else begin
            pair_sel <= pair_sel + 1'b1;
          end
        PH_ERR: begin
          phase    <= PH_UPD;
          pair_sel <= '0;   // COUNTER2 reset again for the update
        end
        PH_UPD:
          if (pair_sel == PW'(NPAIR - 1)) begin
            phase    <= PH_OUT;
            pair_sel <= '0;
          end else begin
            pair_sel <= pair_sel + 1'b1;
          end
        PH_OUT:  phase <= PH_DONE;
        PH_DONE: phase <= PH_IDLE;
        default: phase <= PH_IDLE;
      endcase
    end
  end

  always_comb begin
    adc_cs_n  = !(phase == PH_RD || phase == PH_WR || phase == PH_PRIME);
    adc_rd_n  = (phase != PH_RD);
    adc_wr_n  = !(phase == PH_WR || phase == PH_PRIME);
    adc_latch = ce1 && phase == PH_RD;
    acc_clr   = first && phase == PH_WR;
    p1_start  = first && phase == PH_FILT;
    p2_start  = first && phase == PH_UPD;
    w_we      = p2_done && phase == PH_UPD;
    err_latch = ce1 && phase == PH_ERR;
    out_latch = ce1 && phase == PH_OUT;
    iter_done = ce1 && phase == PH_DONE;
  end

  // A processor operation must end inside its CLOCK1 period.
  logic p1_busy, p2_busy;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1_busy <= 1'b0;
      p2_busy <= 1'b0;
    end else begin
      if (p1_start)     p1_busy <= 1'b1;
      else if (p1_done) p1_busy <= 1'b0;
      if (p2_start)     p2_busy <= 1'b1;
      else if (p2_done) p2_busy <= 1'b0;
    end
  end

  a_p1_in_window: assert property (@(posedge clk) disable iff (!rst_n)
    ce1 |-> !p1_busy);
  a_p2_in_window: assert property (@(posedge clk) disable iff (!rst_n)
    ce1 |-> !p2_busy);

  initial begin
    assert (ITER * CLK_RATIO < SAMPLE_CLKS)
      else $error("an iteration does not fit in one sampling period");
  end

endmodule
