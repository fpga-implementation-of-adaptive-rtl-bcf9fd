// tb_aic_control_unit: test of the sequencer at its default parameters.
//
// Stand-in processors answer each start with done 12 cycles later. For 20
// iterations the testbench checks: the priming conversion start after
// reset; one iteration per 1000-cycle sampling period on average (single
// periods may be one CLOCK1 period, 16 cycles, early or late because 1000
// is not a multiple of 16); 33 CLOCK1 periods = 528 CLOCK2 cycles from the
// start of RD to iter_done; the order RD, WR, ORDER/2 PROCESSOR1 starts with
// pair_sel 0..13, error latch, ORDER/2 PROCESSOR2 starts with pair_sel
// 0..13 and as many weight writes, output latch; and that every start falls
// on the first cycle of a CLOCK1 period.
module tb_aic_control_unit;
  import aic_pkg::*;
  logic clk = 0, rst_n = 0;
  logic p1_done, p2_done;
  phase_t phase;
  logic [3:0] pair_sel;
  logic ce1, adc_cs_n, adc_rd_n, adc_wr_n, adc_latch, acc_clr;
  logic p1_start, p2_start, w_we, err_latch, out_latch, iter_done;
  int checks = 0, failures = 0;
  longint cyc = 0;

  aic_control_unit dut (.*);
  always #5 clk = ~clk;

  // stand-in processors: done 12 edges after the start edge
  logic [11:0] sh1, sh2;
  always_ff @(posedge clk) begin
    sh1 <= {sh1[10:0], p1_start};
    sh2 <= {sh2[10:0], p2_start};
  end
  assign p1_done = sh1[11];
  assign p2_done = sh2[11];

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %0s", cyc, msg);
  endtask

  // per-iteration bookkeeping
  longint t_rd, t_prev_rd = -1, t_first_rd = -1;
  int n1, n2, nwe, step;  // step: 0 RD 1 WR 2 FILT 3 ERR 4 UPD 5 OUT 6 DONE
  int iters = 0;
  logic rd_q = 1, prime_seen = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (cyc < 20 && !adc_wr_n && !adc_cs_n) prime_seen = 1;
    // RD falling: a new iteration
    if (!adc_rd_n && rd_q) begin
      t_rd = cyc;
      if (t_first_rd < 0) t_first_rd = cyc;
      if (t_prev_rd >= 0) begin
        checks++;
        if (t_rd - t_prev_rd < 984 || t_rd - t_prev_rd > 1016)
          fail($sformatf("iteration spacing %0d", t_rd - t_prev_rd));
      end
      t_prev_rd = t_rd;
      n1 = 0; n2 = 0; nwe = 0; step = 0;
      checks++;
      if (adc_cs_n) fail("RD without CS");
    end
    rd_q = adc_rd_n;
    if (adc_latch) begin
      checks++;
      if (step != 0 || adc_rd_n) fail("ADC latch outside RD");
      step = 1;
    end
    if (acc_clr) begin
      checks++;
      if (step != 1 || adc_wr_n || adc_cs_n) fail("accumulator clear outside WR");
      step = 2;
    end
    if (p1_start) begin
      checks += 2;
      if (step != 2) fail("PROCESSOR1 start out of order");
      if (int'(pair_sel) != n1) fail($sformatf("p1 pair %0d want %0d", pair_sel, n1));
      if (ce1 || dut.counter3 != 0) fail("p1 start not at CLOCK1 period start");
      n1++;
    end
    if (err_latch) begin
      checks++;
      if (n1 != 14) fail($sformatf("%0d PROCESSOR1 starts", n1));
      step = 3;
    end
    if (p2_start) begin
      checks += 2;
      if (step != 3) fail("PROCESSOR2 start out of order");
      if (int'(pair_sel) != n2) fail($sformatf("p2 pair %0d want %0d", pair_sel, n2));
      n2++;
    end
    if (w_we) begin
      checks++;
      if (int'(pair_sel) != n2 - 1) fail("weight write to wrong pair");
      nwe++;
    end
    if (out_latch) begin
      checks += 2;
      if (n2 != 14) fail($sformatf("%0d PROCESSOR2 starts", n2));
      if (nwe != 14) fail($sformatf("%0d weight writes", nwe));
      step = 5;
    end
    if (iter_done) begin
      checks += 2;
      if (step != 5) fail("iteration ended without output");
      if (cyc - t_rd + 1 != 33 * 16)
        fail($sformatf("iteration took %0d cycles, want 528", cyc - t_rd + 1));
      iters++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (iters == 20);
    @(posedge clk);
    checks++;
    if (!prime_seen) fail("no priming conversion start after reset");
    // average rate: 19 periods between the first and the last RD
    checks++;
    if (t_prev_rd - t_first_rd < 19 * 1000 - 16 || t_prev_rd - t_first_rd > 19 * 1000 + 16)
      fail($sformatf("19 periods took %0d cycles", t_prev_rd - t_first_rd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
