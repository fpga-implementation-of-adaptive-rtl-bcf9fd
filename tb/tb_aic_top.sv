// tb_aic_top: end-to-end test of the canceler at its default parameters
// (ORDER 28, DELAY 2, MU_SHIFT 3, CLOCK2 = 8 MHz, CLOCK1 = CLOCK2 / 16,
// 8 kHz sampling).
//
// A behavioural ADC0804 converts a sine of 3.0 V peak-to-peak on a 2 V
// offset plus broadband interference (uniform, +-0.3 V, i.e. 20 % of the
// sine's peak) over a 0..4 V span. Three tones are run in turn, each after a
// reset: 600 Hz (the prototype's bench test), 300 Hz and 700 Hz (its two
// hardware simulations). The testbench keeps its own integer
// model of the canceler, fed with the codes the ADC put on the bus, and
// after every iteration compares y, e, the DAC code and all 28 weights with
// it. It also checks the timing (528 CLOCK2 cycles from RD to the end of an
// iteration, 1000 cycles per sample on average), that no read hit a running
// conversion, and that the canceler reduces the interference: over the last
// half of the run the error of y against the clean sine must have less
// power than that of the input. Each mechanism of the datapath (both
// branches of both converters, the two-path pair sum with a borrow,
// truncated and non-zero weight steps, accumulation across all pairs) is
// counted and must occur.
module tb_aic_top;
  timeunit 1ns;
  timeprecision 1ps;
  import aic_pkg::*;

  // mirror of aic_top's defaults, for the reference model
  localparam int ORDER = 28, DELAY = 2, MU_SHIFT = 3;
  localparam int NSAMP = 3000;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  logic [7:0] adc_data, dac_data;
  logic adc_cs_n, adc_rd_n, adc_wr_n, adc_intr_n;
  sm8_t y_out, e_out;
  logic sample_done, ovf;
  real  vin = 2.0;
  int   conversions, busy_read;

  aic_top dut (.*);

  adc0804_model u_adc (
    .cs_n(adc_cs_n), .rd_n(adc_rd_n), .wr_n(adc_wr_n), .vin,
    .intr_n(adc_intr_n), .db(adc_data), .conversions, .busy_read
  );

  always #62.5ns clk = ~clk;   // CLOCK2 = 8 MHz

  int checks = 0, failures = 0;
  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL: %0s", msg);
  endtask

  // ---------------- stimulus: a new analog value per conversion ----------
  int   conv_idx = 0;
  real  freq = 600.0;
  real  clean_v [$];   // clean sine (volts above the offset) per conversion
  always @(negedge adc_wr_n) begin
    real s, n;
    s = 1.5 * $sin(2.0 * PI * freq * real'(conv_idx) / 8000.0);
    n = 0.3 * (2.0 * real'($urandom_range(0, 1000000)) / 1000000.0 - 1.0);
    clean_v.push_back(s);
    vin = 2.0 + s + n;
    conv_idx++;
  end

  // ---------------- reference model ---------------------------------------
  int hist [$];          // input samples, newest last
  int w [ORDER];
  int code_q [$];        // codes read from the bus
  int clean_q [$];       // matching clean sine, in code units
  int n_pos_in = 0, n_neg_in = 0, n_pos_out = 0, n_neg_out = 0;
  int n_borrow = 0, n_dual = 0, n_trunc = 0, n_step = 0, n_acc_multi = 0;

  function automatic int clamp(input int v, input int m);
    return (v > m) ? m : ((v < -m) ? -m : v);
  endfunction
  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction
  function automatic int sgn_of(input int v);
    return (v < 0) ? -1 : 1;
  endfunction
  function automatic int tap(input int l);   // x(n-1-DELAY-l)
    int k;
    k = hist.size() - 2 - DELAY - l;
    return (k >= 0) ? hist[k] : 0;
  endfunction

  logic rd_q = 1'b1;
  int   rd_count = 0;
  always @(posedge clk) begin
    if (!adc_rd_n && !adc_cs_n) begin
      if (rd_q) begin
        code_q.push_back(int'(adc_data));
        // the conversion being read is the one started most recently
        clean_q.push_back(int'($floor(clean_v[clean_v.size() - 1] * 64.0 + 0.5)));
        rd_count++;
      end
    end
    rd_q <= adc_rd_n;
  end

  // ---------------- per-iteration comparison -----------------------------
  longint cyc = 0, t_rd = 0, t_first_rd = -1, t_last_rd = 0;
  always @(posedge clk) begin
    cyc++;
    if (!adc_rd_n && rd_q) begin
      t_rd = cyc;
      if (t_first_rd < 0) t_first_rd = cyc;
      t_last_rd = cyc;
    end
  end

  int iters = 0;
  real p_in = 0.0, p_out = 0.0;
  always @(posedge clk) if (rst_n && sample_done) begin
    int x, acc, y, e, pair, p1, p2, dac, dcode, clean, active;
    #1;  // let the output register settle after this edge
    x = code_q.pop_front() - 128;
    clean = clean_q.pop_front();
    if (x >= 0) n_pos_in++; else n_neg_in++;
    hist.push_back(x);
    acc = 0;
    active = 0;
    for (int p = 0; p < ORDER / 2; p++) begin
      p1 = tap(2*p) * w[2*p];
      p2 = tap(2*p+1) * w[2*p+1];
      if (p1 != 0 && p2 != 0) n_dual++;
      if (p1 != 0 && p2 != 0 && sgn_of(p1) != sgn_of(p2) && iabs(p1) < iabs(p2)) n_borrow++;
      pair = clamp(p1 + p2, 65535);
      if (pair != 0) active++;
      acc = clamp(acc + pair, 65535);
    end
    if (active > 1) n_acc_multi++;
    y = sgn_of(acc) * ((iabs(acc) >> 7) > 255 ? 255 : (iabs(acc) >> 7));
    e = clamp(x - y, 255);
    for (int l = 0; l < ORDER; l++) begin
      int pr, d;
      pr = tap(l) * e;
      d  = iabs(pr) >> (7 + MU_SHIFT);
      if (d > 255) d = 255;
      if (pr != 0 && d == 0) n_trunc++;
      if (d != 0) n_step++;
      w[l] = clamp(w[l] + sgn_of(pr) * d, 255);
    end
    dac = 128 + y;
    if (dac > 255) dac = 255;
    if (dac < 0)   dac = 0;
    if (y >= 0) n_pos_out++; else n_neg_out++;

    checks += 4;
    if ((y_out.sign ? -int'(y_out.mag) : int'(y_out.mag)) != y)
      fail($sformatf("iter %0d: y %0b-%0d, model %0d", iters, y_out.sign, y_out.mag, y));
    if ((e_out.sign ? -int'(e_out.mag) : int'(e_out.mag)) != e)
      fail($sformatf("iter %0d: e %0b-%0d, model %0d", iters, e_out.sign, e_out.mag, e));
    dcode = int'(dac_data);
    if (dcode != dac) fail($sformatf("iter %0d: dac %0d, model %0d", iters, dcode, dac));
    begin
      int bad;
      bad = 0;
      for (int l = 0; l < ORDER; l++) begin
        int gw;
        gw = dut.u_weights.w[l].sign ? -int'(dut.u_weights.w[l].mag) : int'(dut.u_weights.w[l].mag);
        if (gw != w[l]) bad++;
      end
      if (bad != 0) fail($sformatf("iter %0d: %0d weights differ", iters, bad));
    end
    checks++;
    if (cyc - t_rd + 1 != 528) fail($sformatf("iteration took %0d cycles", cyc - t_rd + 1));
    if (iters >= NSAMP / 2) begin
      p_in  += real'((x - clean) * (x - clean));
      p_out += real'((y - clean) * (y - clean));
    end
    iters++;
  end

  real tones [3] = '{600.0, 300.0, 700.0};

  initial begin
    foreach (tones[ti]) begin
      freq = tones[ti];
      #1 rst_n = 0;
      repeat (4) @(posedge clk);
      // model and bookkeeping start afresh with the design
      hist.delete(); code_q.delete(); clean_q.delete();
      foreach (w[l]) w[l] = 0;
      iters = 0; p_in = 0.0; p_out = 0.0; t_first_rd = -1;
      #1 rst_n = 1;
      wait (iters == NSAMP);
      #1000;
      check_tone();
    end
    $display("mechanisms: pos_in=%0d neg_in=%0d pos_out=%0d neg_out=%0d dual=%0d borrow=%0d trunc=%0d step=%0d acc_multi=%0d",
             n_pos_in, n_neg_in, n_pos_out, n_neg_out, n_dual, n_borrow, n_trunc, n_step, n_acc_multi);
    checks += 9;
    if (n_pos_in == 0)    fail("no positive input sample");
    if (n_neg_in == 0)    fail("no negative input sample");
    if (n_pos_out == 0)   fail("no positive output");
    if (n_neg_out == 0)   fail("no negative output");
    if (n_dual == 0)      fail("dual path never carried two products");
    if (n_borrow == 0)    fail("pair sum never took the borrow path");
    if (n_trunc == 0)     fail("no weight step truncated to zero");
    if (n_step == 0)      fail("no non-zero weight step");
    if (n_acc_multi == 0) fail("accumulator never summed several pairs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_tone();
    checks++;
    if (busy_read != 0) fail($sformatf("%0d reads during a conversion", busy_read));
    checks++;
    if (t_last_rd - t_first_rd < longint'(NSAMP - 1) * 1000 - 16 ||
        t_last_rd - t_first_rd > longint'(NSAMP - 1) * 1000 + 16)
      fail($sformatf("sampling: %0d cycles for %0d periods", t_last_rd - t_first_rd, NSAMP - 1));
    checks++;
    if (ovf) fail("a stage saturated");
    $display("%0.0f Hz: interference power (code^2, last %0d samples): input %0.1f, output %0.1f, ratio %0.3f",
             freq, NSAMP - NSAMP / 2, p_in / (NSAMP / 2), p_out / (NSAMP / 2), p_out / p_in);
    checks++;
    if (!(p_out < p_in)) fail($sformatf("no interference reduction at %0.0f Hz", freq));
  endtask

  initial begin
    repeat ((3 * NSAMP + 60) * 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
