// aic_env: one canceler configuration under test, for tb_aic_table51.
//
// Holds an aic_top with the given parameters, its own CLOCK2 (8 MHz unless
// SAMPLE_CLKS is raised, in which case the clock is read as faster and the
// sample period stays 125 us), a behavioural ADC0804 and an integer
// reference model of the canceler. The analog input is the sum of three
// sines (300, 700 and 800 Hz) taking SIG_PCT percent of the 4 V input span
// and uniform broadband interference taking the rest. After every iteration
// y, e, the DAC code and all weights are compared with the model. When
// NSAMP iterations are done, done rises and ratio holds the interference
// power at the output divided by that at the input over the last half.
module aic_env #(
  parameter int ORDER       = 32,
  parameter int DELAY       = 2,
  parameter int MU_SHIFT    = 7,
  parameter int SAMPLE_CLKS = 1000,
  parameter int SIG_PCT     = 80,
  parameter int NSAMP       = 2000
) (
  output logic done,
  output int   checks,
  output int   failures,
  output real  ratio
);
  timeunit 1ns;
  timeprecision 1ps;
  import aic_pkg::*;

  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  logic [7:0] adc_data, dac_data;
  logic adc_cs_n, adc_rd_n, adc_wr_n, adc_intr_n;
  sm8_t y_out, e_out;
  logic sample_done, ovf;
  real  vin = 2.0;
  int   conversions, busy_read;

  aic_top #(.ORDER(ORDER), .DELAY(DELAY), .MU_SHIFT(MU_SHIFT), .SAMPLE_CLKS(SAMPLE_CLKS)) dut (.*);

  adc0804_model u_adc (
    .cs_n(adc_cs_n), .rd_n(adc_rd_n), .wr_n(adc_wr_n), .vin,
    .intr_n(adc_intr_n), .db(adc_data), .conversions, .busy_read
  );

  // 125 us per sample: half period = 62.5 us / SAMPLE_CLKS
  always #(62500.0 / SAMPLE_CLKS) clk = ~clk;

  task automatic fail(input string msg);
    failures++;
    if (failures < 10) $display("FAIL (ORDER %0d DELAY %0d MU %0d SIG %0d): %0s",
                                ORDER, DELAY, MU_SHIFT, SIG_PCT, msg);
  endtask

  int  conv_idx = 0;
  real clean_v [$];
  always @(negedge adc_wr_n) begin
    real a, t, s, n;
    a = 2.0 * real'(SIG_PCT) / 100.0 / 3.0;
    t = real'(conv_idx) / 8000.0;
    s = a * ($sin(2.0 * PI * 300.0 * t) + $sin(2.0 * PI * 700.0 * t) + $sin(2.0 * PI * 800.0 * t));
    n = 2.0 * real'(100 - SIG_PCT) / 100.0 * (2.0 * real'($urandom_range(0, 1000000)) / 1000000.0 - 1.0);
    clean_v.push_back(s);
    vin = 2.0 + s + n;
    conv_idx++;
  end

  // ---------------- reference model ---------------------------------------
  int hist [$];
  int w [ORDER];
  int code_q [$], clean_q [$];

  function automatic int clamp(input int v, input int m);
    return (v > m) ? m : ((v < -m) ? -m : v);
  endfunction
  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction
  function automatic int sgn_of(input int v);
    return (v < 0) ? -1 : 1;
  endfunction
  function automatic int tap(input int l);
    int k;
    k = hist.size() - 2 - DELAY - l;
    return (k >= 0) ? hist[k] : 0;
  endfunction

  logic rd_q = 1'b1;
  always @(posedge clk) begin
    if (!adc_rd_n && !adc_cs_n && rd_q) begin
      code_q.push_back(int'(adc_data));
      clean_q.push_back(int'($floor(clean_v[clean_v.size() - 1] * 64.0 + 0.5)));
    end
    rd_q <= adc_rd_n;
  end

  int  iters = 0;
  real p_in = 0.0, p_out = 0.0;
  always @(posedge clk) if (rst_n && sample_done && !done) begin
    int x, acc, y, e, dac, clean, bad;
    #1;
    x = code_q.pop_front() - 128;
    clean = clean_q.pop_front();
    hist.push_back(x);
    acc = 0;
    for (int p = 0; p < ORDER / 2; p++)
      acc = clamp(acc + clamp(tap(2*p) * w[2*p] + tap(2*p+1) * w[2*p+1], 65535), 65535);
    y = sgn_of(acc) * ((iabs(acc) >> 7) > 255 ? 255 : (iabs(acc) >> 7));
    e = clamp(x - y, 255);
    for (int l = 0; l < ORDER; l++) begin
      int pr, d;
      pr = tap(l) * e;
      d  = iabs(pr) >> (7 + MU_SHIFT);
      if (d > 255) d = 255;
      w[l] = clamp(w[l] + sgn_of(pr) * d, 255);
    end
    dac = 128 + y;
    if (dac > 255) dac = 255;
    if (dac < 0)   dac = 0;
    checks += 4;
    if ((y_out.sign ? -int'(y_out.mag) : int'(y_out.mag)) != y) fail($sformatf("iter %0d: y", iters));
    if ((e_out.sign ? -int'(e_out.mag) : int'(e_out.mag)) != e) fail($sformatf("iter %0d: e", iters));
    if (int'(dac_data) != dac) fail($sformatf("iter %0d: dac", iters));
    bad = 0;
    for (int l = 0; l < ORDER; l++)
      if ((dut.u_weights.w[l].sign ? -int'(dut.u_weights.w[l].mag) : int'(dut.u_weights.w[l].mag)) != w[l])
        bad++;
    if (bad != 0) fail($sformatf("iter %0d: %0d weights differ", iters, bad));
    if (iters >= NSAMP / 2) begin
      p_in  += real'((x - clean) * (x - clean));
      p_out += real'((y - clean) * (y - clean));
    end
    iters++;
    if (iters == NSAMP) begin
      checks++;
      if (busy_read != 0) fail("read during a conversion");
      ratio = (p_in > 0.0) ? p_out / p_in : 0.0;
      done  = 1'b1;
    end
  end

  initial begin
    done = 1'b0; checks = 0; failures = 0; ratio = 0.0;
    foreach (w[l]) w[l] = 0;
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
  end
endmodule
