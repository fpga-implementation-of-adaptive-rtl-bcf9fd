// tb_aic_processor2: test of the weight-update processor.
//
// Random x, e and w on both paths at SHIFT = 10 (2*mu = 1/8); checks
// w' = w + trunc(|x*e| / 2^10) with sign, each stage saturated at 255, and
// the 12-edge latency. The operand inputs are changed right after start to
// check that the processor holds what it sampled.
module tb_aic_processor2;
  logic clk = 0, rst_n = 0, start = 0;
  logic x1_sign, e1_sign, w1_sign, x2_sign, e2_sign, w2_sign;
  logic [7:0] x1_mag, e1_mag, w1_mag, x2_mag, e2_mag, w2_mag;
  logic w1n_sign, w2n_sign, sat, done;
  logic [7:0] w1n_mag, w2n_mag;
  int checks = 0, failures = 0;
  int n_sat = 0;

  aic_processor2 dut (.*);
  always #5 clk = ~clk;

  function automatic int ref_w(input logic xs, input int xm, input logic es, input int em,
                               input logic ws, input int wm, output logic osat);
    int d, r, wv;
    d = (xm * em) >> 10;
    osat = (d > 255);
    if (d > 255) d = 255;
    if (xs ^ es) d = -d;
    wv = ws ? -wm : wm;
    r = wv + d;
    if (r > 255)  begin r = 255;  osat = 1; end
    if (r < -255) begin r = -255; osat = 1; end
    return r;
  endfunction

  task automatic run_one();
    int r1, r2, lat, g1, g2;
    logic s1, s2;
    @(negedge clk);
    x1_sign = 1'($urandom); x1_mag = 8'($urandom);
    e1_sign = 1'($urandom); e1_mag = 8'($urandom);
    w1_sign = 1'($urandom); w1_mag = 8'($urandom);
    x2_sign = 1'($urandom); x2_mag = 8'($urandom);
    e2_sign = 1'($urandom); e2_mag = 8'($urandom);
    w2_sign = 1'($urandom); w2_mag = 8'($urandom);
    r1 = ref_w(x1_sign, x1_mag, e1_sign, e1_mag, w1_sign, w1_mag, s1);
    r2 = ref_w(x2_sign, x2_mag, e2_sign, e2_mag, w2_sign, w2_mag, s2);
    start = 1;
    @(posedge clk); #1 start = 0;
    w1_mag = 8'($urandom); w2_mag = 8'($urandom); x1_mag = 8'($urandom); e2_mag = 8'($urandom);
    lat = 0;
    do begin @(posedge clk); lat++; end while (!done && lat < 40);
    checks++;
    if (lat - 1 != 12) begin failures++; $display("FAIL latency %0d", lat - 1); end
    g1 = w1n_sign ? -int'(w1n_mag) : int'(w1n_mag);
    g2 = w2n_sign ? -int'(w2n_mag) : int'(w2n_mag);
    checks += 3;
    if (g1 != r1) begin failures++; $display("FAIL path1 got %0d want %0d", g1, r1); end
    if (g2 != r2) begin failures++; $display("FAIL path2 got %0d want %0d", g2, r2); end
    if (sat !== (s1 | s2)) begin failures++; $display("FAIL sat flag"); end
    if (sat) n_sat++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3000) run_one();
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
