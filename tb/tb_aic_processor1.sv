// tb_aic_processor1: test of the filter-output processor.
//
// Random tap/weight pairs; checks x1*w1 + x2*w2 against integer arithmetic
// (sign-magnitude, saturated at 16 bits) and that done comes exactly 12
// edges after start, inside the 16-cycle CLOCK1 window.
module tb_aic_processor1;
  logic clk = 0, rst_n = 0, start = 0;
  logic x1_sign, w1_sign, x2_sign, w2_sign, sum_sign, ovf, done;
  logic [7:0] x1_mag, w1_mag, x2_mag, w2_mag;
  logic [15:0] sum_mag;
  int checks = 0, failures = 0;

  aic_processor1 dut (.*);
  always #5 clk = ~clk;

  task automatic run_one();
    int a, b, s, m, lat;
    logic es, eo;
    @(negedge clk);
    x1_sign = 1'($urandom); x1_mag = 8'($urandom);
    w1_sign = 1'($urandom); w1_mag = 8'($urandom);
    x2_sign = 1'($urandom); x2_mag = 8'($urandom);
    w2_sign = 1'($urandom); w2_mag = 8'($urandom);
    if ($urandom_range(0, 9) == 0) begin x2_mag = x1_mag; w2_mag = w1_mag; end
    a = int'(x1_mag) * int'(w1_mag); if (x1_sign ^ w1_sign) a = -a;
    b = int'(x2_mag) * int'(w2_mag); if (x2_sign ^ w2_sign) b = -b;
    s = a + b;
    m = (s < 0) ? -s : s;
    es = (s == 0) ? (x1_sign ^ w1_sign) : (s < 0);
    eo = (m > 65535);
    if (eo) m = 65535;
    start = 1;
    @(posedge clk); #1 start = 0;
    lat = 0;
    do begin @(posedge clk); lat++; end while (!done && lat < 40);
    checks++;
    if (lat - 1 != 12) begin failures++; $display("FAIL latency %0d", lat - 1); end
    checks++;
    if (sum_sign !== es || int'(sum_mag) != m || ovf !== eo) begin
      failures++;
      $display("FAIL got %0b-%0d want %0b-%0d", sum_sign, sum_mag, es, m);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2000) run_one();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
