// tb_aic_sample_regs: test of the input delay line and tap multiplexers.
//
// Pushes 100 random samples into the default line (ORDER 28, DELAY 2) and
// after each push reads every tap pair, comparing tap l with the sample
// pushed 1 + DELAY + l pushes earlier (zero before that), and x_now with the
// newest sample. Cycles without push must leave the line unchanged.
module tb_aic_sample_regs;
  import aic_pkg::*;
  localparam int ORDER = 28, DELAY = 2;
  logic clk = 0, rst_n = 0, push = 0;
  sm8_t din, x_now, xa, xb;
  logic [3:0] pair_sel;
  sm8_t hist [$];
  int checks = 0, failures = 0;

  aic_sample_regs dut (.*);
  always #5 clk = ~clk;

  function automatic sm8_t past(input int k);  // sample pushed k pushes ago
    if (k < hist.size()) return hist[hist.size() - 1 - k];
    return '0;
  endfunction

  initial begin
    din = '0; pair_sel = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (100) begin
      @(negedge clk);
      din = sm8_t'($urandom);
      push = 1;
      hist.push_back(din);
      @(negedge clk);
      push = 0;
      din = sm8_t'($urandom);
      @(negedge clk);
      checks++;
      if (x_now != past(0)) begin failures++; $display("FAIL x_now"); end
      for (int p = 0; p < ORDER / 2; p++) begin
        pair_sel = 4'(p);
        #1;
        checks++;
        if (xa != past(1 + DELAY + 2 * p) || xb != past(2 + DELAY + 2 * p)) begin
          failures++;
          $display("FAIL pair %0d after %0d pushes", p, hist.size());
        end
      end
    end
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
