// tb_aic_weight_regs: test of the weight registers.
//
// Checks that all weights read zero after reset, then performs random pair
// writes and random reads against a reference array; a cycle with we low
// must not write.
module tb_aic_weight_regs;
  import aic_pkg::*;
  localparam int ORDER = 28;
  logic clk = 0, rst_n = 0, we = 0;
  logic [3:0] pair_sel;
  sm8_t wa_in, wb_in, wa, wb;
  sm8_t model [ORDER];
  int checks = 0, failures = 0;

  aic_weight_regs dut (.*);
  always #5 clk = ~clk;

  task automatic check_pair(input int p);
    pair_sel = 4'(p);
    #1;
    checks++;
    if (wa != model[2*p] || wb != model[2*p+1]) begin
      failures++;
      $display("FAIL pair %0d", p);
    end
  endtask

  initial begin
    pair_sel = 0; wa_in = '0; wb_in = '0;
    foreach (model[i]) model[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < ORDER / 2; p++) check_pair(p);
    repeat (2000) begin
      int p;
      @(negedge clk);
      p = int'($urandom_range(0, ORDER / 2 - 1));
      pair_sel = 4'(p);
      wa_in = sm8_t'($urandom); wb_in = sm8_t'($urandom);
      we = ($urandom_range(0, 3) != 0);
      if (we) begin model[2*p] = wa_in; model[2*p+1] = wb_in; end
      @(negedge clk);
      we = 0;
      check_pair(int'($urandom_range(0, ORDER / 2 - 1)));
      check_pair(p);
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
