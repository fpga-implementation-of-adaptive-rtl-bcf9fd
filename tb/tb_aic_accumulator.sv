// tb_aic_accumulator: test of the sign-magnitude accumulator.
//
// Adds random runs of 14 signed 16-bit values after each clear and compares
// with an integer running sum (saturating in magnitude at 65535, the sticky
// ovf flag set once it has saturated). Idle cycles with add low must hold.
module tb_aic_accumulator;
  logic clk = 0, rst_n = 0, clr = 0, add = 0;
  logic in_sign, acc_sign, ovf;
  logic [15:0] in_mag, acc_mag;
  int checks = 0, failures = 0, n_ovf = 0;

  aic_accumulator dut (.*);
  always #5 clk = ~clk;

  initial begin
    in_sign = 0; in_mag = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (400) begin
      int ref_v, big;
      logic ref_o;
      @(negedge clk); clr = 1;
      @(negedge clk); clr = 0;
      ref_v = 0; ref_o = 0;
      big = ($urandom_range(0, 3) == 0) ? 65535 : 8000;
      for (int i = 0; i < 14; i++) begin
        int v, sv;
        logic ref_sign;
        v = int'($urandom_range(0, big));
        in_sign = 1'($urandom); in_mag = 16'(v);
        sv = in_sign ? -v : v;
        add = 1;
        @(negedge clk);
        add = 0;
        ref_v = ref_v + sv;
        if (ref_v > 65535)  begin ref_v = 65535;  ref_o = 1; end
        if (ref_v < -65535) begin ref_v = -65535; ref_o = 1; end
        @(negedge clk);  // idle cycle: must hold
        checks++;
        if ((acc_sign ? -int'(acc_mag) : int'(acc_mag)) != ref_v || ovf !== ref_o) begin
          failures++;
          $display("FAIL step %0d: got %0b-%0d ovf=%0b want %0d ovf=%0b",
                   i, acc_sign, acc_mag, ovf, ref_v, ref_o);
        end
      end
      if (ref_o) n_ovf++;
    end
    checks++;
    if (n_ovf == 0) begin failures++; $display("FAIL overflow never exercised"); end
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
