// tb_s2u_conv: exhaustive test of the sign-magnitude to DAC-code converter.
//
// Every sign and magnitude is checked against code = 128 + value clamped to
// 0..255 (clip raised when clamped), negative zero giving 128. Every code is
// also round-tripped through u2s_conv's rule (value = code - 128).
module tb_s2u_conv;
  logic sign, clip;
  logic [7:0] mag, code;
  int checks = 0, failures = 0;

  s2u_conv dut (.*);

  initial begin
    for (int s = 0; s < 2; s++) begin
      for (int m = 0; m < 256; m++) begin
        int v, e;
        logic ec;
        sign = 1'(s); mag = 8'(m);
        #1;
        v  = s ? -m : m;
        e  = 128 + v;
        ec = 1'b0;
        if (e > 255) begin e = 255; ec = 1'b1; end
        if (e < 0)   begin e = 0;   ec = 1'b1; end
        checks++;
        if (code != 8'(e) || clip !== ec) begin
          failures++;
          $display("FAIL %0b-%0d: got %0d clip=%0b want %0d clip=%0b", s, m, code, clip, e, ec);
        end
      end
    end
    for (int c = 0; c < 256; c++) begin
      int v;
      v = c - 128;
      sign = (v < 0); mag = 8'((v < 0) ? -v : v);
      #1;
      checks++;
      if (code != 8'(c)) begin
        failures++;
        $display("FAIL round trip of code %0d gave %0d", c, code);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
