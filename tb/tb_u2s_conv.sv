// tb_u2s_conv: exhaustive test of the ADC-code to sign-magnitude converter.
//
// All 256 codes are checked against value = code - 128 expressed as sign and
// magnitude, with code 128 giving +0 and code 0 giving -128, plus the rows
// of the format table (255 -> +127, 127 -> -1, 1 -> -127, 0 -> -128).
module tb_u2s_conv;
  logic [7:0] code, mag;
  logic sign;
  int checks = 0, failures = 0;

  u2s_conv dut (.*);

  task automatic expect_sm(input int c, input logic s, input int m);
    code = 8'(c);
    #1;
    checks++;
    if (sign !== s || mag != 8'(m)) begin
      failures++;
      $display("FAIL code %0d: got %0b-%0d want %0b-%0d", c, sign, mag, s, m);
    end
  endtask

  initial begin
    expect_sm(255, 0, 127);
    expect_sm(254, 0, 126);
    expect_sm(128, 0, 0);
    expect_sm(127, 1, 1);
    expect_sm(1, 1, 127);
    expect_sm(0, 1, 128);
    for (int c = 0; c < 256; c++) begin
      int v;
      v = c - 128;
      expect_sm(c, v < 0, (v < 0) ? -v : v);
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
