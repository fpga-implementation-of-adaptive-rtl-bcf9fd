// tb_sm_narrow: test of the 16-bit to 8-bit format conversion.
//
// Checks the document's example (0.5 * 0.3: 64 * 38 = 2432 -> 19) and random
// 16-bit magnitudes against value >> 7, saturated to 255.
module tb_sm_narrow;
  logic in_sign, out_sign, sat;
  logic [15:0] in_mag;
  logic [7:0] out_mag;
  int checks = 0, failures = 0;

  sm_narrow dut (.*);

  initial begin
    in_sign = 0; in_mag = 16'(64 * 38); #1;
    checks++;
    if (out_mag != 19 || sat) begin failures++; $display("FAIL example: %0d", out_mag); end
    repeat (5000) begin
      int q;
      in_sign = 1'($urandom); in_mag = 16'($urandom);
      #1;
      q = int'(in_mag) >> 7;
      checks++;
      if (out_sign !== in_sign || out_mag != 8'((q > 255) ? 255 : q) || sat !== (q > 255)) begin
        failures++;
        $display("FAIL %0d: got %0d sat=%0b", in_mag, out_mag, sat);
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
