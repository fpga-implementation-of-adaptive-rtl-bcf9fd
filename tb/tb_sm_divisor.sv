// tb_sm_divisor: test of the shift divider at two shift amounts.
//
// Checks the document's examples (24 / 2^2 = 6, 24 / 2^4 truncates to 1)
// and random 16-bit magnitudes at the default SHIFT = 10 and at SHIFT = 2,
// against integer division with truncation and saturation to 8 bits.
module tb_sm_divisor;
  logic s_in, s10, s2, sat10, sat2, s4, sat4;
  logic [15:0] m_in;
  logic [7:0] m10, m2, m4;
  int checks = 0, failures = 0;

  sm_divisor dut10 (.in_sign(s_in), .in_mag(m_in), .out_sign(s10), .out_mag(m10), .sat(sat10));
  sm_divisor #(.SHIFT(2)) dut2 (.in_sign(s_in), .in_mag(m_in), .out_sign(s2), .out_mag(m2), .sat(sat2));
  sm_divisor #(.SHIFT(4)) dut4 (.in_sign(s_in), .in_mag(m_in), .out_sign(s4), .out_mag(m4), .sat(sat4));

  task automatic chk(input string what, input logic gs, input int gm, input logic gsat,
                     input int shift);
    int q;
    logic es;
    q  = int'(m_in) >> shift;
    es = (q > 255);
    if (es) q = 255;
    checks++;
    if (gs !== s_in || gm != q || gsat !== es) begin
      failures++;
      $display("FAIL %0s %0d>>%0d: got %0d sat=%0b want %0d", what, m_in, shift, gm, gsat, q);
    end
  endtask

  initial begin
    s_in = 0; m_in = 24; #1;
    checks++; if (m2 != 6) begin failures++; $display("FAIL 24/4"); end
    checks++; if (m4 != 1) begin failures++; $display("FAIL 24/16"); end
    repeat (5000) begin
      s_in = 1'($urandom); m_in = 16'($urandom);
      #1;
      chk("s10", s10, int'(m10), sat10, 10);
      chk("s2", s2, int'(m2), sat2, 2);
      chk("s4", s4, int'(m4), sat4, 4);
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
