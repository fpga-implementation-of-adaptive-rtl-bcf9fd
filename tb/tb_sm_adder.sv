// tb_sm_adder: self-checking test of the sign-magnitude adder.
//
// Runs the four sign cases (+7 + +4, -7 + -4, +7 + -4, -7 + +4), overflow
// saturation and 20000 random operand pairs at the default 16-bit magnitude,
// comparing against an integer reference: value = (sign ? -mag : mag).
module tb_sm_adder;
  localparam int MW = 16;
  logic          a_sign, b_sign, s_sign, ovf;
  logic [MW-1:0] a_mag, b_mag, s_mag;
  int checks = 0, failures = 0;

  sm_adder dut (.*);

  task automatic check(input logic sa, input int ma, input logic sb, input int mb);
    longint va, vb, sum, mag, maxm;
    logic esign, eovf;
    a_sign = sa; a_mag = MW'(ma); b_sign = sb; b_mag = MW'(mb);
    #1;
    maxm = (64'd1 << MW) - 1;
    va = sa ? -longint'(ma) : longint'(ma);
    vb = sb ? -longint'(mb) : longint'(mb);
    sum = va + vb;
    mag = (sum < 0) ? -sum : sum;
    eovf = 1'b0;
    if (sum == 0) esign = sa;
    else          esign = (sum < 0);
    if (mag > maxm) begin
      mag  = maxm;
      eovf = 1'b1;
    end
    checks++;
    if (s_sign !== esign || longint'(s_mag) != mag || ovf !== eovf) begin
      failures++;
      if (failures < 10)
        $display("FAIL %0s%0d + %0s%0d: got %0s%0d ovf=%0b, want %0s%0d ovf=%0b",
          sa ? "-" : "+", ma, sb ? "-" : "+", mb, s_sign ? "-" : "+", s_mag, ovf,
          esign ? "-" : "+", mag, eovf);
    end
  endtask

  initial begin
    // the document's four cases
    check(0, 7, 0, 4);   // +11
    check(1, 7, 1, 4);   // -11
    check(0, 7, 1, 4);   // +3
    check(1, 7, 0, 4);   // -3
    check(0, 4, 1, 7);   // -3, borrow path
    check(1, 4, 0, 7);   // +3, borrow path
    check(0, 65535, 0, 1);      // overflow saturates
    check(1, 40000, 1, 30000);
    check(0, 500, 1, 500);      // zero difference keeps a's sign
    repeat (20000) begin
      int ma, mb;
      ma = int'($urandom_range(0, 65535));
      mb = ($urandom_range(0, 3) == 0) ? ma : int'($urandom_range(0, 65535));
      check(1'($urandom), ma, 1'($urandom), mb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
