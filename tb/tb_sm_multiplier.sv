// tb_sm_multiplier: self-checking test of the sequential multiplier.
//
// Multiplies the worked example 1001 x 1011, the sign table (all four sign
// combinations), edge magnitudes and 3000 random pairs; checks each product
// and sign against integer arithmetic and that done arrives exactly 11
// clock edges after the edge that sampled start, with busy high meanwhile.
module tb_sm_multiplier;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, start = 0;
  logic a_sign, b_sign, p_sign, busy, done;
  logic [W-1:0] a_mag, b_mag;
  logic [2*W-1:0] p_mag;
  int checks = 0, failures = 0;

  sm_multiplier dut (.*);
  always #5 clk = ~clk;

  task automatic mul(input logic sa, input int ma, input logic sb, input int mb);
    int lat;
    @(negedge clk);
    a_sign = sa; a_mag = W'(ma); b_sign = sb; b_mag = W'(mb); start = 1;
    @(posedge clk);  // start sampled here
    #1 start = 0;
    // scramble the operands: the multiplier must have latched them
    a_mag = W'($urandom); b_mag = W'($urandom);
    lat = 0;
    do begin
      @(posedge clk);
      lat++;
      if (!done && !busy && lat < 11) begin
        failures++;
        $display("FAIL busy dropped early");
      end
    end while (!done && lat < 40);
    // done is observed at the edge after the one that raised it
    checks++;
    if (lat - 1 != 11) begin
      failures++;
      $display("FAIL latency %0d, want 11", lat - 1);
    end
    checks++;
    if (p_mag != 16'(ma * mb) || p_sign != (sa ^ sb)) begin
      failures++;
      $display("FAIL %0d*%0d signs %0b%0b: got %0b/%0d", ma, mb, sa, sb, p_sign, p_mag);
    end
  endtask

  initial begin
    a_sign = 0; b_sign = 0; a_mag = 0; b_mag = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    mul(0, 9, 0, 11);          // 1001 x 1011 = 1100011
    mul(0, 64, 0, 38);         // 0.5 * 0.3 example of the narrowing section
    mul(0, 5, 1, 6);
    mul(1, 5, 0, 6);
    mul(1, 5, 1, 6);
    mul(0, 255, 0, 255);
    mul(1, 128, 1, 128);
    mul(0, 0, 1, 200);
    repeat (3000) mul(1'($urandom), int'($urandom_range(0, 255)),
                      1'($urandom), int'($urandom_range(0, 255)));
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
