// tb_aic_table51: the canceler run in the configurations of a parameter
// sweep: filter order 16, 32, 64 and 128; reference delay 0 to 3; signal
// share 80, 60, 40 and 20 % of the input span; learning parameter 0.05,
// 0.005 and 0.0005 (2*mu = 2^-MU_SHIFT with MU_SHIFT = 3, 7 and 10). The
// test signal is three sines (300, 700, 800 Hz) plus broadband interference.
// Orders 64 and 128 need more than 1000 CLOCK2 cycles per 8 kHz sample
// (69 and 133 CLOCK1 periods of 16 cycles), so they run with a 2000- and a
// 4000-cycle sample period, i.e. a 16 and 32 MHz CLOCK2.
//
// Every configuration is checked bit for bit against its own integer model
// after every iteration (aic_env). The output/input interference power
// ratio of each is printed; it is not checked, since the step sizes that
// 8-bit weights can represent differ from the swept values.
module tb_aic_table51;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int N = 12;
  logic done [N];
  int   chk [N], fl [N];
  real  ratio [N];

  //            ORDER DELAY MU   SAMPLE_CLKS SIG
  aic_env #(.ORDER(16),  .DELAY(2), .MU_SHIFT(7),  .SIG_PCT(80)) s1  (done[0],  chk[0],  fl[0],  ratio[0]);
  aic_env #(.ORDER(32),  .DELAY(2), .MU_SHIFT(7),  .SIG_PCT(80)) s2  (done[1],  chk[1],  fl[1],  ratio[1]);
  aic_env #(.ORDER(64),  .DELAY(2), .MU_SHIFT(7),  .SAMPLE_CLKS(2000), .SIG_PCT(80)) s3 (done[2], chk[2], fl[2], ratio[2]);
  aic_env #(.ORDER(128), .DELAY(2), .MU_SHIFT(7),  .SAMPLE_CLKS(4000), .SIG_PCT(80)) s4 (done[3], chk[3], fl[3], ratio[3]);
  aic_env #(.ORDER(32),  .DELAY(0), .MU_SHIFT(7),  .SIG_PCT(80)) s5  (done[4],  chk[4],  fl[4],  ratio[4]);
  aic_env #(.ORDER(32),  .DELAY(1), .MU_SHIFT(7),  .SIG_PCT(80)) s6  (done[5],  chk[5],  fl[5],  ratio[5]);
  aic_env #(.ORDER(32),  .DELAY(3), .MU_SHIFT(7),  .SIG_PCT(80)) s7  (done[6],  chk[6],  fl[6],  ratio[6]);
  aic_env #(.ORDER(32),  .DELAY(2), .MU_SHIFT(7),  .SIG_PCT(60)) s8  (done[7],  chk[7],  fl[7],  ratio[7]);
  aic_env #(.ORDER(32),  .DELAY(2), .MU_SHIFT(7),  .SIG_PCT(40)) s9  (done[8],  chk[8],  fl[8],  ratio[8]);
  aic_env #(.ORDER(32),  .DELAY(2), .MU_SHIFT(7),  .SIG_PCT(20)) s10 (done[9],  chk[9],  fl[9],  ratio[9]);
  aic_env #(.ORDER(32),  .DELAY(2), .MU_SHIFT(3),  .SIG_PCT(80)) s11 (done[10], chk[10], fl[10], ratio[10]);
  aic_env #(.ORDER(32),  .DELAY(2), .MU_SHIFT(10), .SIG_PCT(80)) s12 (done[11], chk[11], fl[11], ratio[11]);

  int checks = 0, failures = 0;
  logic all_done;
  always_comb begin
    all_done = 1'b1;
    for (int i = 0; i < N; i++) all_done &= done[i];
  end

  initial begin
    wait (all_done === 1'b1);
    for (int i = 0; i < N; i++) begin
      $display("configuration %0d: %0d checks, %0d failures, interference power ratio %0.3f",
               i + 1, chk[i], fl[i], ratio[i]);
      checks   += chk[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2100 * 125000);   // 2100 sample periods of 125 us
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
