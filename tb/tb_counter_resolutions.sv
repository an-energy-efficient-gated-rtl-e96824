// tb_counter_resolutions - runs the counter at the resolutions used in the
// energy comparison of the clock-gated Johnson counter: 2, 4, 6, 8 and 10
// bits, i.e. 2, 8, 32, 128 and 512 stages. Each size is checked by its own
// tb_jc_res_check instance, concurrently; the sums are reported at the end.
// The point of the sweep is that, at every size, exactly one stage is
// clocked per count step, so clock activity does not grow with resolution.
module tb_counter_resolutions;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int NSIZES = 5;
  logic done [NSIZES];
  int   chk  [NSIZES];
  int   fail [NSIZES];

  tb_jc_res_check #(.N_BITS(2))  u_r2  (.done(done[0]), .checks(chk[0]), .failures(fail[0]));
  tb_jc_res_check #(.N_BITS(4))  u_r4  (.done(done[1]), .checks(chk[1]), .failures(fail[1]));
  tb_jc_res_check #(.N_BITS(6))  u_r6  (.done(done[2]), .checks(chk[2]), .failures(fail[2]));
  tb_jc_res_check #(.N_BITS(8))  u_r8  (.done(done[3]), .checks(chk[3]), .failures(fail[3]));
  tb_jc_res_check #(.N_BITS(10)) u_r10 (.done(done[4]), .checks(chk[4]), .failures(fail[4]));

  int checks = 0, failures = 0;

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    for (int i = 0; i < NSIZES; i++) begin
      checks   += chk[i];
      failures += fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
