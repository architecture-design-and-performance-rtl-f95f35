// tb_smcb_ias: checks the input-access scheduler of one sharing group
// (M = 2 inputs, N = 8 buffers of KS = 2 cells, P = 3 classes, two
// iterations) against a slot-by-slot reference model, once with round-robin
// accept and once with longest-queue-first accept. See smcb_ias_check for the
// stimulus, the model and the coverage counted.
module tb_smcb_ias;
  logic done_rr, done_lqf;
  int checks_rr, failures_rr, checks_lqf, failures_lqf;

  smcb_ias_check #(.LQF(1'b0)) u_rr  (.done(done_rr),  .checks(checks_rr),  .failures(failures_rr));
  smcb_ias_check #(.LQF(1'b1)) u_lqf (.done(done_lqf), .checks(checks_lqf), .failures(failures_lqf));

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks_rr + checks_lqf, failures_rr + failures_lqf + 1);
    $finish;
  end

  initial begin
    #1;
    wait (done_rr && done_lqf);
    $display("TB_RESULT checks=%0d failures=%0d", checks_rr + checks_lqf, failures_rr + failures_lqf);
    $finish;
  end
endmodule
