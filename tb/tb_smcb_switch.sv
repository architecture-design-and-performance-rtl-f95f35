// tb_smcb_switch: end-to-end test of the mSMCB switch at 4 ports (two sharing
// groups), one-slot links each way (RTT = 4 slots). Two instances run the same
// phases: one with KS = 2 (smaller than RTT: a port-rate flow gets half rate),
// one with KS = 4 (= RTT: full rate) and longest-queue-first accept, and one with KS = 2 and three strict
// priority classes, which adds the priority phase. See smcb_switch_env for
// the phases and checks.
module tb_smcb_switch;
  logic clk = 0, rst_n = 0;
  logic done_a, done_b, done_c;
  int checks_a, failures_a, checks_b, failures_b, checks_c, failures_c;
  int checks, failures;

  always #5 clk = ~clk;

  smcb_switch_env #(.N(4), .M(2), .KS(2), .D1(1), .D2(1), .VOQ_DEPTH(8)) env_a (
    .clk, .rst_n, .done(done_a), .checks(checks_a), .failures(failures_a));
  smcb_switch_env #(.N(4), .M(2), .KS(4), .D1(1), .D2(1), .VOQ_DEPTH(8), .LQF(1'b1), .NEED_FULL(0)) env_b (
    .clk, .rst_n, .done(done_b), .checks(checks_b), .failures(failures_b));
  smcb_switch_env #(.N(4), .M(2), .P(3), .KS(2), .D1(1), .D2(1), .VOQ_DEPTH(8)) env_c (
    .clk, .rst_n, .done(done_c), .checks(checks_c), .failures(failures_c));

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b + checks_c, failures_a + failures_b + failures_c + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done_a && done_b && done_c);
    checks   = checks_a + checks_b + checks_c;
    failures = failures_a + failures_b + failures_c;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
