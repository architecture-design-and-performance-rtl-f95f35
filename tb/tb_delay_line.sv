// tb_delay_line: checks that the transmission-line model delays every word by
// exactly DELAY slots (3 here) and that DELAY = 0 is a plain wire. A history of
// driven words kept by the testbench is the reference.
module tb_delay_line;
  localparam int W = 12, D = 3;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] din, dout3, dout0;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0, cyc = 0;

  delay_line #(.W(W), .DELAY(D)) dut3 (.clk, .rst_n, .d_in(din), .d_out(dout3));
  delay_line #(.W(W), .DELAY(0)) dut0 (.clk, .rst_n, .d_in(din), .d_out(dout0));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < D; k++) hist.push_back('0);   // line empty after reset
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      din = W'($urandom);
      #1;
      checks++;
      if (dout0 !== din) begin failures++; $display("wire mismatch t=%0d", t); end
      checks++;
      if (dout3 !== hist[$size(hist)-D]) begin
        failures++; $display("delay mismatch t=%0d got %h exp %h", t, dout3, hist[$size(hist)-D]);
      end
      hist.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
