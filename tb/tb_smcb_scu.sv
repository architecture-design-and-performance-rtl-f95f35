// tb_smcb_scu: sweeps every pair of occupancies 0..12 for a round-trip time of
// 6 slots and compares the registered thresholds with the partition table
// written out row by row in the testbench. Also checks that the two
// thresholds never add up to more than the round-trip time.
module tb_smcb_scu;
  localparam int R = 6, ZW = 5, CW = $clog2(R + 1);
  logic clk = 0, rst_n = 0;
  logic [ZW-1:0] za, zb;
  logic [CW-1:0] ca, cb;
  int checks = 0, failures = 0;

  smcb_scu #(.RTT(R), .ZW(ZW)) dut (.clk, .rst_n, .z_a(za), .z_b(zb), .cmax_a(ca), .cmax_b(cb));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void table_row(int a, int b, output int ea, output int eb);
    if (a == 0 && b == 0)            begin ea = 0;                     eb = 0; end
    else if (b == 0)                 begin ea = (a <= R) ? a : R;       eb = 0; end
    else if (a == 0)                 begin ea = 0;                     eb = (b <= R) ? b : R; end
    else if (a <= R/2 && b <= R/2)   begin ea = R/2;                   eb = R/2; end
    else if (a >  R/2 && b <= R/2)   begin ea = R - b;                 eb = b; end
    else if (a <= R/2 && b >  R/2)   begin ea = a;                     eb = R - a; end
    else                             begin ea = R/2;                   eb = R/2; end
  endfunction

  initial begin
    za = 0; zb = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a <= 12; a++) for (int b = 0; b <= 12; b++) begin
      int ea, eb;
      @(negedge clk);
      za = ZW'(a); zb = ZW'(b);
      @(posedge clk); #1;
      table_row(a, b, ea, eb);
      checks++;
      if (int'(ca) != ea || int'(cb) != eb) begin
        failures++; $display("Z=(%0d,%0d): got (%0d,%0d) exp (%0d,%0d)", a, b, ca, cb, ea, eb);
      end
      checks++;
      if (int'(ca) + int'(cb) > R) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
