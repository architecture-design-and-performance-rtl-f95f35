// tb_smcb_addr_decoder: drives random uplink words into the address decoder of
// an 8-port crossbar row and checks the one-hot buffer select, the forwarded
// cell and the forwarded request against values computed from the word.
module tb_smcb_addr_decoder;
  import smcb_pkg::*;
  localparam int N = 8;
  uplink_t up;
  logic [N-1:0] we;
  cell_t c;
  logic rv;
  logic [$clog2(N)-1:0] rd;
  prio_t rp;
  int checks = 0, failures = 0;

  smcb_addr_decoder #(.N(N)) dut (.up, .cell_we(we), .cell_o(c), .req_v(rv), .req_dst(rd), .req_prio(rp));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [N-1:0] exp_we;
      up = '0;
      up.cell_v        = 1'($urandom);
      up.cdata.src     = port_t'($urandom_range(0, N-1));
      up.cdata.dst     = port_t'($urandom_range(0, N-1));
      up.cdata.payload = $urandom;
      up.req_v         = 1'($urandom);
      up.req_dst       = port_t'($urandom_range(0, N-1));
      up.req_prio      = prio_t'($urandom_range(0, 2));
      #1;
      exp_we = '0;
      if (up.cell_v) exp_we = N'(1) << up.cdata.dst;
      checks++;
      if (we !== exp_we) begin failures++; $display("we %b exp %b", we, exp_we); end
      checks++;
      if (up.cell_v && c !== up.cdata) failures++;
      checks++;
      if (rv !== up.req_v || (up.req_v && (int'(rd) != int'(up.req_dst) || rp != up.req_prio))) failures++;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
