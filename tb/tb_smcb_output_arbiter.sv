// tb_smcb_output_arbiter: random head-of-line patterns on 6 candidates. A
// round-robin reference (pointer one past the last winner) predicts the
// winner of every slot; the registered output cell must be the winner's head
// cell one slot later, and an empty pattern must select nothing.
module tb_smcb_output_arbiter;
  import smcb_pkg::*;
  localparam int N = 6, NW = $clog2(N);
  logic clk = 0, rst_n = 0;
  logic [N-1:0] hv;
  cell_t hc [N];
  logic rd_en, out_v;
  logic [NW-1:0] rd_idx;
  cell_t out_cell;
  int checks = 0, failures = 0;
  int ref_ptr;
  logic exp_v; cell_t exp_c;

  smcb_output_arbiter #(.N(N)) dut (.clk, .rst_n, .hol_valid(hv), .hol_cell(hc),
    .rd_en, .rd_idx, .out_v, .out_cell);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hv = '0;
    for (int i = 0; i < N; i++) hc[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    ref_ptr = 0;
    exp_v = 0;
    for (int t = 0; t < 600; t++) begin
      int win;
      @(negedge clk);
      // previous slot's pick must now be on the output
      checks++;
      if (out_v !== exp_v || (exp_v && out_cell !== exp_c)) begin
        failures++; $display("t=%0d output mismatch", t);
      end
      hv = N'($urandom) & N'($urandom);
      if (t % 50 == 7) hv = '0;
      for (int i = 0; i < N; i++) hc[i] = '{prio: '0, src: port_t'(i), dst: '0, payload: $urandom};
      #1;
      win = -1;
      for (int k = 0; k < N; k++) if (win < 0 && hv[(ref_ptr + k) % N]) win = (ref_ptr + k) % N;
      checks++;
      if ((win < 0 && rd_en) || (win >= 0 && (!rd_en || int'(rd_idx) != win))) begin
        failures++; $display("t=%0d pick %0d/%0d exp %0d", t, rd_en, rd_idx, win);
      end
      exp_v = (win >= 0);
      if (win >= 0) begin exp_c = hc[win]; ref_ptr = (win + 1) % N; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
