// tb_smcb_smb: random writes and reads on a shared buffer of KS = 4 cells
// shared by M = 2 inputs. Two testbench FIFOs are the reference: every head
// cell, queue length, total and full flag is compared each slot. Writes are
// only offered when the buffer has room or a read happens in the same slot,
// as the scheduler guarantees. The run also counts the cases that matter for
// sharing: one input holding every slot, both inputs present at once, and a
// write into a full buffer served by the slot being read.
module tb_smcb_smb;
  import smcb_pkg::*;
  localparam int M = 2, KS = 4, KW = $clog2(KS+1);
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en;
  logic wr_q, rd_q;
  cell_t wr_cell;
  logic [M-1:0] hv;
  cell_t hc [M];
  logic [KW-1:0] qcnt [M];
  logic [KW-1:0] count;
  logic full;
  cell_t refq [M][$];
  int checks = 0, failures = 0;
  int n_one_owner = 0, n_both = 0, n_bypass = 0;

  smcb_smb #(.M(M), .KS(KS)) dut (.clk, .rst_n, .wr_en, .wr_q, .wr_cell, .rd_en, .rd_q,
    .hol_valid(hv), .hol_cell(hc), .qcnt, .count, .full);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(int t);
    int tot;
    tot = 0;
    for (int q = 0; q < M; q++) begin
      tot += refq[q].size();
      checks++;
      if (int'(qcnt[q]) != refq[q].size() || hv[q] != (refq[q].size() > 0)) begin
        failures++; $display("t=%0d q%0d len %0d exp %0d", t, q, qcnt[q], refq[q].size());
      end
      if (refq[q].size() > 0) begin
        checks++;
        if (hc[q] !== refq[q][0]) begin failures++; $display("t=%0d q%0d head mismatch", t, q); end
      end
    end
    checks++;
    if (int'(count) != tot || full != (tot == KS)) begin failures++; $display("t=%0d count", t); end
  endtask

  initial begin
    int tot;
    wr_en = 0; rd_en = 0; wr_q = 0; rd_q = 0; wr_cell = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int phase;
      @(negedge clk);
      compare(t);
      tot = refq[0].size() + refq[1].size();
      if (refq[0].size() == KS || refq[1].size() == KS) n_one_owner++;
      if (refq[0].size() > 0 && refq[1].size() > 0) n_both++;
      // phases: fill by input 0, drain, mixed random
      phase = (t / 100) % 3;
      rd_q  = 1'($urandom);
      if (refq[rd_q].size() == 0) rd_q = !rd_q;
      rd_en = (refq[rd_q].size() > 0) && ((phase == 0) ? ($urandom_range(0, 3) == 0)
                                       : (phase == 1) ? ($urandom_range(0, 3) != 0)
                                       : 1'($urandom));
      wr_q  = (phase == 0) ? 1'b0 : 1'($urandom);
      wr_en = ((tot < KS) || rd_en) && ((phase == 1) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0));
      wr_cell = '{prio: '0, src: port_t'(wr_q), dst: port_t'(3), payload: $urandom};
      if (wr_en && rd_en && tot == KS) n_bypass++;
      @(posedge clk);
      #1;
      if (rd_en) void'(refq[rd_q].pop_front());
      if (wr_en) refq[wr_q].push_back(wr_cell);
    end
    checks++;
    if (n_one_owner == 0 || n_both == 0 || n_bypass == 0) begin
      failures++; $display("coverage: one_owner=%0d both=%0d bypass=%0d", n_one_owner, n_both, n_bypass);
    end
    $display("one input owning all slots: %0d, both inputs present: %0d, full-buffer bypass: %0d",
             n_one_owner, n_both, n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
