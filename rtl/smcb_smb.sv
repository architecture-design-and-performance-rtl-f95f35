// smcb_smb: shared-memory crosspoint buffer SMB(q, j).
//
// One buffer of KS cells holds the cells for output j from all M inputs of
// sharing group q. Cells of each input form a logical FIFO queue kept as a
// linked list inside the same memory; the unused slots form a third kind of
// list, the free list. The next-pointer array is shared by all lists, so the
// sharing needs no memory beyond the cell slots and one pointer per slot. Any
// input may use any free slot, so a single busy input can fill the whole
// buffer, which is what lets the switch carry a port-rate flow with half the
// crosspoint memory of a dedicated-buffer crossbar.
//
// Per slot the memory takes at most one write (the input-access scheduler lets
// only one input in per slot, so no memory speedup is needed) and one read
// (the output arbiter takes at most one cell). A read and a write may happen in
// the same slot; when the buffer is full the slot being read is handed straight
// to the write.
//
// Interface: wr_en / wr_q / wr_cell append a cell to logical queue wr_q;
// rd_en / rd_q pop the head of queue rd_q. hol_valid / hol_cell show each
// queue's head cell, qcnt its length, count the total and full whether all KS
// slots are taken. All updates take effect at the clock edge.
module smcb_smb
  import smcb_pkg::*;
#(
  parameter int M  = 2,
  parameter int KS = 2,
  parameter int QW = (M > 1) ? $clog2(M) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [QW-1:0]    wr_q,
  input  cell_t            wr_cell,
  input  logic             rd_en,
  input  logic [QW-1:0]    rd_q,
  output logic [M-1:0]     hol_valid,
  output cell_t            hol_cell [M],
  output logic [$clog2(KS+1)-1:0] qcnt [M],
  output logic [$clog2(KS+1)-1:0] count,
  output logic             full
);

  localparam int PW = (KS > 1) ? $clog2(KS) : 1;
  localparam int CW = $clog2(KS + 1);

  cell_t          mem [KS];
  logic [PW-1:0]  nxt [KS];
  logic [PW-1:0]  head [M];
  logic [PW-1:0]  tail [M];
  logic [CW-1:0]  cnt  [M];
  logic [PW-1:0]  free_head, free_tail;
  logic [CW-1:0]  free_cnt;

  // slot written this cycle and slot released this cycle
  logic [PW-1:0]  wslot, rslot;
  logic           take_free, bypass;

  assign rslot     = head[rd_q];
  assign take_free = wr_en && (free_cnt != '0);
  assign bypass    = wr_en && (free_cnt == '0) && rd_en;
  assign wslot     = take_free ? free_head : rslot;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < KS; s++) nxt[s] <= PW'((s + 1) % KS);
      for (int q = 0; q < M; q++) begin
        head[q] <= '0;
        tail[q] <= '0;
        cnt[q]  <= '0;
      end
      free_head <= '0;
      free_tail <= PW'(KS - 1);
      free_cnt  <= CW'(KS);
    end else begin
      // ---- free list: pop for the write, push the released slot ----
      begin
        logic [CW-1:0] fc;
        fc = free_cnt;
        if (take_free) begin
          fc = fc - 1'b1;
          if (fc != '0) free_head <= nxt[free_head];
        end
        if (rd_en && !bypass) begin
          if (fc == '0) begin
            free_head <= rslot;
          end else begin
            nxt[free_tail] <= rslot;
          end
          free_tail <= rslot;
          fc = fc + 1'b1;
        end
        free_cnt <= fc;
      end
      // ---- logical queues ----
      for (int q = 0; q < M; q++) begin
        logic rd, wr;
        logic [CW-1:0] c;
        rd = rd_en && (int'(rd_q) == q);
        wr = wr_en && (int'(wr_q) == q);
        c  = cnt[q];
        if (rd) begin
          c = c - 1'b1;
          if (c != '0) head[q] <= nxt[head[q]];
        end
        if (wr) begin
          if (c == '0) head[q] <= wslot;
          else         nxt[tail[q]] <= wslot;
          tail[q] <= wslot;
          c = c + 1'b1;
        end
        cnt[q] <= c;
      end
    end
  end

  // cell storage: one write port, no reset needed
  always_ff @(posedge clk) begin
    if (wr_en) mem[wslot] <= wr_cell;
  end

  always_comb begin
    count = '0;
    for (int q = 0; q < M; q++) begin
      hol_valid[q] = (cnt[q] != '0);
      hol_cell[q]  = mem[head[q]];
      count        = count + cnt[q];
    end
  end
  assign qcnt = cnt;
  assign full = (free_cnt == '0);

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> (free_cnt != '0) || rd_en);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    rd_en |-> cnt[rd_q] != '0);

endmodule
