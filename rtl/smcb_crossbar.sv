// smcb_crossbar: shared-memory buffered crossbar of the mSMCB switch.
//
// The inputs are split into N/M sharing groups of M consecutive ports. Group q
// owns one shared-memory buffer SMB(q, j) per output j, so the crossbar has
// N*N/M buffers of KS cells instead of N*N dedicated crosspoint buffers, and
// one input-access scheduler per group. Per slot:
//   * each uplink word passes an address decoder; its request goes to the
//     group's scheduler and its cell is written into SMB(q, cell.dst) as part
//     of the logical queue of its input;
//   * each scheduler matches its inputs to its buffers and returns the grants;
//   * each output arbiter pops one head cell among the N logical queues of its
//     column and tells the scheduler of that group that a slot was freed.
// The downlink word of port p carries the cell leaving output p and the grant
// for input p: grants ride on outgoing cells. With P > 1 traffic classes the
// schedulers match with strict priority; buffers and output arbiters ignore
// the class, so a low-class cell already in a buffer never blocks it.
//
// Interface: up[p] is the uplink of port p after the d1 delay; down[p] is the
// downlink of port p before the d2 delay. Grants and output cells are
// registered (one slot of scheduling, one slot of output arbitration).
// N must be a multiple of M; groups of consecutive ports are this design's
// choice of which inputs share a buffer.
// LQF selects longest-queue-first accept in the schedulers (see smcb_ias).
module smcb_crossbar
  import smcb_pkg::*;
#(
  parameter int N     = 32,
  parameter int M     = 2,
  parameter int P     = 1,
  parameter int KS    = 2,
  parameter int ITERS = 2,
  parameter bit LQF   = 1'b0,
  parameter int RCW   = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  uplink_t    up   [N],
  output downlink_t  down [N]
);

  localparam int G  = N / M;
  localparam int NW = $clog2(N);
  localparam int MW = (M > 1) ? $clog2(M) : 1;
  localparam int KW = $clog2(KS + 1);
  localparam int PRW = (P > 1) ? $clog2(P) : 1;

  // address decoders
  logic [N-1:0]  we      [N];
  cell_t         dcell   [N];
  logic          dreq_v  [N];
  logic [NW-1:0] dreq_d  [N];
  prio_t         dreq_p  [N];
  for (genvar p = 0; p < N; p++) begin : g_dec
    smcb_addr_decoder #(.N(N)) u_dec (
      .up(up[p]), .cell_we(we[p]), .cell_o(dcell[p]), .req_v(dreq_v[p]), .req_dst(dreq_d[p]),
      .req_prio(dreq_p[p]));
  end

  // buffer heads, seen column-wise by the output arbiters
  logic  hv  [N][N];     // [output j][input i]
  cell_t hc  [N][N];
  logic          oa_rd  [N];
  logic [NW-1:0] oa_idx [N];
  logic          oa_v   [N];
  cell_t         oa_c   [N];

  // scheduler grants
  logic [M-1:0]   gv [G];
  logic [NW-1:0]  gd [G][M];
  logic [PRW-1:0] gp [G][M];

  for (genvar q = 0; q < G; q++) begin : g_grp
    logic [M-1:0]  rv;
    logic [NW-1:0] rd [M];
    logic [PRW-1:0] rp [M];
    logic [N-1:0]  deq;
    logic [N-1:0]  room;

    for (genvar r = 0; r < M; r++) begin : g_rq
      assign rv[r] = dreq_v[q*M + r];
      assign rd[r] = dreq_d[q*M + r];
      assign rp[r] = PRW'(dreq_p[q*M + r]);
    end

    for (genvar j = 0; j < N; j++) begin : g_smb
      logic          wr_en;
      logic [MW-1:0] wr_q;
      cell_t         wr_cell;
      logic          rd_en;
      logic [MW-1:0] rd_q;
      logic [M-1:0]  hol_v;
      cell_t         hol_c [M];
      logic [KW-1:0] qcnt [M];
      logic [KW-1:0] count;
      logic          full;

      // write mux: the scheduler admits at most one input per slot
      always_comb begin
        wr_en   = 1'b0;
        wr_q    = '0;
        wr_cell = '0;
        for (int r = 0; r < M; r++) begin
          if (we[q*M + r][j]) begin
            wr_en   = 1'b1;
            wr_q    = MW'(r);
            wr_cell = dcell[q*M + r];
          end
        end
      end

      assign rd_en  = oa_rd[j] && (int'(oa_idx[j]) / M == q);
      assign rd_q   = MW'(int'(oa_idx[j]) % M);
      assign deq[j] = rd_en;

      smcb_smb #(.M(M), .KS(KS), .QW(MW)) u_smb (
        .clk, .rst_n,
        .wr_en, .wr_q, .wr_cell,
        .rd_en, .rd_q,
        .hol_valid(hol_v), .hol_cell(hol_c), .qcnt, .count, .full);

      for (genvar r = 0; r < M; r++) begin : g_hol
        assign hv[j][q*M + r] = hol_v[r];
        assign hc[j][q*M + r] = hol_c[r];
      end

      logic [M-1:0] wv;
      for (genvar r = 0; r < M; r++) begin : g_wv
        assign wv[r] = we[q*M + r][j];
      end
      a_one_writer: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(wv));
    end

    smcb_ias #(.N(N), .M(M), .P(P), .KS(KS), .ITERS(ITERS), .RCW(RCW), .LQF(LQF), .NW(NW), .MW(MW), .PRW(PRW)) u_ias (
      .clk, .rst_n,
      .req_v(rv), .req_dst(rd), .req_prio(rp), .deq,
      .gnt_v(gv[q]), .gnt_dst(gd[q]), .gnt_prio(gp[q]), .smb_room(room));
  end

  // output arbiters
  for (genvar j = 0; j < N; j++) begin : g_oa
    logic [N-1:0] hvv;
    for (genvar i = 0; i < N; i++) begin : g_v
      assign hvv[i] = hv[j][i];
    end
    smcb_output_arbiter #(.N(N), .NW(NW)) u_oa (
      .clk, .rst_n,
      .hol_valid(hvv), .hol_cell(hc[j]),
      .rd_en(oa_rd[j]), .rd_idx(oa_idx[j]),
      .out_v(oa_v[j]), .out_cell(oa_c[j]));
  end

  // downlinks: output cell of port p plus grant for input p
  for (genvar p = 0; p < N; p++) begin : g_down
    always_comb begin
      down[p]         = '0;
      down[p].cell_v  = oa_v[p];
      down[p].cdata   = oa_c[p];
      down[p].gnt_v   = gv[p / M][p % M];
      down[p].gnt_dst = port_t'(gd[p / M][p % M]);
      down[p].gnt_prio = prio_t'(gp[p / M][p % M]);
    end
  end

endmodule
