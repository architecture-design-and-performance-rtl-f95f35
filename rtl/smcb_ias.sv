// smcb_ias: input-access scheduler of one sharing group of the mSMCB switch.
//
// M inputs share the N buffers SMB(q, 0..N-1) of their group. Because each
// buffer accepts only one cell per slot, and each input sends only one cell per
// slot, the scheduler computes a bipartite matching between the M inputs and
// the N buffers every slot, with the three-phase request-grant-accept scheme
// and round-robin pointers used in input-buffered switches:
//   request: input i requests buffer j when it has notified cells for output j
//            that are not yet granted, and buffer j has room;
//   grant:   each unmatched buffer grants one requesting input, round-robin
//            from its grant pointer;
//   accept:  each unmatched input accepts one granting buffer, round-robin
//            from its accept pointer.
// ITERS iterations run within the slot; pointers move one past the matched
// partner only for matches made in the first iteration.
//
// With P > 1 traffic classes the match is round-robin with strict priority:
// an input's request to buffer j carries the highest class (lowest index) it
// has waiting for output j; a buffer grants, and an input accepts, only among
// the requests of the best class on offer, in round-robin order among those.
// The grant names the class, and the line card sends the head cell of that
// class's VOQ. With P = 1 this is the plain round-robin match.
//
// With LQF = 1 an input accepts by longest queue first instead: among the
// granting buffers of the best class it keeps those whose VOQ holds the most
// ungranted cells (rc), and the accept pointer only breaks ties. Buffers still
// grant round-robin, and the output arbiters stay round-robin, because they
// have no view of the VOQ lengths.
//
// Flow control lives here too: cred[j] counts cells granted into buffer j that
// have not yet left it (in flight on the links or stored). A buffer has room
// when cred[j] < KS, or when the output arbiter takes a cell from it in this
// slot. This keeps the buffer from overflowing for any round-trip time.
// rc[i][j][p] counts the notified but not yet granted cells of VOQ(i, j, p).
//
// Interface: req_v / req_dst / req_prio are arrival notices from the M inputs
// (after the address decoders); deq[j] is asserted when a cell leaves buffer
// j. Grants gnt_v / gnt_dst / gnt_prio are registered: the match made in slot
// t is sent out in slot t+1. The choice of ITERS = M and of the counter width
// RCW, and using rc as the queue length for LQF, are this design's.
module smcb_ias #(
  parameter int N     = 32,
  parameter int M     = 2,
  parameter int P     = 1,
  parameter int KS    = 2,
  parameter int ITERS = 2,
  parameter int RCW   = 8,
  parameter bit LQF   = 1'b0,
  parameter int NW    = $clog2(N),
  parameter int MW    = (M > 1) ? $clog2(M) : 1,
  parameter int PRW   = (P > 1) ? $clog2(P) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [M-1:0]    req_v,
  input  logic [NW-1:0]   req_dst [M],
  input  logic [PRW-1:0]  req_prio [M],
  input  logic [N-1:0]    deq,
  output logic [M-1:0]    gnt_v,
  output logic [NW-1:0]   gnt_dst [M],
  output logic [PRW-1:0]  gnt_prio [M],
  output logic [N-1:0]    smb_room      // buffer j can take a grant this slot
);

  localparam int CW = $clog2(KS + 1);

  logic [RCW-1:0] rc   [M][N][P];
  logic [CW-1:0]  cred [N];
  logic [MW-1:0]  gp   [N];
  logic [NW-1:0]  ap   [M];

  // eligibility of each input/buffer pair, and the best class waiting
  logic [N-1:0]   elig [M];
  logic [PRW-1:0] bp   [M][N];
  always_comb begin
    for (int j = 0; j < N; j++) smb_room[j] = (cred[j] != CW'(KS)) || deq[j];
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++) begin
        logic any;
        any      = 1'b0;
        bp[i][j] = '0;
        for (int p = P - 1; p >= 0; p--)
          if (rc[i][j][p] != '0) begin
            any      = 1'b1;
            bp[i][j] = PRW'(p);
          end
        elig[i][j] = any && smb_room[j];
      end
  end

  // iteration results
  logic [M-1:0]  acc_v   [ITERS];
  logic [NW-1:0] acc_idx [ITERS][M];

  for (genvar it = 0; it < ITERS; it++) begin : g_iter
    logic [M-1:0] in_prev,  in_next;    // inputs matched before / after
    logic [N-1:0] smb_prev, smb_next;   // buffers matched before / after
    logic [M-1:0] g_oh [N];             // grant of buffer j, one-hot over inputs
    logic [N-1:0] acc_oh [M];           // accept of input i, one-hot over buffers

    if (it == 0) begin : g_first
      assign in_prev  = '0;
      assign smb_prev = '0;
    end else begin : g_next
      assign in_prev  = g_iter[it-1].in_next;
      assign smb_prev = g_iter[it-1].smb_next;
    end

    // grant phase
    for (genvar j = 0; j < N; j++) begin : g_grant
      logic [M-1:0] r;
      logic         gv;
      logic [MW-1:0] gidx;
      logic [M-1:0] rq;
      for (genvar i = 0; i < M; i++) begin : g_r
        assign r[i] = elig[i][j] && !in_prev[i] && !smb_prev[j];
      end
      // keep only the requests of the best class on offer
      always_comb begin
        logic [PRW-1:0] best;
        best = PRW'(P - 1);
        for (int i = 0; i < M; i++) if (r[i] && bp[i][j] < best) best = bp[i][j];
        for (int i = 0; i < M; i++) rq[i] = r[i] && (bp[i][j] == best);
      end
      rr_arbiter #(.W(M), .IW(MW)) u_garb (
        .req(rq), .ptr(gp[j]), .gnt_v(gv), .gnt_idx(gidx), .gnt_oh(g_oh[j]));
    end
    // accept phase
    for (genvar i = 0; i < M; i++) begin : g_accept
      logic [N-1:0] a, aq;
      for (genvar j = 0; j < N; j++) begin : g_a
        assign a[j] = g_oh[j][i];
      end
      always_comb begin
        logic [PRW-1:0] best;
        logic [RCW-1:0] len;
        best = PRW'(P - 1);
        len  = '0;
        for (int j = 0; j < N; j++) if (a[j] && bp[i][j] < best) best = bp[i][j];
        for (int j = 0; j < N; j++) aq[j] = a[j] && (bp[i][j] == best);
        if (LQF) begin
          for (int j = 0; j < N; j++) if (aq[j] && rc[i][j][best] > len) len = rc[i][j][best];
          for (int j = 0; j < N; j++) aq[j] = aq[j] && (rc[i][j][best] == len);
        end
      end
      rr_arbiter #(.W(N), .IW(NW)) u_aarb (
        .req(aq), .ptr(ap[i]), .gnt_v(acc_v[it][i]), .gnt_idx(acc_idx[it][i]), .gnt_oh(acc_oh[i]));
    end
    always_comb begin
      in_next  = in_prev | acc_v[it];
      smb_next = smb_prev;
      for (int i = 0; i < M; i++) smb_next = smb_next | acc_oh[i];
    end
  end

  // final match of this slot
  logic [M-1:0]   match_v;
  logic [NW-1:0]  match_dst  [M];
  logic [PRW-1:0] match_prio [M];
  always_comb begin
    for (int i = 0; i < M; i++) begin
      match_v[i]   = 1'b0;
      match_dst[i] = '0;
      for (int it = 0; it < ITERS; it++) begin
        if (acc_v[it][i]) begin
          match_v[i]   = 1'b1;
          match_dst[i] = acc_idx[it][i];
        end
      end
      match_prio[i] = bp[i][match_dst[i]];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < M; i++) begin
        for (int j = 0; j < N; j++)
          for (int p = 0; p < P; p++) rc[i][j][p] <= '0;
        ap[i]       <= '0;
        gnt_v[i]    <= 1'b0;
        gnt_dst[i]  <= '0;
        gnt_prio[i] <= '0;
      end
      for (int j = 0; j < N; j++) begin
        cred[j] <= '0;
        gp[j]   <= '0;
      end
    end else begin
      for (int i = 0; i < M; i++) begin
        gnt_v[i]    <= match_v[i];
        gnt_dst[i]  <= match_dst[i];
        gnt_prio[i] <= match_prio[i];
        for (int j = 0; j < N; j++)
          for (int p = 0; p < P; p++) begin
            rc[i][j][p] <= rc[i][j][p]
              + RCW'(req_v[i] && int'(req_dst[i]) == j && int'(req_prio[i]) == p)
              - RCW'(match_v[i] && int'(match_dst[i]) == j && int'(match_prio[i]) == p);
          end
        // first-iteration matches move the pointers
        if (acc_v[0][i]) begin
          ap[i]              <= NW'((int'(acc_idx[0][i]) + 1) % N);
          gp[acc_idx[0][i]]  <= MW'((i + 1) % M);
        end
      end
      for (int j = 0; j < N; j++) begin
        logic inc;
        inc = 1'b0;
        for (int i = 0; i < M; i++)
          if (match_v[i] && int'(match_dst[i]) == j) inc = 1'b1;
        cred[j] <= cred[j] + CW'(inc) - CW'(deq[j]);
      end
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_chk
    a_cred_le_ks: assert property (@(posedge clk) disable iff (!rst_n) cred[j] <= CW'(KS));
    a_deq_held:   assert property (@(posedge clk) disable iff (!rst_n) deq[j] |-> cred[j] != '0);
  end

endmodule
