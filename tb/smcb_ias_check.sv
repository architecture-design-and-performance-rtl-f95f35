// smcb_ias_check: reference check of one input-access scheduler, used by
// tb_smcb_ias with round-robin and with longest-queue-first accept (LQF).
// Random arrival notices and buffer releases for one sharing
// group (M = 2 inputs, N = 8 buffers of KS = 2 cells, P = 3 traffic classes,
// two iterations). A reference model in the testbench keeps the request
// counters, the buffer credits and the round-robin pointers, computes the
// strict-priority request-grant-accept match slot by slot, and predicts the
// registered grants with their class. Invariants checked
// besides: at most one input per buffer per slot, never more than KS cells
// granted into a buffer without release. Coverage: matches made only in the
// second iteration, buffers refused for lack of room, two inputs wanting the
// same buffer, and with LQF an accept that queue length decided.
// Outputs: done when finished, with the check and failure counts.
module smcb_ias_check #(
  parameter bit LQF = 1'b0
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int N = 8, M = 2, P = 3, KS = 2, IT = 2, RCW = 6, NW = $clog2(N), PRW = 2;
  logic clk = 0, rst_n = 0;
  logic [M-1:0] req_v;
  logic [NW-1:0] req_dst [M];
  logic [PRW-1:0] req_prio [M];
  logic [N-1:0] deq;
  logic [M-1:0] gnt_v;
  logic [NW-1:0] gnt_dst [M];
  logic [PRW-1:0] gnt_prio [M];
  logic [N-1:0] room;

  int rc [M][N][P];
  int cred [N];
  int gp [N];
  int ap [M];
  int exp_v [M];
  int exp_d [M];
  int exp_p [M];
  int n_prio_win = 0;
  int n_iter2 = 0, n_full = 0, n_contend = 0, n_lqf_win = 0;

  smcb_ias #(.N(N), .M(M), .P(P), .KS(KS), .ITERS(IT), .RCW(RCW), .LQF(LQF)) dut (
    .clk, .rst_n, .req_v, .req_dst, .req_prio, .deq, .gnt_v, .gnt_dst, .gnt_prio,
    .smb_room(room));

  // best class waiting in VOQ(i, j), or P if none
  function automatic int best(int i, int j);
    for (int p = 0; p < P; p++) if (rc[i][j][p] > 0) return p;
    return P;
  endfunction

  always #5 clk = ~clk;


  // reference matching on the model state
  task automatic model_match(output int mv [M], output int md [M], output int mp [M]);
    bit in_m [M];
    bit smb_m [N];
    int g [N];
    for (int i = 0; i < M; i++) begin in_m[i] = 0; mv[i] = 0; md[i] = 0; mp[i] = 0; end
    for (int j = 0; j < N; j++) smb_m[j] = 0;
    for (int it = 0; it < IT; it++) begin
      for (int j = 0; j < N; j++) begin
        int bc;
        g[j] = -1;
        bc = P;
        if (!smb_m[j] && (cred[j] < KS || deq[j])) begin
          for (int i = 0; i < M; i++) if (!in_m[i] && best(i, j) < bc) bc = best(i, j);
          for (int k = 0; k < M; k++) begin
            int i;
            i = (gp[j] + k) % M;
            if (g[j] < 0 && !in_m[i] && bc < P && best(i, j) == bc) g[j] = i;
          end
          if (g[j] >= 0) for (int i = 0; i < M; i++)
            if (i != g[j] && !in_m[i] && best(i, j) < P && best(i, j) > bc) n_prio_win++;
        end
      end
      for (int i = 0; i < M; i++) begin
        if (!in_m[i]) begin
          int a, bc, len, a_rr;
          a = -1;
          a_rr = -1;
          bc = P;
          len = 0;
          for (int j = 0; j < N; j++) if (g[j] == i && best(i, j) < bc) bc = best(i, j);
          if (LQF && bc < P)
            for (int j = 0; j < N; j++) if (g[j] == i && best(i, j) == bc && rc[i][j][bc] > len) len = rc[i][j][bc];
          for (int k = 0; k < N; k++) begin
            int j;
            j = (ap[i] + k) % N;
            if (a_rr < 0 && g[j] == i && best(i, j) == bc) a_rr = j;
            if (a < 0 && g[j] == i && best(i, j) == bc && (!LQF || rc[i][j][bc] == len)) a = j;
          end
          if (a != a_rr) n_lqf_win++;
          if (a >= 0) begin
            in_m[i] = 1; smb_m[a] = 1; mv[i] = 1; md[i] = a; mp[i] = best(i, a);
            if (it == 0) begin ap[i] = (a + 1) % N; gp[a] = (i + 1) % M; end
            else n_iter2++;
          end
        end
      end
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 0;
    for (int i = 0; i < M; i++) begin
      exp_v[i] = 0; exp_d[i] = 0; exp_p[i] = 0; ap[i] = 0;
      for (int j = 0; j < N; j++) for (int p = 0; p < P; p++) rc[i][j][p] = 0;
    end
    for (int j = 0; j < N; j++) begin cred[j] = 0; gp[j] = 0; end
    req_v = '0; deq = '0;
    for (int i = 0; i < M; i++) begin req_dst[i] = '0; req_prio[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int mv [M];
      int md [M];
      int mp [M];
      @(negedge clk);
      // grants of the previous slot's match
      for (int i = 0; i < M; i++) begin
        checks++;
        if (int'(gnt_v[i]) != exp_v[i] ||
            (exp_v[i] != 0 && (int'(gnt_dst[i]) != exp_d[i] || int'(gnt_prio[i]) != exp_p[i]))) begin
          failures++;
          $display("t=%0d in%0d grant %0d/%0d/%0d exp %0d/%0d/%0d", t, i, gnt_v[i], gnt_dst[i], gnt_prio[i],
                   exp_v[i], exp_d[i], exp_p[i]);
        end
      end
      if (gnt_v == '1) begin
        checks++;
        if (gnt_dst[0] == gnt_dst[1]) begin failures++; $display("t=%0d two inputs on one buffer", t); end
      end
      // stimulus: notices on a few hot outputs, releases of held credits
      for (int i = 0; i < M; i++) begin
        req_v[i]   = ($urandom_range(0, 99) < ((t / 500) % 2 == 0 ? 90 : 40));
        req_dst[i] = NW'(((t / 700) % 2 == 0) ? $urandom_range(0, 2) : $urandom_range(0, N-1));
        req_prio[i] = PRW'($urandom_range(0, P-1));
        if (rc[i][req_dst[i]][req_prio[i]] > 40) req_v[i] = 0;
      end
      for (int j = 0; j < N; j++) deq[j] = (cred[j] > 0) && ($urandom_range(0, 99) < 35);
      #1;
      for (int j = 0; j < N; j++) begin
        int wants;
        wants = 0;
        for (int i = 0; i < M; i++) if (best(i, j) < P) wants++;
        if (wants > 0 && cred[j] == KS && !deq[j]) n_full++;
        if (wants > 1) n_contend++;
        checks++;
        if (room[j] != (cred[j] < KS || deq[j])) failures++;
      end
      model_match(mv, md, mp);
      @(posedge clk);
      for (int i = 0; i < M; i++) begin
        if (req_v[i]) rc[i][req_dst[i]][req_prio[i]]++;
        if (mv[i] != 0) begin rc[i][md[i]][mp[i]]--; cred[md[i]]++; end
        exp_v[i] = mv[i]; exp_d[i] = md[i]; exp_p[i] = mp[i];
      end
      for (int j = 0; j < N; j++) begin
        if (deq[j]) cred[j]--;
        checks++;
        if (cred[j] > KS || cred[j] < 0) begin failures++; $display("credit out of range"); end
      end
    end
    checks++;
    if (n_iter2 == 0 || n_full == 0 || n_contend == 0 || n_prio_win == 0 || (LQF && n_lqf_win == 0)) begin
      failures++; $display("coverage missing");
    end
    $display("LQF=%0d: second-iteration matches %0d, full-buffer refusals %0d, contended buffers %0d, class decided a grant %0d, queue length decided an accept %0d",
             LQF, n_iter2, n_full, n_contend, n_prio_win, n_lqf_win);
    done = 1;
  end
endmodule
