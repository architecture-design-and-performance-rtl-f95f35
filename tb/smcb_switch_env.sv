// smcb_switch_env: traffic generator, scoreboard and mechanism counters for one
// mSMCB switch instance, used by the end-to-end testbench.
//
// Phases (slot counts at the start of each):
//   A  one cell 0 -> 1 on an idle switch: latency must be 2*D1 + 2*D2 + 4;
//   B  a single flow at port rate, input 0 -> output 1 (unbalanced traffic
//      with w = 1): the departure rate over a 200-slot window must be
//      min(1, KS / RTT) with RTT = D1 + D2 + 2;
//   C  the two inputs of group 0 both send to output 2, inputs 2 and 3 to
//      output 3: one buffer shared by two inputs at once;
//   D  uniform random traffic at load 0.7;
//   E  every input sends to output 0 (output contention);
//   F  only with P > 1: inputs 0 and 1 (one sharing group) both saturate
//      output 1, input 0 in the lowest class and input 1 in class 0; under
//      strict priority input 0 must get no cell through while input 1 is
//      backlogged, and input 1 must get the single-flow rate;
//   then the switch drains. Classes are drawn at random in phases C to E.
// Every departure is checked against per-flow, per-class reference queues:
// right output, right order within a flow and class, intact payload, nothing
// lost or duplicated. Every slot the sharing-control thresholds of the top
// level are checked against a reference of the partition rule computed from
// the VOQ occupancies of the slot before. The env counts how often each mechanism of the
// design occurs and reports a failure for any that never did (a full buffer,
// and one input holding all of a buffer, are only required when NEED_FULL is
// set: with KS >= RTT the flow control rarely lets a buffer fill). A write
// into a full buffer is counted but cannot occur in the switch: a credit
// covers a cell from its grant on, so a full buffer has nothing in flight.
module smcb_switch_env
  import smcb_pkg::*;
#(
  parameter int N         = 4,
  parameter int M         = 2,
  parameter int P         = 1,
  parameter bit LQF       = 1'b0,
  parameter int KS        = 2,
  parameter int D1        = 1,
  parameter int D2        = 1,
  parameter int VOQ_DEPTH = 8,
  parameter bit NEED_STALL = 1,
  parameter bit NEED_FULL  = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int RTT = D1 + D2 + 2;
  localparam int LAT = 2 * D1 + 2 * D2 + 4;
  localparam int G   = N / M;

  logic                 arr_valid   [N];
  port_t                arr_dst     [N];
  prio_t                arr_prio    [N];
  logic [PAYLOAD_W-1:0] arr_payload [N];
  logic                 arr_ready   [N];
  logic                 dep_valid   [N];
  cell_t                dep_cell    [N];
  localparam int CMW = $clog2(RTT + 1);
  logic [CMW-1:0]       scu_cmax    [N][N];

  smcb_top #(.N(N), .M(M), .P(P), .KS(KS), .D1(D1), .D2(D2), .VOQ_DEPTH(VOQ_DEPTH), .LQF(LQF)) dut (
    .clk, .rst_n, .arr_valid, .arr_dst, .arr_prio, .arr_payload, .arr_ready,
    .dep_valid, .dep_cell, .scu_cmax);

  int unsigned sb [N][N][P][$];   // payloads in flight per (src, dst, class)
  int          zp [N][N];         // occupancies seen at the previous edge
  int          n_scu_split, n_scu_one, f_win0, f_low, f_high;
  int unsigned next_id;
  int          slot;
  int          phase;
  int          a_time, b_deps;
  int          n_stall, n_full, n_owner, n_shared, n_bypass, n_iter2, n_oa_cont, n_deps;

  // scoreboard: arrivals accepted and departures, at each clock edge
  always @(posedge clk) begin
    if (rst_n) begin
      slot <= slot + 1;
      for (int p = 0; p < N; p++) begin
        if (arr_valid[p] && !arr_ready[p]) n_stall++;
        if (arr_valid[p] && arr_ready[p]) sb[p][arr_dst[p]][arr_prio[p]].push_back(arr_payload[p]);
        if (dep_valid[p]) begin
          int s, c;
          n_deps++;
          checks++;
          s = int'(dep_cell[p].src);
          c = int'(dep_cell[p].prio);
          if (int'(dep_cell[p].dst) != p || s >= N || c >= P || sb[s][p][c].size() == 0) begin
            failures++;
            $display("slot %0d: unexpected cell at output %0d (src %0d dst %0d)", slot, p, s, dep_cell[p].dst);
          end else begin
            int unsigned e;
            e = sb[s][p][c].pop_front();
            if (dep_cell[p].payload != e) begin
              failures++;
              $display("slot %0d: flow %0d->%0d out of order: got %0d exp %0d", slot, s, p, dep_cell[p].payload, e);
            end
          end
          if (phase == 1 && p == 1) begin
            checks++;
            if (slot - a_time != LAT) begin
              failures++;
              $display("latency %0d, expected %0d", slot - a_time, LAT);
            end
          end
          if (phase == 2 && p == 1 && slot >= b_win0 && slot < b_win0 + 200) b_deps++;
          if (phase == 6 && p == 1 && slot >= f_win0 && slot < f_win0 + 300) begin
            if (s == 0) f_low++;
            if (s == 1) f_high++;
          end
        end
      end
    end
  end

  // reference of the sharing-control partition for a pair of occupancies
  function automatic void scu_ref(int za, int zb, output int ca, output int cb);
    int h;
    h = RTT / 2;
    if (za == 0 && zb == 0) begin ca = 0; cb = 0; end
    else if (zb == 0) begin ca = (za > RTT) ? RTT : za; cb = 0; end
    else if (za == 0) begin ca = 0; cb = (zb > RTT) ? RTT : zb; end
    else if (za > h && zb <= h) begin ca = RTT - zb; cb = zb; end
    else if (zb > h && za <= h) begin ca = za; cb = RTT - za; end
    else begin ca = h; cb = h; end
  endfunction

  always @(posedge clk) begin
    if (rst_n && slot > 0) begin
      for (int g = 0; g < N / 2; g++)
        for (int j = 0; j < N; j++) begin
          int ca, cb;
          scu_ref(zp[2*g][j], zp[2*g+1][j], ca, cb);
          checks++;
          if (int'(scu_cmax[2*g][j]) != ca || int'(scu_cmax[2*g+1][j]) != cb) begin
            failures++;
            $display("slot %0d: thresholds of inputs %0d/%0d for output %0d are %0d/%0d, expected %0d/%0d",
                     slot, 2*g, 2*g+1, j, scu_cmax[2*g][j], scu_cmax[2*g+1][j], ca, cb);
          end
          if (zp[2*g][j] > 0 && zp[2*g+1][j] > 0) n_scu_split++;
          else if (zp[2*g][j] + zp[2*g+1][j] > 0) n_scu_one++;
        end
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) zp[i][j] = int'(dut.z[i][j]);
  end

  int b_win0;

  // mechanism counters, read from inside the design
  for (genvar q = 0; q < G; q++) begin : g_cq
    for (genvar j = 0; j < N; j++) begin : g_cj
      always @(posedge clk) if (rst_n) begin
        if (dut.u_sw.u_xbar.g_grp[q].g_smb[j].full) n_full++;
        if (dut.u_sw.u_xbar.g_grp[q].g_smb[j].wr_en && dut.u_sw.u_xbar.g_grp[q].g_smb[j].rd_en &&
            dut.u_sw.u_xbar.g_grp[q].g_smb[j].full) n_bypass++;
        for (int r = 0; r < M; r++)
          if (int'(dut.u_sw.u_xbar.g_grp[q].g_smb[j].qcnt[r]) == KS) n_owner++;
        if (dut.u_sw.u_xbar.g_grp[q].g_smb[j].hol_v == '1) n_shared++;
      end
    end
    always @(posedge clk) if (rst_n && dut.u_sw.u_xbar.g_grp[q].u_ias.acc_v[1] != '0) n_iter2++;
  end
  for (genvar j = 0; j < N; j++) begin : g_co
    always @(posedge clk) if (rst_n && $countones(dut.u_sw.u_xbar.g_oa[j].hvv) > 1) n_oa_cont++;
  end

  task automatic idle();
    for (int p = 0; p < N; p++) begin
      arr_valid[p] = 0; arr_dst[p] = '0; arr_prio[p] = '0; arr_payload[p] = '0;
    end
  endtask

  task automatic offer(int p, int d);
    arr_valid[p]   = 1;
    arr_dst[p]     = port_t'(d);
    arr_prio[p]    = (phase >= 3) ? prio_t'($urandom_range(0, P-1)) : '0;
    arr_payload[p] = next_id;
  endtask

  // ticks one slot; ids advance only for accepted cells
  task automatic tick();
    @(posedge clk);
    for (int p = 0; p < N; p++) if (arr_valid[p] && arr_ready[p]) next_id++;
    #1;
    for (int p = 0; p < N; p++) if (arr_valid[p]) arr_payload[p] = next_id + p;
  endtask

  initial begin
    checks = 0; failures = 0; done = 0; next_id = 1; slot = 0; phase = 0;
    n_stall = 0; n_full = 0; n_owner = 0; n_shared = 0; n_bypass = 0; n_iter2 = 0;
    n_oa_cont = 0; n_deps = 0; b_deps = 0; a_time = 0; b_win0 = 0;
    n_scu_split = 0; n_scu_one = 0; f_win0 = 0; f_low = 0; f_high = 0;
    idle();
    @(posedge rst_n);
    repeat (3) @(posedge clk);
    #1;
    // ---- A: latency of one cell on an idle switch ----
    phase = 1;
    a_time = slot;
    offer(0, 1);
    @(posedge clk); next_id++; #1; idle();
    repeat (LAT + 5) @(posedge clk);
    #1;
    // ---- B: one port-rate flow ----
    phase = 2;
    b_win0 = slot + 100;
    for (int t = 0; t < 300; t++) begin
      idle();
      offer(0, 1);
      arr_payload[0] = next_id;
      @(posedge clk);
      if (arr_ready[0]) next_id++;
      #1;
    end
    idle();
    repeat (VOQ_DEPTH * 4 + 40) @(posedge clk);
    #1;
    checks++;
    if (b_deps < (200 * ((KS >= RTT) ? RTT : KS)) / RTT - 2 ||
        b_deps > (200 * ((KS >= RTT) ? RTT : KS)) / RTT + 2) begin
      failures++;
      $display("single flow: %0d departures in 200 slots, expected %0d", b_deps,
               (200 * ((KS >= RTT) ? RTT : KS)) / RTT);
    end
    // ---- C: sharing inside one buffer ----
    phase = 3;
    for (int t = 0; t < 300; t++) begin
      idle();
      for (int p = 0; p < N && p < 4; p++)
        if ($urandom_range(0, 99) < 60) begin offer(p, (p < 2) ? 2 % N : 3 % N); arr_payload[p] = next_id + p; end
      @(posedge clk);
      for (int p = 0; p < N; p++) if (arr_valid[p] && arr_ready[p]) next_id += N;
      #1;
    end
    // ---- D: uniform traffic, load 0.7 ----
    phase = 4;
    for (int t = 0; t < 1500; t++) begin
      idle();
      for (int p = 0; p < N; p++)
        if ($urandom_range(0, 99) < 70) begin offer(p, $urandom_range(0, N-1)); arr_payload[p] = next_id + p; end
      @(posedge clk);
      next_id += N;
      #1;
    end
    // ---- E: hotspot on output 0 ----
    phase = 5;
    for (int t = 0; t < 200; t++) begin
      idle();
      for (int p = 0; p < N; p++)
        if ($urandom_range(0, 99) < 50) begin offer(p, 0); arr_payload[p] = next_id + p; end
      @(posedge clk);
      next_id += N;
      #1;
    end
    // ---- F: strict priority between two inputs of one group ----
    if (P > 1) begin
      idle();
      repeat (N * VOQ_DEPTH * 4 + 200) @(posedge clk);
      #1;
      phase = 6;
      f_win0 = slot + 100;
      for (int t = 0; t < 400; t++) begin
        idle();
        offer(0, 1); arr_prio[0] = prio_t'(P - 1); arr_payload[0] = next_id;
        offer(1, 1); arr_prio[1] = '0;             arr_payload[1] = next_id + 1;
        @(posedge clk);
        next_id += 2;
        #1;
      end
      checks++;
      if (f_low != 0 || f_high < (300 * ((KS >= RTT) ? RTT : KS)) / RTT - 3) begin
        failures++;
        $display("strict priority: low class got %0d, high class %0d cells in 300 slots", f_low, f_high);
      end
    end
    idle();
    phase = 7;
    repeat (N * VOQ_DEPTH * 4 + 200) @(posedge clk);
    // nothing may be left behind
    for (int s = 0; s < N; s++)
      for (int d = 0; d < N; d++) begin
        checks++;
        for (int c = 0; c < P; c++)
          if (sb[s][d][c].size() != 0) begin
            failures++;
            $display("flow %0d->%0d class %0d: %0d cells never left", s, d, c, sb[s][d][c].size());
          end
      end
    // every mechanism must have happened
    checks++;
    if ((NEED_STALL && n_stall == 0) || (NEED_FULL && (n_full == 0 || n_owner == 0)) ||
        n_shared == 0 || n_iter2 == 0 || n_oa_cont == 0 || n_scu_split == 0 || n_scu_one == 0) begin
      failures++;
      $display("mechanism never seen");
    end
    $display("LQF=%0d P=%0d KS=%0d RTT=%0d: %0d cells, flow rate %0d/200, VOQ-full stalls %0d, full buffers %0d, one-input-owns-buffer %0d, two-inputs-in-buffer %0d, full-buffer bypass %0d, second-iteration matches %0d, output contention %0d, partition split %0d, partition to one input %0d, priority phase low/high %0d/%0d",
             LQF, P, KS, RTT, n_deps, b_deps, n_stall, n_full, n_owner, n_shared, n_bypass, n_iter2, n_oa_cont,
             n_scu_split, n_scu_one, f_low, f_high);
    done = 1;
  end

endmodule
