// tb_smcb_workloads: runs the traffic models used to evaluate the switch on an
// 8-port top level (M = 2, KS = 2, one-slot links, RTT = 4 slots) and reports
// the throughput of each; every cell is also checked through a per-flow
// scoreboard (right output, order, payload, nothing lost).
//
// Models, each offered at full load (an input always has a cell to offer,
// held while its VOQ is full) for 1200 measured slots after 300 warm-up
// slots, then drained:
//   uniform     destination uniform over the N outputs;
//   unbalanced  w = 0.5 and w = 1: destination i with probability
//               w + (1-w)/N, otherwise uniform (fraction w to one output);
//   diagonal    d = 0.25 and d = 0: destination i with probability d,
//               (i+1) mod N otherwise;
//   PO2         destination (i+k) mod N with probability 2^-(k+1), the
//               remainder to (i+N-1) mod N;
//   bursty      on-off bursts with geometric length of mean 10 cells, all
//               cells of a burst to one uniformly chosen output, load 0.8.
// Checked rates: with w = 1 and with d = 0 every input carries one flow, and
// one flow gets exactly KS/RTT = 1/2 of the port, so throughput must be
// 0.5 +- 0.02; every other model must stay within (0, 1]. The other figures
// are printed, not judged: the models follow the document, the lengths of
// the runs and the 8-port size are this testbench's choices.
module tb_smcb_workloads;
  import smcb_pkg::*;
  localparam int N = 8, M = 2, KS = 2, D1 = 1, D2 = 1, RTT = D1 + D2 + 2;
  localparam int WARM = 300, MEAS = 1200;

  logic clk = 0, rst_n = 0;
  logic                 arr_valid   [N];
  port_t                arr_dst     [N];
  prio_t                arr_prio    [N];
  logic [PAYLOAD_W-1:0] arr_payload [N];
  logic                 arr_ready   [N];
  logic                 dep_valid   [N];
  cell_t                dep_cell    [N];
  logic [2:0]           scu_cmax    [N][N];

  smcb_top #(.N(N), .M(M), .KS(KS), .D1(D1), .D2(D2)) dut (
    .clk, .rst_n, .arr_valid, .arr_dst, .arr_prio, .arr_payload, .arr_ready,
    .dep_valid, .dep_cell, .scu_cmax);

  int unsigned sb [N][N][$];
  int checks = 0, failures = 0, slot = 0;
  int measuring = 0, n_meas = 0;
  int unsigned next_id = 1;
  int burst_left [N];
  int burst_dst  [N];

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    slot <= slot + 1;
    for (int p = 0; p < N; p++) begin
      if (arr_valid[p] && arr_ready[p]) sb[p][arr_dst[p]].push_back(arr_payload[p]);
      if (dep_valid[p]) begin
        int s;
        s = int'(dep_cell[p].src);
        checks++;
        if (measuring != 0) n_meas++;
        if (int'(dep_cell[p].dst) != p || s >= N || sb[s][p].size() == 0 ||
            sb[s][p].pop_front() != dep_cell[p].payload) begin
          failures++; $display("slot %0d: wrong cell at output %0d", slot, p);
        end
      end
    end
  end

  // destination of a new cell at input i under model m
  function automatic int pick(int m, int i);
    int r, k;
    case (m)
      1, 2: begin   // unbalanced, w = 0.5 (m = 1) or w = 1 (m = 2)
        r = $urandom_range(0, 999);
        if ((m == 2) || r < 500) return i;
        return $urandom_range(0, N-1);
      end
      3, 4: begin   // diagonal, d = 0.25 (m = 3) or d = 0 (m = 4)
        r = $urandom_range(0, 99);
        if (m == 3 && r < 25) return i;
        return (i + 1) % N;
      end
      5: begin      // power of two
        k = 0;
        while (k < N - 1 && $urandom_range(0, 1) == 1) k++;
        return (i + k) % N;
      end
      default: return $urandom_range(0, N-1);
    endcase
  endfunction

  task automatic run(int m, string name, output real thr);
    int load;
    load = (m == 6) ? 80 : 100;
    for (int p = 0; p < N; p++) begin burst_left[p] = 0; arr_valid[p] = 0; end
    for (int t = 0; t < WARM + MEAS; t++) begin
      if (t == WARM) begin measuring = 1; n_meas = 0; end
      for (int p = 0; p < N; p++) begin
        if (!arr_valid[p]) begin
          if (m == 6) begin
            // on-off source: a burst of mean 10 cells, then idle with mean 2.5
            if (burst_left[p] == 0 && $urandom_range(0, 99) < 40) begin
              burst_dst[p] = $urandom_range(0, N-1);
              burst_left[p] = 1;
              while ($urandom_range(0, 9) != 0) burst_left[p]++;
            end
            if (burst_left[p] > 0) begin
              arr_valid[p] = 1; arr_dst[p] = port_t'(burst_dst[p]); burst_left[p]--;
            end
          end else if ($urandom_range(0, 99) < load) begin
            arr_valid[p] = 1; arr_dst[p] = port_t'(pick(m, p));
          end
          arr_payload[p] = next_id;
          next_id++;
        end
      end
      @(posedge clk);
      #1;
      for (int p = 0; p < N; p++) if (arr_valid[p] && arr_ready[p]) arr_valid[p] = 0;
    end
    measuring = 0;
    thr = real'(n_meas) / real'(N * MEAS);
    for (int p = 0; p < N; p++) arr_valid[p] = 0;
    repeat (N * 8 * 4 + 100) @(posedge clk);
    #1;
    for (int s = 0; s < N; s++) for (int d = 0; d < N; d++) begin
      checks++;
      if (sb[s][d].size() != 0) begin failures++; $display("%s: flow %0d->%0d not drained", name, s, d); end
    end
    checks++;
    if (thr <= 0.0 || thr > 1.0) begin failures++; $display("%s: throughput %f out of range", name, thr); end
    $display("%-18s throughput %0.3f", name, thr);
  endtask

  initial begin
    real thr;
    for (int p = 0; p < N; p++) begin
      arr_valid[p] = 0; arr_dst[p] = '0; arr_prio[p] = '0; arr_payload[p] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    #1;
    run(0, "uniform", thr);
    run(1, "unbalanced w=0.5", thr);
    run(2, "unbalanced w=1", thr);
    checks++;
    if (thr < 0.48 || thr > 0.52) begin failures++; $display("w = 1: expected KS/RTT = 0.5"); end
    run(3, "diagonal d=0.25", thr);
    run(4, "diagonal d=0", thr);
    checks++;
    if (thr < 0.48 || thr > 0.52) begin failures++; $display("d = 0: expected KS/RTT = 0.5"); end
    run(5, "PO2", thr);
    run(6, "bursty l=10 0.8", thr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
