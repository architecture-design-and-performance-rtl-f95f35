// tb_smcb_crossbar: the buffered crossbar of a 4-port switch (M = 2, KS = 2)
// with the line cards replaced by testbench queues and zero-delay links
// (RTT = 2 slots). The testbench sends an arrival notice per new cell and
// answers every grant in the same slot with the head cell of the granted VOQ,
// checking that the VOQ is not empty. Checked: latency of a lone cell
// (4 slots), full rate for a single flow (KS = RTT), delivery of every cell of
// random and hotspot traffic in order on its own output.
module tb_smcb_crossbar;
  import smcb_pkg::*;
  localparam int N = 4, M = 2, KS = 2;
  logic clk = 0, rst_n = 0;
  uplink_t   up   [N];
  downlink_t down [N];
  cell_t voq [N][N][$];
  int unsigned sb [N][N][$];
  int checks = 0, failures = 0;
  int slot = 0, next_id = 1, t_lone = -1, lat = -1, flow_deps = 0, win0 = 1 << 30;
  bit gen_on = 0;
  int mode = 0;

  smcb_crossbar #(.N(N), .M(M), .KS(KS), .ITERS(2), .RCW(8)) dut (.clk, .rst_n, .up, .down);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // line-card model: drive uplinks after each edge
  always @(negedge clk) begin
    for (int p = 0; p < N; p++) begin
      up[p] = '0;
      if (rst_n && down[p].gnt_v) begin
        int d;
        d = int'(down[p].gnt_dst);
        checks++;
        if (voq[p][d].size() == 0) begin failures++; $display("grant to empty VOQ %0d,%0d", p, d); end
        else begin up[p].cell_v = 1; up[p].cdata = voq[p][d].pop_front(); end
      end
      if (gen_on) begin
        int d;
        bit go;
        go = 0; d = 0;
        case (mode)
          0: begin go = (p == 0); d = 1; end                    // single flow
          1: begin go = ($urandom_range(0, 99) < 60); d = $urandom_range(0, N-1); end
          2: begin go = ($urandom_range(0, 99) < 50); d = 3; end // hotspot
          default: go = 0;
        endcase
        if (go) begin
          cell_t c;
          c = '{prio: '0, src: port_t'(p), dst: port_t'(d), payload: next_id};
          next_id++;
          voq[p][d].push_back(c);
          sb[p][d].push_back(c.payload);
          up[p].req_v = 1; up[p].req_dst = port_t'(d);
        end
      end
    end
  end

  // departures
  always @(posedge clk) if (rst_n) begin
    slot <= slot + 1;
    for (int p = 0; p < N; p++) if (down[p].cell_v) begin
      int s;
      s = int'(down[p].cdata.src);
      checks++;
      if (int'(down[p].cdata.dst) != p || sb[s][p].size() == 0 || sb[s][p].pop_front() != down[p].cdata.payload) begin
        failures++; $display("slot %0d: wrong cell at output %0d", slot, p);
      end
      if (t_lone >= 0 && lat < 0) lat = slot - t_lone;
      if (p == 1 && slot >= win0 && slot < win0 + 100) flow_deps++;
    end
  end

  initial begin
    for (int p = 0; p < N; p++) up[p] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    // lone cell 2 -> 0
    @(negedge clk); #1;
    voq[2][0].push_back('{prio: '0, src: 2, dst: 0, payload: 999});
    sb[2][0].push_back(999);
    up[2].req_v = 1; up[2].req_dst = 0;
    t_lone = slot;
    repeat (10) @(posedge clk);
    checks++;
    if (lat != 4) begin failures++; $display("lone-cell latency %0d, expected 4", lat); end
    // single flow at port rate
    mode = 0; gen_on = 1;
    win0 = slot + 50;
    repeat (200) @(posedge clk);
    checks++;
    if (flow_deps < 99) begin failures++; $display("single flow: %0d of 100 slots", flow_deps); end
    gen_on = 0;
    repeat (100) @(posedge clk);
    mode = 1; gen_on = 1; repeat (1000) @(posedge clk);
    mode = 2; repeat (200) @(posedge clk);
    gen_on = 0;
    repeat (600) @(posedge clk);
    for (int s = 0; s < N; s++) for (int d = 0; d < N; d++) begin
      checks++;
      if (sb[s][d].size() != 0 || voq[s][d].size() != 0) begin failures++; $display("flow %0d->%0d left over", s, d); end
    end
    $display("lone-cell latency %0d, single-flow departures %0d/100", lat, flow_deps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
