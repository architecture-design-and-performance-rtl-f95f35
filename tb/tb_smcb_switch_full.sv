// tb_smcb_switch_full: the top level at its default size (32 ports, buffers
// shared by 2 inputs, KS = 2, one traffic class, one-slot links, so RTT = 4
// slots). One cell on the idle switch must leave after 2*D1 + 2*D2 + 4 = 8
// slots; then every input offers uniform random traffic at load 0.8 for 400
// slots, and after a drain every cell must have left on its own output, in
// order within its flow, with its payload intact. Every slot the two
// sharing-control thresholds of each input pair must not add up to more than
// the round trip, at least one slot must see a split between two busy inputs,
// and after the drain every threshold must be back at zero.
module tb_smcb_switch_full;
  import smcb_pkg::*;
  localparam int N = 32, LAT = 8;
  logic clk = 0, rst_n = 0;
  logic                 arr_valid   [N];
  port_t                arr_dst     [N];
  prio_t                arr_prio    [N];
  logic [PAYLOAD_W-1:0] arr_payload [N];
  logic [2:0]           scu_cmax    [N][N];
  int n_split = 0;
  logic                 arr_ready   [N];
  logic                 dep_valid   [N];
  cell_t                dep_cell    [N];
  int unsigned sb [N][N][$];
  int checks = 0, failures = 0, slot = 0, t0 = -1, lat = -1, n_deps = 0, n_arr = 0;
  int unsigned next_id = 1;

  smcb_top dut (.clk, .rst_n, .arr_valid, .arr_dst, .arr_prio, .arr_payload, .arr_ready,
                .dep_valid, .dep_cell, .scu_cmax);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    slot <= slot + 1;
    for (int g = 0; g < N / 2; g++) for (int j = 0; j < N; j++) begin
      checks++;
      if (int'(scu_cmax[2*g][j]) + int'(scu_cmax[2*g+1][j]) > 4) begin
        failures++; $display("slot %0d: thresholds overcommit pair %0d output %0d", slot, g, j);
      end
      if (scu_cmax[2*g][j] != 0 && scu_cmax[2*g+1][j] != 0) n_split++;
    end
    for (int p = 0; p < N; p++) begin
      if (arr_valid[p] && arr_ready[p]) begin sb[p][arr_dst[p]].push_back(arr_payload[p]); n_arr++; end
      if (dep_valid[p]) begin
        int s;
        s = int'(dep_cell[p].src);
        checks++;
        n_deps++;
        if (lat < 0 && t0 >= 0) lat = slot - t0;
        if (int'(dep_cell[p].dst) != p || s >= N || sb[s][p].size() == 0 ||
            sb[s][p].pop_front() != dep_cell[p].payload) begin
          failures++; $display("slot %0d: wrong cell at output %0d", slot, p);
        end
      end
    end
  end

  initial begin
    for (int p = 0; p < N; p++) begin arr_valid[p] = 0; arr_dst[p] = '0; arr_prio[p] = '0; arr_payload[p] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    #1;
    arr_valid[5] = 1; arr_dst[5] = 20; arr_payload[5] = 7777;
    t0 = slot;
    @(posedge clk); #1;
    arr_valid[5] = 0;
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (lat != LAT) begin failures++; $display("idle latency %0d, expected %0d", lat, LAT); end
    #1;
    for (int t = 0; t < 400; t++) begin
      for (int p = 0; p < N; p++) begin
        arr_valid[p]   = ($urandom_range(0, 99) < 80);
        arr_dst[p]     = port_t'($urandom_range(0, N-1));
        arr_payload[p] = next_id;
        next_id++;
      end
      @(posedge clk); #1;
    end
    for (int p = 0; p < N; p++) arr_valid[p] = 0;
    repeat (1500) @(posedge clk);
    for (int s = 0; s < N; s++) for (int d = 0; d < N; d++) begin
      checks++;
      if (sb[s][d].size() != 0) begin failures++; $display("flow %0d->%0d: cells left", s, d); end
      checks++;
      if (scu_cmax[s][d] != 0) begin failures++; $display("threshold %0d/%0d not cleared", s, d); end
    end
    checks++;
    if (n_split == 0) begin failures++; $display("no buffer was ever split between two inputs"); end
    $display("idle latency %0d slots; %0d cells accepted, %0d delivered; split partitions seen %0d",
             lat, n_arr, n_deps, n_split);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
