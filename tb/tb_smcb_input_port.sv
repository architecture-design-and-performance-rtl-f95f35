// tb_smcb_input_port: line card of port 2 in a 4-port switch with two traffic
// classes and VOQs of 4 cells. Random arrivals (some to full VOQs, which must be refused) and random
// grants for non-empty VOQs. Per-VOQ reference FIFOs predict the arrival
// notice, the ready flag, the cell sent on each grant and the occupancies;
// downlink cells must appear unchanged as departures.
module tb_smcb_input_port;
  import smcb_pkg::*;
  localparam int N = 4, P = 2, D = 4, ID = 2, CW = $clog2(D+1), Q = N * P;
  logic clk = 0, rst_n = 0;
  logic arr_valid, arr_ready, dep_valid;
  port_t arr_dst;
  prio_t arr_prio;
  logic [PAYLOAD_W-1:0] arr_payload;
  uplink_t up;
  downlink_t down;
  cell_t dep_cell;
  logic [CW-1:0] occ [Q];
  cell_t refq [Q][$];
  int checks = 0, failures = 0, n_refused = 0, n_sent = 0;

  smcb_input_port #(.N(N), .P(P), .VOQ_DEPTH(D), .PORT_ID(ID)) dut (.clk, .rst_n,
    .arr_valid, .arr_dst, .arr_prio, .arr_payload, .arr_ready, .up, .down, .dep_valid, .dep_cell,
    .voq_occ(occ));

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    arr_valid = 0; arr_dst = '0; arr_prio = '0; arr_payload = '0; down = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int g, ne, ev;
      bit acc;
      @(negedge clk);
      arr_valid   = ($urandom_range(0, 99) < 70);
      arr_dst     = port_t'((t % 400 < 100) ? 1 : $urandom_range(0, N-1));
      arr_prio    = prio_t'($urandom_range(0, P-1));
      arr_payload = $urandom;
      ev = int'(arr_dst) * P + int'(arr_prio);
      down = '0;
      // grant one non-empty VOQ now and then
      g = -1; ne = 0;
      for (int v = 0; v < Q; v++) if (refq[v].size() > 0) ne++;
      if (ne > 0 && $urandom_range(0, 99) < 55) begin
        do g = $urandom_range(0, Q-1); while (refq[g].size() == 0);
        down.gnt_v = 1; down.gnt_dst = port_t'(g / P); down.gnt_prio = prio_t'(g % P);
      end
      down.cell_v = 1'($urandom);
      down.cdata  = '{prio: '0, src: port_t'($urandom_range(0, N-1)), dst: port_t'(ID), payload: $urandom};
      #1;
      acc = arr_valid && (refq[ev].size() < D);
      checks++;
      if (arr_ready != (refq[ev].size() < D)) begin failures++; $display("t=%0d ready", t); end
      if (arr_valid && !acc) n_refused++;
      checks++;
      if (up.req_v != acc || (acc && (up.req_dst != arr_dst || up.req_prio != arr_prio))) begin
        failures++; $display("t=%0d notice", t);
      end
      checks++;
      if (up.cell_v != (g >= 0)) failures++;
      if (g >= 0) begin
        checks++;
        n_sent++;
        if (up.cdata !== refq[g][0]) begin failures++; $display("t=%0d sent wrong cell", t); end
      end
      checks++;
      if (dep_valid != down.cell_v || (down.cell_v && dep_cell !== down.cdata)) failures++;
      for (int v = 0; v < Q; v++) begin
        checks++;
        if (int'(occ[v]) != refq[v].size()) begin failures++; $display("t=%0d occ %0d", t, v); end
      end
      @(posedge clk);
      if (g >= 0) void'(refq[g].pop_front());
      if (acc) refq[ev].push_back('{prio: arr_prio, src: port_t'(ID), dst: arr_dst, payload: arr_payload});
    end
    checks++;
    if (n_refused == 0 || n_sent == 0) begin failures++; $display("coverage missing"); end
    $display("refused arrivals %0d, cells sent %0d", n_refused, n_sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
