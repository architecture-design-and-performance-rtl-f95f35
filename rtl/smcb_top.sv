// smcb_top: the mSMCB switch together with a bank of sharing control units
// that computes, from the live VOQ occupancies, the buffer partition the
// SMCBx2 variant (shared buffers with memory speedup 2, no input scheduler)
// would apply to the same traffic.
//
// How it works: smcb_switch carries all cells; its input-access schedulers and
// fixed per-buffer credits decide admission. For every pair of consecutive
// inputs (2g, 2g+1) and every output j one smcb_scu receives the total
// occupancy of VOQ(2g, j) and VOQ(2g+1, j), summed over traffic classes, and
// produces the two credit thresholds of the SMCBx2 partition for a round trip
// of RTT = D1 + D2 + 2 slots. The thresholds are status outputs only: they do
// not gate the switch. They let the partition rule be observed on the same
// traffic, and they are what a line card of an SMCBx2 switch would receive.
//
// Interface: the smcb_switch ports, plus scu_cmax[i][j], the threshold of
// input i for output j (registered, one slot after the occupancies it is
// computed from). Pairing consecutive inputs follows the two-input sharing of
// the document; reporting the thresholds instead of acting on them is this
// design's choice, because the document does not say how a lowered threshold
// treats cells already in flight. N must be even.
module smcb_top
  import smcb_pkg::*;
#(
  parameter int N         = 32,
  parameter int M         = 2,
  parameter int P         = 1,
  parameter int KS        = 2,
  parameter int D1        = 1,
  parameter int D2        = 1,
  parameter int VOQ_DEPTH = 8,
  parameter int ITERS     = 2,
  parameter bit LQF       = 1'b0,
  parameter int RTT       = D1 + D2 + 2,
  parameter int CMW       = $clog2(RTT + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  arr_valid   [N],
  input  port_t                 arr_dst     [N],
  input  prio_t                 arr_prio    [N],
  input  logic [PAYLOAD_W-1:0]  arr_payload [N],
  output logic                  arr_ready   [N],
  output logic                  dep_valid   [N],
  output cell_t                 dep_cell    [N],
  output logic [CMW-1:0]        scu_cmax    [N][N]
);

  localparam int RCW = $clog2(VOQ_DEPTH + 1);
  localparam int ZW  = $clog2(VOQ_DEPTH * P + 1);

  logic [RCW-1:0] occ [N][N*P];
  logic [ZW-1:0]  z   [N][N];

  smcb_switch #(.N(N), .M(M), .P(P), .KS(KS), .D1(D1), .D2(D2),
                .VOQ_DEPTH(VOQ_DEPTH), .ITERS(ITERS), .LQF(LQF)) u_sw (
    .clk, .rst_n, .arr_valid, .arr_dst, .arr_prio, .arr_payload, .arr_ready,
    .dep_valid, .dep_cell, .voq_occ(occ));

  // occupancy per (input, output), all classes together
  always_comb begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        z[i][j] = '0;
        for (int c = 0; c < P; c++) z[i][j] = z[i][j] + ZW'(occ[i][j*P+c]);
      end
  end

  for (genvar g = 0; g < N / 2; g++) begin : g_pair
    for (genvar j = 0; j < N; j++) begin : g_out
      smcb_scu #(.RTT(RTT), .ZW(ZW), .CW(CMW)) u_scu (
        .clk, .rst_n,
        .z_a(z[2*g][j]), .z_b(z[2*g+1][j]),
        .cmax_a(scu_cmax[2*g][j]), .cmax_b(scu_cmax[2*g+1][j]));
    end
  end

endmodule
