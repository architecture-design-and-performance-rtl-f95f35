// smcb_switch: N x N combined input / shared-memory crosspoint buffered switch
// with input-crosspoint matching (the mSMCB switch), top level.
//
// A buffered crossbar with dedicated crosspoint buffers needs k >= RTT cells
// per crosspoint to carry a flow at port rate, N*N*k cells in all. Here every
// crosspoint buffer is shared by M inputs, so the crossbar holds N*N/M buffers
// of KS cells; a single port-rate flow can use a whole buffer, so KS >= RTT is
// enough for it. Instead of memory speedup, an input-access scheduler per
// group of M inputs lets at most one input write each buffer per slot.
//
// Structure: N line cards (VOQs), an uplink delay of D1 slots per port, the
// buffered crossbar (address decoders, schedulers, shared buffers, output
// arbiters), and a downlink delay of D2 slots per port.
//
// Cell life, in slots (one clock = one time slot):
//   t              cell arrives and is queued; its request leaves the line card
//   t+D1           request reaches the scheduler and is counted
//   t+D1+1         earliest match (one slot of scheduling), grant registered
//   t+D1+2+D2      grant reaches the line card, the cell is sent
//   t+2*D1+2+D2    cell written into its shared buffer
//   t+2*D1+3+D2    output arbitration picks it (one slot)
//   t+2*D1+4+2*D2  cell leaves the line card of its output port
// The round-trip time of a buffer credit (grant to release) is
// RTT = D1 + D2 + 2 slots, so one flow reaches full rate when KS >= RTT and
// KS/RTT of it otherwise.
//
// Traffic classes: with P > 1 each line card keeps N*P VOQs and the
// input-access schedulers match with strict priority (class 0 first, round
// robin within a class), while buffers and output arbiters stay class-blind.
// P = 1 is the single-class switch; P = 3 is the differentiated-service
// configuration.
//
// Interface, per port p: arr_valid/arr_dst/arr_prio/arr_payload/arr_ready for
// arriving cells, dep_valid/dep_cell for departing cells; voq_occ[p][d*P+c]
// is the occupancy of VOQ (d, c) of line card p. N, M and KS default
// to the 32-port, two-input sharing, two-cell buffer configuration evaluated
// for this architecture; D1, D2 and VOQ_DEPTH are this design's choices.
// LQF = 1 makes each input accept its longest VOQ first (the selection the
// document also evaluates); the default is round robin.
module smcb_switch
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
  parameter bit LQF       = 1'b0
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
  output logic [$clog2(VOQ_DEPTH+1)-1:0] voq_occ [N][N*P]
);

  localparam int RCW = $clog2(VOQ_DEPTH + 1);

  uplink_t   up_lc   [N];   // leaving line cards
  uplink_t   up_xb   [N];   // reaching the crossbar
  downlink_t dn_xb   [N];   // leaving the crossbar
  downlink_t dn_lc   [N];   // reaching line cards

  for (genvar p = 0; p < N; p++) begin : g_port
    smcb_input_port #(.N(N), .P(P), .VOQ_DEPTH(VOQ_DEPTH), .PORT_ID(p)) u_lc (
      .clk, .rst_n,
      .arr_valid(arr_valid[p]), .arr_dst(arr_dst[p]), .arr_prio(arr_prio[p]),
      .arr_payload(arr_payload[p]),
      .arr_ready(arr_ready[p]),
      .up(up_lc[p]), .down(dn_lc[p]),
      .dep_valid(dep_valid[p]), .dep_cell(dep_cell[p]),
      .voq_occ(voq_occ[p]));

    delay_line #(.W(UPLINK_W), .DELAY(D1)) u_d1 (
      .clk, .rst_n, .d_in(up_lc[p]), .d_out(up_xb[p]));

    delay_line #(.W(DOWNLINK_W), .DELAY(D2)) u_d2 (
      .clk, .rst_n, .d_in(dn_xb[p]), .d_out(dn_lc[p]));
  end

  smcb_crossbar #(.N(N), .M(M), .P(P), .KS(KS), .ITERS(ITERS), .RCW(RCW), .LQF(LQF)) u_xbar (
    .clk, .rst_n, .up(up_xb), .down(dn_xb));

endmodule
