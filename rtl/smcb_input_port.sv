// smcb_input_port: line card of one switch port (ingress VOQs and egress).
//
// Arriving cells are sorted into virtual output queues (VOQs), one per output
// and traffic class (N*P queues; P = 1 for a single class), so that a cell
// blocked for one output never holds up cells for another. In the same slot a
// cell is queued, the port sends an arrival notice (request, with the class)
// to the input-access scheduler in the crossbar over the uplink. The port
// itself makes no scheduling decision: when a grant for output j and class p
// comes back on the downlink, it sends the head cell of VOQ(j, p) on the
// uplink in that same slot (stop-and-go flow control, no input arbiter on the
// line card). The cell that the crossbar delivers for this port's output is
// passed out as the departing cell.
//
// Interface: arr_* is the arrival of at most one cell per slot; arr_ready is low
// when the VOQ of (arr_dst, arr_prio) is full (the cell is then not taken).
// up / down are the link words before the d1 and after the d2 transmission
// delay. voq_occ[j*P + p] is the occupancy of VOQ(j, p).
// Timing: a notice leaves in the arrival slot; a granted cell leaves in the
// slot its grant arrives. VOQ_DEPTH, the storage of each VOQ, is this design's
// choice: the analysis of the switch assumes unbounded VOQs.
module smcb_input_port
  import smcb_pkg::*;
#(
  parameter int N         = 32,
  parameter int P         = 1,
  parameter int VOQ_DEPTH = 8,
  parameter int PORT_ID   = 0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // arriving cells
  input  logic                  arr_valid,
  input  port_t                 arr_dst,
  input  prio_t                 arr_prio,
  input  logic [PAYLOAD_W-1:0]  arr_payload,
  output logic                  arr_ready,
  // links to and from the crossbar
  output uplink_t               up,
  input  downlink_t             down,
  // departing cells
  output logic                  dep_valid,
  output cell_t                 dep_cell,
  // VOQ occupancies
  output logic [$clog2(VOQ_DEPTH+1)-1:0] voq_occ [N*P]
);

  localparam int Q  = N * P;
  localparam int PW = (VOQ_DEPTH > 1) ? $clog2(VOQ_DEPTH) : 1;
  localparam int CW = $clog2(VOQ_DEPTH + 1);

  cell_t           mem  [Q][VOQ_DEPTH];
  logic [PW-1:0]   head [Q];
  logic [PW-1:0]   tail [Q];
  logic [CW-1:0]   cnt  [Q];

  logic enq, deq;
  int unsigned ev, dv;   // VOQ written / read this slot

  assign ev        = (int'(arr_dst) % N) * P + (int'(arr_prio) % P);
  assign dv        = (int'(down.gnt_dst) % N) * P + (int'(down.gnt_prio) % P);
  assign arr_ready = (cnt[ev] != CW'(VOQ_DEPTH));
  assign enq       = arr_valid && arr_ready;
  assign deq       = down.gnt_v;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int v = 0; v < Q; v++) begin
        head[v] <= '0;
        tail[v] <= '0;
        cnt[v]  <= '0;
      end
    end else begin
      if (enq) begin
        tail[ev] <= (int'(tail[ev]) == VOQ_DEPTH - 1) ? '0 : tail[ev] + 1'b1;
      end
      if (deq) begin
        head[dv] <= (int'(head[dv]) == VOQ_DEPTH - 1) ? '0 : head[dv] + 1'b1;
      end
      for (int v = 0; v < Q; v++) begin
        cnt[v] <= cnt[v] + CW'(enq && ev == v) - CW'(deq && dv == v);
      end
    end
  end

  // cell storage: one write port, no reset needed
  always_ff @(posedge clk) begin
    if (enq) mem[ev][tail[ev]] <= '{prio: arr_prio, src: port_t'(PORT_ID), dst: arr_dst, payload: arr_payload};
  end

  always_comb begin
    up          = '0;
    up.req_v    = enq;
    up.req_dst  = arr_dst;
    up.req_prio = arr_prio;
    up.cell_v   = deq;
    up.cdata    = mem[dv][head[dv]];
  end

  assign dep_valid = down.cell_v;
  assign dep_cell  = down.cdata;
  assign voq_occ   = cnt;

  // A grant is only ever issued against a notified, still queued cell.
  a_grant_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
    deq |-> cnt[dv] != '0);

endmodule
