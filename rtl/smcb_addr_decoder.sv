// smcb_addr_decoder: front end of one crossbar input row.
//
// Each uplink word may carry a granted cell and an arrival request. The
// decoder splits the two: it decodes the cell's destination address into a
// one-hot write enable that selects the shared-memory buffer of that output in
// this input's row, and forwards the request (the destination of the newly
// queued cell) to the input-access scheduler of the row. It is purely
// combinational; the cell is written into the selected buffer at the end of
// the slot in which it arrives.
//
// Interface: up (uplink word after the d1 delay); cell_we (N bits, one-hot or
// zero), cell_o (the cell), req_v / req_dst / req_prio (request for the
// scheduler).
module smcb_addr_decoder
  import smcb_pkg::*;
#(
  parameter int N = 32
) (
  input  uplink_t         up,
  output logic [N-1:0]    cell_we,
  output cell_t           cell_o,
  output logic            req_v,
  output logic [$clog2(N)-1:0] req_dst,
  output prio_t           req_prio
);

  always_comb begin
    cell_we = '0;
    for (int j = 0; j < N; j++) begin
      cell_we[j] = up.cell_v && (int'(up.cdata.dst) == j);
    end
  end

  assign cell_o  = up.cdata;
  assign req_v   = up.req_v && (int'(up.req_dst) < N);
  assign req_dst  = up.req_dst[$clog2(N)-1:0];
  assign req_prio = up.req_prio;

endmodule
