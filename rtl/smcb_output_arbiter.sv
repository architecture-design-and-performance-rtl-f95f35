// smcb_output_arbiter: output arbiter of one output port j.
//
// Output j is fed by the N/M shared buffers SMB(0..N/M-1, j), and each of
// them holds up to M logical queues, one per sharing input, so the arbiter
// looks at N candidate head cells, candidate i being the head of input i's
// queue in SMB(i / M, j). It picks one non-empty candidate per slot in
// round-robin order, starting at its pointer, and then moves the pointer one
// position beyond the chosen input. The pick pops the cell from its buffer in
// the same slot (rd_en / rd_idx) and the cell leaves on out_v / out_cell at
// the next clock edge, towards the line card of port j.
//
// Interface: hol_valid / hol_cell (N candidates), rd_en / rd_idx
// (combinational pop request), out_v / out_cell (registered output cell).
module smcb_output_arbiter
  import smcb_pkg::*;
#(
  parameter int N  = 32,
  parameter int NW = $clog2(N)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N-1:0]   hol_valid,
  input  cell_t          hol_cell [N],
  output logic           rd_en,
  output logic [NW-1:0]  rd_idx,
  output logic           out_v,
  output cell_t          out_cell
);

  logic [NW-1:0] ptr;
  logic [N-1:0]  sel_oh;

  rr_arbiter #(.W(N), .IW(NW)) u_arb (
    .req(hol_valid), .ptr(ptr), .gnt_v(rd_en), .gnt_idx(rd_idx), .gnt_oh(sel_oh));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr      <= '0;
      out_v    <= 1'b0;
      out_cell <= '0;
    end else begin
      out_v <= rd_en;
      if (rd_en) begin
        out_cell <= hol_cell[rd_idx];
        ptr      <= NW'((int'(rd_idx) + 1) % N);
      end
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> $onehot(sel_oh));

endmodule
