// rr_arbiter: combinational round-robin pick.
//
// Returns the first asserted request at or after position ptr, wrapping around
// (the request "next to the pointer" in round-robin order). The pointer itself
// is kept by the user, who moves it one position beyond the chosen request when
// the choice is committed. Used by the input-access scheduler (grant and accept
// phases) and by the output arbiters.
//
// Interface: req (W bits), ptr (index), gnt_v (any request), gnt_idx (winner),
// gnt_oh (winner, one-hot). No clock; the result is valid in the same cycle.
module rr_arbiter #(
  parameter int W  = 4,
  parameter int IW = (W > 1) ? $clog2(W) : 1
) (
  input  logic [W-1:0]  req,
  input  logic [IW-1:0] ptr,
  output logic          gnt_v,
  output logic [IW-1:0] gnt_idx,
  output logic [W-1:0]  gnt_oh
);

  always_comb begin
    gnt_v   = 1'b0;
    gnt_idx = '0;
    gnt_oh  = '0;
    for (int k = 0; k < W; k++) begin
      logic [IW-1:0] pos;
      pos = IW'((int'(ptr) + k) % W);
      if (!gnt_v && req[pos]) begin
        gnt_v       = 1'b1;
        gnt_idx     = pos;
        gnt_oh[pos] = 1'b1;
      end
    end
  end

endmodule
