// smcb_scu: sharing control unit of one shared buffer in the SMCBxm switch
// (the shared-buffer variant with memory speedup, here m = 2).
//
// In that variant no scheduler sits in front of the buffer; instead the buffer
// is partitioned between its two inputs in proportion to their demand, and
// each partition acts as the crosspoint buffer of one input under ordinary
// credit flow control. Each input reports the occupancy Z of its VOQ for this
// output; the unit turns the pair (Z_a, Z_b) into the maximum credit counts
// C_a, C_b the inputs may use:
//   Z_a = 0,        Z_b = 0         ->  0,           0
//   Z_a > 0,        Z_b = 0         ->  min(Z_a, R), 0       (and mirrored)
//   0 < Z_a <= R/2, 0 < Z_b <= R/2  ->  R/2,         R/2
//   Z_a > R/2,      0 < Z_b <= R/2  ->  R - Z_b,     Z_b     (and mirrored)
//   Z_a > R/2,      Z_b > R/2       ->  R/2,         R/2
// where R is the round-trip time in slots, the amount the buffer is split.
// An odd R is split as floor(R/2) each when both inputs are busy.
//
// Interface: z_a, z_b (occupancies, ZW bits); cmax_a, cmax_b (thresholds,
// registered: the partition computed from slot t's occupancies holds from slot
// t+1). The mirrored rows and the registered output are this design's choices.
module smcb_scu #(
  parameter int RTT = 2,
  parameter int ZW  = 8,
  parameter int CW  = $clog2(RTT + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [ZW-1:0] z_a,
  input  logic [ZW-1:0] z_b,
  output logic [CW-1:0] cmax_a,
  output logic [CW-1:0] cmax_b
);

  localparam int HALF = RTT / 2;

  logic [CW-1:0] ca, cb;

  always_comb begin
    int unsigned za, zb;
    za = 32'(z_a);
    zb = 32'(z_b);
    if (za == 0 && zb == 0) begin
      ca = '0;
      cb = '0;
    end else if (zb == 0) begin
      ca = CW'((za > RTT) ? RTT : za);
      cb = '0;
    end else if (za == 0) begin
      ca = '0;
      cb = CW'((zb > RTT) ? RTT : zb);
    end else if (za > HALF && zb <= HALF) begin
      ca = CW'(RTT - zb);
      cb = CW'(zb);
    end else if (zb > HALF && za <= HALF) begin
      ca = CW'(za);
      cb = CW'(RTT - za);
    end else begin
      ca = CW'(HALF);
      cb = CW'(HALF);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cmax_a <= '0;
      cmax_b <= '0;
    end else begin
      cmax_a <= ca;
      cmax_b <= cb;
    end
  end

  a_no_overcommit: assert property (@(posedge clk) disable iff (!rst_n)
    int'(cmax_a) + int'(cmax_b) <= RTT);

endmodule
