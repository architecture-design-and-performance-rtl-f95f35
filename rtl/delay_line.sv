// delay_line: the transmission line between a line card and the buffered
// crossbar.
//
// Line cards and the switch fabric may sit in different racks, so cells,
// requests and grants take whole time slots to cross the cable. This module
// models that delay as DELAY stages of registers: whatever enters in slot t
// leaves in slot t+DELAY. With DELAY = 0 the line is a wire. All stages reset
// to zero, which means "nothing on the line" for the link structures used here.
//
// Interface: d_in / d_out, W bits each, one word per clock (one clock = one
// time slot). The per-direction delays (d1 input to crossbar, d2 crossbar to
// line card) are the design's; their split of the round-trip time is a choice.
module delay_line #(
  parameter int W     = 8,
  parameter int DELAY = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d_in,
  output logic [W-1:0] d_out
);

  if (DELAY == 0) begin : g_wire
    assign d_out = d_in;
  end else begin : g_pipe
    logic [W-1:0] stage [DELAY];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int s = 0; s < DELAY; s++) stage[s] <= '0;
      end else begin
        stage[0] <= d_in;
        for (int s = 1; s < DELAY; s++) stage[s] <= stage[s-1];
      end
    end
    assign d_out = stage[DELAY-1];
  end

endmodule
