// qca_zone_delay: cycle model of the latency of a QCA circuit. In QCA every
// clock zone latches the value computed by the zone before it, so a result
// appears a fixed number of zones after its inputs were applied; four zones
// make one clock cycle. This module is a ZONES-deep shift register that moves
// one zone per rising edge of clk (one edge per clock zone).
// Interface: clk (zone tick), rst_n (synchronous, active low, clears every
// zone to 0), in, out. out equals in as sampled ZONES clk edges earlier;
// ZONES = 0 passes in straight through.
// The zone latencies it is used with (3 zones for the 3-bit generators, 5
// for the 4-bit checkers) are those of the source design; modelling the
// clocking as a tick-driven shift register and the reset are this model's
// choices.
module qca_zone_delay #(
  parameter int unsigned ZONES = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in,
  output logic out
);
  if (ZONES == 0) begin : g_wire
    assign out = in;
  end else begin : g_zones
    logic [ZONES-1:0] zone;

    always_ff @(posedge clk) begin
      if (!rst_n) zone <= '0;
      else        zone <= (zone << 1) | ZONES'(in);
    end

    assign out = zone[ZONES-1];
  end
endmodule
