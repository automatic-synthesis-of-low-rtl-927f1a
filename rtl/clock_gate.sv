// Latch-based clock gate producing the local clock GCLK of the FSM.
//
// The activation function fa_i is captured by a level-sensitive latch that is
// transparent while the global clock clk_i is low and holds while clk_i is
// high.  The local clock is gclk_o = clk_i AND NOT(latched fa).  A rising edge
// of clk_i therefore passes to gclk_o only if fa_i was 0 at the end of the
// preceding low phase; glitches on fa_i while clk_i is high cannot reach
// gclk_o because the latch is closed, and glitches while clk_i is low are
// blocked by the AND gate because clk_i is 0.  This is the structure of the
// published design; the latch is intended, and is the only latch of the FSM.
//
// Reset: rst_ni low forces the latch to 0 (clock enabled), a choice of this
// design so that the local clock runs from the first edge after reset.
//
// Timing: fa_i must be valid before the rising edge of clk_i (setup through
// the latch).  fa_lat_o shows the latched activation value (1 = stopped).
module clock_gate (
  input  logic clk_i,
  input  logic rst_ni,
  input  logic fa_i,
  output logic fa_lat_o,
  output logic gclk_o
);

  always_latch begin
    if (!rst_ni) begin
      fa_lat_o = 1'b0;
    end else if (!clk_i) begin
      fa_lat_o = fa_i;
    end
  end

  assign gclk_o = clk_i & ~fa_lat_o;

endmodule
