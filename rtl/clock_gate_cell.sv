// Integrated clock gate: latch plus AND.
//
// The enable is captured by a latch that is transparent while i_clk is low
// and holds while it is high, so o_gclk = i_clk & enable never shortens or
// splits a high phase. The latch is intended (it is what makes the gate
// glitch-free); a synthesis flow maps the pair onto a library ICG cell.
module clock_gate_cell (
  input  logic i_clk,   // clock to gate
  input  logic i_en,    // 1 = pass the clock
  output logic o_gclk   // gated clock
);

  logic en_l;

  always_latch begin
    if (!i_clk) en_l = i_en;
  end

  assign o_gclk = i_clk & en_l;

endmodule
