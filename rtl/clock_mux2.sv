// Two-input clock multiplexer: o_clk follows i_clk1 when i_sel is high and
// i_clk0 otherwise. It is a plain combinational mux, as the design calls
// for a single mux between the two input clocks; switching i_sel while
// either clock is high can shorten one clock pulse, so the select is meant
// to change only while the downstream gate is off.
module clock_mux2 (
  input  logic i_clk0,
  input  logic i_clk1,
  input  logic i_sel,
  output logic o_clk
);

  assign o_clk = i_sel ? i_clk1 : i_clk0;

endmodule
