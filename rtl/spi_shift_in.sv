// Serial-in, parallel-out shift register of the backdoor SPI slave.
//
// On every rising edge of i_CLK with i_EN high, o_Q shifts left by one and
// i_D enters at bit 0, so the first bit received ends up most significant.
// Reset (asynchronous, active high) loads o_Q with 1: that lone 1 is a
// marker which reaches o_Q[DATA_WIDTH] after exactly DATA_WIDTH shifts, at
// which point o_Q[DATA_WIDTH-1:0] holds the received word and the marker
// can serve as a "word complete" flag (the enclosing SPI block uses it to
// stop shifting). Reset value, shift direction, marker bit and the default
// width of 32 follow the design; only the coding is this file's own.
module spi_shift_in #(
  parameter int unsigned DATA_WIDTH = 32  // data bits, marker bit not included
) (
  input  logic                  i_CLK,  // shift clock (SPI bus clock)
  input  logic                  i_RST,  // asynchronous reset, active high
  input  logic                  i_EN,   // shift when high
  input  logic                  i_D,    // serial input (MOSI)
  output logic [DATA_WIDTH:0]   o_Q     // {marker, data}
);

  always_ff @(posedge i_CLK or posedge i_RST) begin
    if (i_RST)     o_Q <= (DATA_WIDTH + 1)'(1);
    else if (i_EN) o_Q <= {o_Q[DATA_WIDTH-1:0], i_D};
  end

endmodule
