// Parallel-in, serial-out shift register of the backdoor SPI slave (MISO).
//
// While i_START is high and no word has been loaded since reset, the next
// rising edge of i_CLK loads i_D; the most significant bit appears on o_Q
// right after that edge and each following edge shifts the next bit out,
// most significant first, for DATA_WIDTH bits in all. A one-hot enable
// register shifts alongside the data and stops shifting once the word is
// out; zeros follow. Reset is asynchronous and active high and clears
// everything, including the "loaded" flag, so one load happens per reset
// (per SPI transaction).
//
// MSB-first order, the parallel load on i_START and the shifting enable
// follow the design. Taking i_START as a level that is seen on this
// register's own clock (instead of loading asynchronously on its edge) is
// this implementation's choice: it keeps the register fully synchronous to
// the SPI clock while i_START comes from the system clock domain.
module spi_shift_out #(
  parameter int unsigned DATA_WIDTH = 32
) (
  input  logic                  i_CLK,    // shift clock (SPI bus clock)
  input  logic                  i_RST,    // asynchronous reset, active high
  input  logic                  i_START,  // level: load i_D on the next edge
  input  logic [DATA_WIDTH-1:0] i_D,      // parallel word to send
  output logic                  o_Q       // serial output (MISO)
);

  logic [DATA_WIDTH-1:0] s_DATA;
  logic [DATA_WIDTH-1:0] s_EN;
  logic                  s_LOADED;

  always_ff @(posedge i_CLK or posedge i_RST) begin
    if (i_RST) begin
      s_DATA   <= '0;
      s_EN     <= '0;
      s_LOADED <= 1'b0;
    end else if (i_START && !s_LOADED) begin
      s_DATA   <= i_D;
      s_EN     <= DATA_WIDTH'(1);
      s_LOADED <= 1'b1;
    end else if (|s_EN) begin
      s_DATA <= {s_DATA[DATA_WIDTH-2:0], 1'b0};
      s_EN   <= {s_EN[DATA_WIDTH-2:0], 1'b0};
    end
  end

  assign o_Q = s_DATA[DATA_WIDTH-1];

endmodule
