// Backdoor SPI slave: gives an external SPI master access to every
// peripheral register without the management SoC.
//
// A transaction starts when i_SS falls (i_SS high holds the whole block in
// reset). The master first sends one command byte, most significant bit
// first: bit 7 is the read flag and bits 6:0 are the register address
// (MODULE = [2:0], REGISTER = [6:3]). Two spi_shift_in registers clocked by
// i_BCLK receive it: the 8-bit address register shifts until its marker
// bit (o_Q[8]) is set, and only then does the 32-bit data register start
// shifting, again until its own marker (o_Q[32]) is set. Data bits are
// sampled on the rising edge of i_BCLK.
//
// Clock crossing: nothing wide is synchronised. Only the two marker bits go
// through flip-flop chains clocked by i_SYSCLK (two flops against
// metastability and a third to make a one-cycle pulse). o_ADDR, o_READ and
// o_DATA_IN stay stable until i_SS rises, so once a marker has crossed,
// the system side may use them freely.
//   Write (read flag 0): o_DOUT_VALID is high for exactly one i_SYSCLK
//   cycle, the third system clock edge after the last data bit, with
//   o_ADDR/o_DATA_IN valid. The master must keep i_SS low for at least
//   four i_SYSCLK periods after the last bit or the write is discarded.
//   Read (read flag 1): o_ADDR is driven as soon as the command byte is in;
//   i_DATA_OUT must follow it within one i_SYSCLK cycle. (The addressed
//   register is shifted out on MISO during a write as well; the master
//   simply ignores it then.) After the address
//   marker has crossed (three i_SYSCLK edges) the MISO shift register
//   loads i_DATA_OUT on the next i_BCLK rising edge, so the master must wait
//   at least four i_SYSCLK periods between the 8th and the 9th i_BCLK rising
//   edge. MISO then changes after each rising edge and is to be sampled by
//   the master on the following falling edge: 32 pulses return the word,
//   most significant bit first.
//
// Follows the design: the command byte then 32 data bits, SS as an active
// high reset, the marker-bit shift registers and their enable chaining, the
// three-flop synchronisers, o_DOUT_VALID = DFF1 & ~DFF2 & write. Own
// choices: the read flag is the first bit sent (bit 7, as the schematic
// numbers it), the MISO register is started by the synchronised level
// rather than the one-cycle pulse, and the master's timing rules above.
module backdoor_spi
  import asic_pkg::*;
(
  input  logic              i_SYSCLK,     // user area system clock
  input  logic              i_BCLK,       // SPI bus clock from the master
  input  logic              i_SS,         // slave select, high = idle/reset
  input  logic              i_MOSI,       // master out, slave in
  input  logic [DATA_W-1:0] i_DATA_OUT,   // read data selected by o_ADDR
  output logic              o_MISO,       // master in, slave out
  output logic [ADDR_W-1:0] o_ADDR,       // {REGISTER, MODULE}
  output logic              o_READ,       // 1 = read, 0 = write
  output logic [DATA_W-1:0] o_DATA_IN,    // data written by the master
  output logic              o_DOUT_VALID  // one-cycle write strobe (i_SYSCLK)
);

  logic [ADDR_W+1:0] addr_q;   // {marker, read flag, address}
  logic [DATA_W:0]   data_q;   // {marker, data}
  logic              addr_done, data_done;

  assign addr_done = addr_q[ADDR_W+1];
  assign data_done = data_q[DATA_W];

  spi_shift_in #(.DATA_WIDTH(ADDR_W + 1)) u_addr_sr (
    .i_CLK (i_BCLK),
    .i_RST (i_SS),
    .i_EN  (!addr_done),
    .i_D   (i_MOSI),
    .o_Q   (addr_q)
  );

  spi_shift_in #(.DATA_WIDTH(DATA_W)) u_data_sr (
    .i_CLK (i_BCLK),
    .i_RST (i_SS),
    .i_EN  (addr_done && !data_done),
    .i_D   (i_MOSI),
    .o_Q   (data_q)
  );

  assign o_ADDR    = addr_q[ADDR_W-1:0];
  assign o_READ    = addr_q[ADDR_W];
  assign o_DATA_IN = data_q[DATA_W-1:0];

  // Marker synchronisers into the system clock domain.
  logic [2:0] wr_sync;   // data marker: DFF0..DFF2
  logic [2:0] rd_sync;   // address marker: DFF0..DFF2

  always_ff @(posedge i_SYSCLK or posedge i_SS) begin
    if (i_SS) begin
      wr_sync <= '0;
      rd_sync <= '0;
    end else begin
      wr_sync <= {wr_sync[1:0], data_done};
      rd_sync <= {rd_sync[1:0], addr_done};
    end
  end

  assign o_DOUT_VALID = wr_sync[1] && !wr_sync[2] && !o_READ;

  spi_shift_out #(.DATA_WIDTH(DATA_W)) u_miso_sr (
    .i_CLK   (i_BCLK),
    .i_RST   (i_SS),
    .i_START (rd_sync[2]),
    .i_D     (i_DATA_OUT),
    .o_Q     (o_MISO)
  );

endmodule
