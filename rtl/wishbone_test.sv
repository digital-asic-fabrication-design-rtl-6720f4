// Wishbone test peripheral: a free-running 32-bit counter that the
// management SoC can set and read back, to prove the bus works both ways.
//
// The counter lives in its own peripheral clock domain (PCLK) and counts
// every PCLK edge, wrapping from all ones to zero. A write of register 0
// (COUNT) sets it; a read of register 0 returns its current value.
// The bus side runs on SYSCLK, so both directions cross clock domains:
//   set:  the written value goes through a toggle handshake (cdc_handshake)
//         and is loaded on the PCLK edge after it arrives; while it is in
//         flight o_busy is high and register 1 (STATUS) bit 0 reads 1;
//   read: the counter keeps a Gray-coded copy, two SYSCLK flip-flops
//         synchronise it, and the bus side converts it back to binary. A
//         read therefore lags the counter by two to three SYSCLK cycles,
//         and a read within those cycles after a load may return a mix of
//         the old and new values, since a load changes many Gray bits at
//         once.
//
// Follows the design: a 32-bit incrementer counting PCLK pulses with the
// overflow discarded, set by a write and returned by a read. The clock
// crossing scheme and the STATUS register are this implementation's own.
module wishbone_test
  import asic_pkg::*;
(
  input  logic      i_sysclk,   // bus clock
  input  logic      i_pclk,     // counter clock (gated peripheral clock)
  input  logic      i_rst,      // asynchronous, active high
  input  reg_wr_t   i_wr,       // register write (SYSCLK)
  output reg_file_t o_rd,       // register read-back (SYSCLK)
  output logic      o_busy      // a load is in flight
);

  logic              ld_valid;
  logic [DATA_W-1:0] ld_data;
  logic [DATA_W-1:0] count_q, gray_q;
  logic [DATA_W-1:0] gray_s1, gray_s2;

  cdc_handshake #(.WIDTH(DATA_W)) u_load (
    .i_a_clk   (i_sysclk),
    .i_a_rst   (i_rst),
    .i_a_valid (i_wr.valid && i_wr.regno == WBT_REG_COUNT),
    .i_a_data  (i_wr.data),
    .o_a_busy  (o_busy),
    .i_b_clk   (i_pclk),
    .i_b_rst   (i_rst),
    .o_b_valid (ld_valid),
    .o_b_data  (ld_data),
    .i_b_ready (1'b1)
  );

  logic [DATA_W-1:0] count_d;
  assign count_d = ld_valid ? ld_data : count_q + 1'b1;

  always_ff @(posedge i_pclk or posedge i_rst) begin
    if (i_rst) begin
      count_q <= '0;
      gray_q  <= '0;
    end else begin
      count_q <= count_d;
      gray_q  <= bin2gray(count_d);
    end
  end

  always_ff @(posedge i_sysclk or posedge i_rst) begin
    if (i_rst) begin
      gray_s1 <= '0;
      gray_s2 <= '0;
    end else begin
      gray_s1 <= gray_q;
      gray_s2 <= gray_s1;
    end
  end

  always_comb begin
    o_rd = '0;
    o_rd[WBT_REG_COUNT]     = gray2bin(gray_s2);
    o_rd[WBT_REG_STATUS][0] = o_busy;
  end

endmodule
