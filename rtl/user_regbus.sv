// Register bus of the user area: joins the management SoC's wishbone bus
// and the backdoor SPI into one register space and decodes it to the
// peripherals.
//
// Both masters use the same 7-bit register address {REGISTER[3:0],
// MODULE[2:0]}. On wishbone it is the word address: MODULE = adr[4:2],
// REGISTER = adr[8:5], and the access must fall in the user area window
// (adr[31:24] == BASE_HI); other addresses are acknowledged, reads return
// 0 and writes are ignored. Byte selects are ignored: every write is a full
// 32-bit word.
//
// Wishbone (classic cycles, SYSCLK): a read is acknowledged one cycle after
// stb & cyc with the addressed register. A write becomes a one-cycle write
// strobe to the peripheral and is acknowledged in the same way, but it is
// held off while that peripheral reports busy or while the SPI is writing
// in that cycle (SPI writes cannot wait, so they win).
// SPI: the read port is purely combinational (o_spi_rdata follows the SPI
// address); a write is the one-cycle o_DOUT_VALID of the SPI slave and is
// passed on in the same cycle.
//
// Each peripheral sees one reg_wr_t per cycle and offers its 16 registers
// as a reg_file_t. The shared register space, the MODULE/REGISTER split
// and access from both buses follow the design; the wishbone address
// mapping and the arbitration are this implementation's own.
module user_regbus
  import asic_pkg::*;
#(
  parameter int unsigned  NMOD    = N_MOD,
  parameter logic [7:0]   BASE_HI = 8'h30   // user area window, adr[31:24]
) (
  input  logic              i_clk,        // SYSCLK
  input  logic              i_rst,        // asynchronous, active high
  // wishbone slave
  input  logic              wbs_stb_i,
  input  logic              wbs_cyc_i,
  input  logic              wbs_we_i,
  input  logic [3:0]        wbs_sel_i,
  input  logic [31:0]       wbs_dat_i,
  input  logic [31:0]       wbs_adr_i,
  output logic              wbs_ack_o,
  output logic [31:0]       wbs_dat_o,
  // backdoor SPI side
  input  logic [ADDR_W-1:0] i_spi_addr,
  input  logic              i_spi_wvalid,
  input  logic [DATA_W-1:0] i_spi_wdata,
  output logic [DATA_W-1:0] o_spi_rdata,
  // peripherals
  output reg_wr_t           o_wr   [NMOD],
  input  reg_file_t         i_rd   [NMOD],
  input  logic [NMOD-1:0]   i_busy
);

  logic [MOD_W-1:0] wb_mod, spi_mod;
  logic [REG_W-1:0] wb_reg, spi_reg;
  logic             wb_req, wb_hit, wb_mod_ok, spi_mod_ok, wb_wr_go, wb_busy;

  assign wb_mod  = wbs_adr_i[4:2];
  assign wb_reg  = wbs_adr_i[8:5];
  assign spi_mod = i_spi_addr[MOD_W-1:0];
  assign spi_reg = i_spi_addr[ADDR_W-1:MOD_W];

  assign wb_req     = wbs_stb_i && wbs_cyc_i && !wbs_ack_o;
  assign wb_hit     = wbs_adr_i[31:24] == BASE_HI;
  assign wb_mod_ok  = wb_hit && int'(wb_mod) < NMOD;
  assign spi_mod_ok = int'(spi_mod) < NMOD;

  // A wishbone write goes out when the target can take it this cycle.
  always_comb begin
    wb_busy = 1'b0;
    for (int m = 0; m < NMOD; m++)
      if (int'(wb_mod) == m) wb_busy = i_busy[m];
  end

  assign wb_wr_go = wb_req && wbs_we_i && wb_mod_ok && !i_spi_wvalid && !wb_busy;

  always_comb begin
    for (int m = 0; m < NMOD; m++) begin
      o_wr[m] = '0;
      if (i_spi_wvalid && spi_mod_ok && int'(spi_mod) == m) begin
        o_wr[m].valid = 1'b1;
        o_wr[m].regno = spi_reg;
        o_wr[m].data  = i_spi_wdata;
      end else if (wb_wr_go && int'(wb_mod) == m) begin
        o_wr[m].valid = 1'b1;
        o_wr[m].regno = wb_reg;
        o_wr[m].data  = wbs_dat_i;
      end
    end
  end

  always_comb begin
    o_spi_rdata = '0;
    for (int m = 0; m < NMOD; m++)
      if (int'(spi_mod) == m) o_spi_rdata = i_rd[m][spi_reg];
  end

  always_ff @(posedge i_clk or posedge i_rst) begin
    if (i_rst) begin
      wbs_ack_o <= 1'b0;
      wbs_dat_o <= '0;
    end else begin
      wbs_ack_o <= 1'b0;
      if (wb_req) begin
        if (!wbs_we_i) begin
          wbs_ack_o <= 1'b1;
          wbs_dat_o <= '0;
          for (int m = 0; m < NMOD; m++)
            if (wb_mod_ok && int'(wb_mod) == m) wbs_dat_o <= i_rd[m][wb_reg];
        end else if (wb_wr_go || !wb_mod_ok) begin
          wbs_ack_o <= 1'b1;
        end
      end
    end
  end

  // A wishbone acknowledge only answers a cycle in progress.
  assert property (@(posedge i_clk) disable iff (i_rst)
                   wbs_ack_o |-> $past(wbs_stb_i && wbs_cyc_i));

endmodule
