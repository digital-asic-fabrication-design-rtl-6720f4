// User area of a multi-project test chip: a set of independent test
// peripherals, each reachable over two separate paths so one broken path
// does not hide the rest.
//
//   clock module     selects (harness or external clock) and gates the
//                    peripheral clocks PCLK[2:0]; override pins force all
//                    clocks on
//   backdoor SPI     4-wire SPI slave on pins, a second way into every
//                    register besides the management SoC's wishbone bus
//   register bus     wishbone slave plus SPI port, decoding MODULE/REGISTER
//   wishbone test    32-bit counter on PCLK[0], set and read over the bus
//   DSP module       voice road-noise filter (1024-tap FIR) on PCLK[1], with
//                    an interrupt to the management SoC
//   std cell test    four library AND gates behind a 4:1 mux, pins only
//
// PCLK[2] leaves the chip on a pin. SYSCLK (the wishbone clock from the
// management SoC) clocks the register bus, the clock module's registers
// and the system side of the SPI slave. i_wb_rst is the only reset apart
// from SPI slave select, which resets the SPI slave.
//
// Register addresses (7 bits, {REGISTER, MODULE}): MODULE 0 clock module,
// 1 wishbone test, 2 DSP; see asic_pkg for the registers of each. On
// wishbone the same address is adr[8:2] within the 0x30xx_xxxx window.
//
// The three latch bits of the design are the enable latches of the clock
// gates in the clock module; they are intended.
//
// The set of blocks and the clocks they use follow the design's block
// diagram; the pin list is this implementation's, since the chip's pad
// assignment is not part of it. The custom cell test has no defined
// function and is not included.
module user_area_top
  import asic_pkg::*;
#(
  parameter int unsigned DSP_TAPS   = 1024,
  parameter int unsigned DSP_N_MULT = 1
) (
  // management SoC
  input  logic        wb_clk_i,      // MGMTCLK, also SYSCLK
  input  logic        wb_rst_i,      // active high
  input  logic        wbs_stb_i,
  input  logic        wbs_cyc_i,
  input  logic        wbs_we_i,
  input  logic [3:0]  wbs_sel_i,
  input  logic [31:0] wbs_dat_i,
  input  logic [31:0] wbs_adr_i,
  output logic        wbs_ack_o,
  output logic [31:0] wbs_dat_o,
  output logic        dsp_irq_o,     // DSP result ready
  // clock pins
  input  logic        ext_clk_i,
  input  logic        gate_override_i,
  input  logic        clk_override_i,
  output logic        pclk2_o,
  // backdoor SPI pins
  input  logic        spi_bclk_i,
  input  logic        spi_ss_i,
  input  logic        spi_mosi_i,
  output logic        spi_miso_o,
  // standard cell test pins
  input  logic        sc_a_i,
  input  logic        sc_b_i,
  input  logic [1:0]  sc_sw_i,
  output logic        sc_c_o
);

  // Peripheral numbers as plain indices into the per-peripheral arrays.
  localparam int unsigned M_CLK = int'(MOD_CLOCK);
  localparam int unsigned M_WBT = int'(MOD_WBTEST);
  localparam int unsigned M_DSP = int'(MOD_DSP);

  logic              sysclk;
  logic [2:0]        pclk;
  reg_wr_t           wr   [N_MOD];
  reg_file_t         rd   [N_MOD];
  logic [N_MOD-1:0]  busy;

  logic [ADDR_W-1:0] spi_addr;
  logic              spi_read, spi_wvalid;
  logic [DATA_W-1:0] spi_wdata, spi_rdata;

  clock_module #(.N_PCLK(3)) u_clock (
    .i_harness_clk   (wb_clk_i),
    .i_ext_clk       (ext_clk_i),
    .i_rst           (wb_rst_i),
    .i_gate_override (gate_override_i),
    .i_clk_override  (clk_override_i),
    .i_wr            (wr[M_CLK]),
    .o_rd            (rd[M_CLK]),
    .o_sysclk        (sysclk),
    .o_pclk          (pclk)
  );
  assign busy[M_CLK] = 1'b0;
  assign pclk2_o         = pclk[2];

  backdoor_spi u_spi (
    .i_SYSCLK     (sysclk),
    .i_BCLK       (spi_bclk_i),
    .i_SS         (spi_ss_i),
    .i_MOSI       (spi_mosi_i),
    .i_DATA_OUT   (spi_rdata),
    .o_MISO       (spi_miso_o),
    .o_ADDR       (spi_addr),
    .o_READ       (spi_read),
    .o_DATA_IN    (spi_wdata),
    .o_DOUT_VALID (spi_wvalid)
  );

  user_regbus #(.NMOD(N_MOD)) u_bus (
    .i_clk        (sysclk),
    .i_rst        (wb_rst_i),
    .wbs_stb_i    (wbs_stb_i),
    .wbs_cyc_i    (wbs_cyc_i),
    .wbs_we_i     (wbs_we_i),
    .wbs_sel_i    (wbs_sel_i),
    .wbs_dat_i    (wbs_dat_i),
    .wbs_adr_i    (wbs_adr_i),
    .wbs_ack_o    (wbs_ack_o),
    .wbs_dat_o    (wbs_dat_o),
    .i_spi_addr   (spi_addr),
    .i_spi_wvalid (spi_wvalid),
    .i_spi_wdata  (spi_wdata),
    .o_spi_rdata  (spi_rdata),
    .o_wr         (wr),
    .i_rd         (rd),
    .i_busy       (busy)
  );

  wishbone_test u_wbtest (
    .i_sysclk (sysclk),
    .i_pclk   (pclk[0]),
    .i_rst    (wb_rst_i),
    .i_wr     (wr[M_WBT]),
    .o_rd     (rd[M_WBT]),
    .o_busy   (busy[M_WBT])
  );

  dsp_noise_filter #(.TAPS(DSP_TAPS), .N_MULT(DSP_N_MULT)) u_dsp (
    .i_sysclk (sysclk),
    .i_pclk   (pclk[1]),
    .i_rst    (wb_rst_i),
    .i_wr     (wr[M_DSP]),
    .o_rd     (rd[M_DSP]),
    .o_busy   (busy[M_DSP]),
    .o_irq    (dsp_irq_o)
  );

  std_cell_test u_stdcell (
    .i_a  (sc_a_i),
    .i_b  (sc_b_i),
    .i_sw (sc_sw_i),
    .o_c  (sc_c_o)
  );

endmodule
