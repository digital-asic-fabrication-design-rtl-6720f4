// Clock module: selects and gates the clock of every peripheral.
//
// Each peripheral clock PCLK[i] comes from its own two-input clock mux
// (harness clock or external clock pin) followed by its own clock gate.
// Two 3-bit control registers, written through the register bus from
// wishbone or the backdoor SPI, hold one bit per PCLK:
//   GATE   (reg 0): 0 = clock running, 1 = clock stopped; resets to 0, so
//          every clock runs after reset;
//   SELECT (reg 1): 0 = harness clock, 1 = external clock; resets to 0.
// Two hardware pins bypass the registers so a broken register path cannot
// stop the chip: while i_gate_override is high every gate is forced open
// and every mux follows the i_clk_override pin instead of SELECT.
// STATUS (reg 2) reads back the effective enables [2:0], effective selects
// [6:4] and the two pins [8] (gate override) and [9] (clock override).
//
// SYSCLK, the clock of the register bus and of the SPI slave's system side,
// is the harness clock, neither gated nor switched, so the controls stay
// reachable whatever is programmed. Registers are written on the harness
// clock; a change of a gate or select bit reaches a PCLK asynchronously to
// the external clock, so the select of a PCLK should only be changed while
// that PCLK is gated off. The only latches in this module are the enable
// latches of the three clock gates (clock_gate_cell), which are intended.
//
// Follows the design: one register bit per PCLK with 0 = enabled and
// default on, a mux and a gate per PCLK, the override pins and access from
// both buses. Own choices: register numbers, the STATUS register, reading
// the clock override pin only while the gate override pin is set, and
// SYSCLK taken straight from the harness clock.
module clock_module
  import asic_pkg::*;
#(
  parameter int unsigned N_PCLK = 3
) (
  input  logic               i_harness_clk,   // management SoC clock (MGMTCLK)
  input  logic               i_ext_clk,       // external clock pin
  input  logic               i_rst,           // asynchronous, active high
  input  logic               i_gate_override, // pin: all gates open
  input  logic               i_clk_override,  // pin: mux select while overridden
  input  reg_wr_t            i_wr,            // register write (SYSCLK)
  output reg_file_t          o_rd,            // register read-back
  output logic               o_sysclk,        // system clock
  output logic [N_PCLK-1:0]  o_pclk           // peripheral clocks
);

  logic [N_PCLK-1:0] gate_dis_q;
  logic [N_PCLK-1:0] sel_q;
  logic [N_PCLK-1:0] en_eff, sel_eff, mux_clk;

  always_ff @(posedge i_harness_clk or posedge i_rst) begin
    if (i_rst) begin
      gate_dis_q <= '0;
      sel_q      <= '0;
    end else if (i_wr.valid) begin
      if (i_wr.regno == CLK_REG_GATE)   gate_dis_q <= i_wr.data[N_PCLK-1:0];
      if (i_wr.regno == CLK_REG_SELECT) sel_q      <= i_wr.data[N_PCLK-1:0];
    end
  end

  assign en_eff  = i_gate_override ? '1 : ~gate_dis_q;
  assign sel_eff = i_gate_override ? {N_PCLK{i_clk_override}} : sel_q;

  for (genvar i = 0; i < N_PCLK; i++) begin : g_pclk
    clock_mux2 u_mux (
      .i_clk0 (i_harness_clk),
      .i_clk1 (i_ext_clk),
      .i_sel  (sel_eff[i]),
      .o_clk  (mux_clk[i])
    );
    clock_gate_cell u_gate (
      .i_clk  (mux_clk[i]),
      .i_en   (en_eff[i]),
      .o_gclk (o_pclk[i])
    );
  end

  assign o_sysclk = i_harness_clk;

  always_comb begin
    o_rd = '0;
    o_rd[CLK_REG_GATE][N_PCLK-1:0]   = gate_dis_q;
    o_rd[CLK_REG_SELECT][N_PCLK-1:0] = sel_q;
    o_rd[CLK_REG_STATUS][N_PCLK-1:0] = en_eff;
    o_rd[CLK_REG_STATUS][4 +: N_PCLK] = sel_eff;
    o_rd[CLK_REG_STATUS][8]          = i_gate_override;
    o_rd[CLK_REG_STATUS][9]          = i_clk_override;
  end

endmodule
