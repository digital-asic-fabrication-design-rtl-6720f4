// Shared types and constants of the user area.
//
// Every peripheral is reached through one register space that both the
// management SoC (over wishbone) and an external SPI master (over the
// backdoor SPI) can use. An address is 7 bits: MODULE = ADDR[2:0] picks the
// peripheral and REGISTER = ADDR[6:3] picks one of its 16 32-bit registers.
// The split of the address into MODULE and REGISTER follows the design; the
// module numbers and the register layout of each peripheral are this
// implementation's own choice.
package asic_pkg;

  localparam int unsigned ADDR_W   = 7;   // SPI address width
  localparam int unsigned MOD_W    = 3;   // MODULE field, ADDR[2:0]
  localparam int unsigned REG_W    = 4;   // REGISTER field, ADDR[6:3]
  localparam int unsigned DATA_W   = 32;  // register and SPI data width
  localparam int unsigned N_REGS   = 16;  // registers per peripheral
  localparam int unsigned N_MOD    = 3;   // peripherals on the register bus

  // Peripheral numbers (MODULE field).
  typedef enum logic [MOD_W-1:0] {
    MOD_CLOCK  = 3'd0,
    MOD_WBTEST = 3'd1,
    MOD_DSP    = 3'd2
  } module_id_e;

  // Clock module registers.
  localparam logic [REG_W-1:0] CLK_REG_GATE   = 4'd0;  // [2:0] 1 = PCLK gated off
  localparam logic [REG_W-1:0] CLK_REG_SELECT = 4'd1;  // [2:0] 1 = external clock
  localparam logic [REG_W-1:0] CLK_REG_STATUS = 4'd2;  // effective enables/selects, pins

  // Wishbone test registers.
  localparam logic [REG_W-1:0] WBT_REG_COUNT  = 4'd0;  // write sets, read returns counter
  localparam logic [REG_W-1:0] WBT_REG_STATUS = 4'd1;  // [0] load still in flight

  // DSP (voice road-noise filter) registers.
  localparam logic [REG_W-1:0] DSP_REG_SAMPLE    = 4'd0;  // W: new input sample [15:0]
  localparam logic [REG_W-1:0] DSP_REG_COEF_ADDR = 4'd1;  // R/W: coefficient write pointer
  localparam logic [REG_W-1:0] DSP_REG_COEF_DATA = 4'd2;  // W: coefficient at pointer, pointer+1
  localparam logic [REG_W-1:0] DSP_REG_RESULT    = 4'd3;  // R: last filter output
  localparam logic [REG_W-1:0] DSP_REG_STATUS    = 4'd4;  // R: [0] ready [1] done [2] dropped; W: clear [2]

  // One register write, as seen by a peripheral: valid for one clock.
  typedef struct packed {
    logic             valid;
    logic [REG_W-1:0] regno;
    logic [DATA_W-1:0] data;
  } reg_wr_t;

  // All registers of one peripheral as it presents them for reading.
  typedef logic [N_REGS-1:0][DATA_W-1:0] reg_file_t;

  // Command passed from the bus side of the DSP to its filter core.
  typedef enum logic {
    DSP_CMD_SAMPLE = 1'b0,
    DSP_CMD_COEF   = 1'b1
  } dsp_cmd_e;

  function automatic logic [DATA_W-1:0] bin2gray(input logic [DATA_W-1:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [DATA_W-1:0] gray2bin(input logic [DATA_W-1:0] g);
    logic [DATA_W-1:0] b;
    b[DATA_W-1] = g[DATA_W-1];
    for (int i = DATA_W - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

endpackage
