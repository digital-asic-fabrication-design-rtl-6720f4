// Banked single-write, multi-read memory used twice by the voice
// road-noise filter: once as the circular sample memory and once as the
// filter coefficient memory (16 bits x 1024 words each by default).
//
// Word address a lives in bank a % BANKS at row a / BANKS, so BANKS
// consecutive addresses sit in different banks and can be read in the same
// cycle, one per multiplier. Writes take one word per cycle. Each bank has
// its own read row; read data is registered (one clock of latency), as in
// a synchronous SRAM. The contents are not reset: the filter is meant to be
// loaded with coefficients and primed with samples before use.
//
// Word width and depth are the design's; the banking (needed to feed N
// multipliers at once) is this implementation's way of doing that.
module dsp_sample_mem #(
  parameter int unsigned DEPTH = 1024,  // words, a power of two
  parameter int unsigned WIDTH = 16,    // bits per word
  parameter int unsigned BANKS = 1,     // read ports, a power of two
  localparam int unsigned ROWS   = DEPTH / BANKS,
  localparam int unsigned ADDR_W = $clog2(DEPTH),
  localparam int unsigned ROW_W  = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic                          i_clk,
  input  logic                          i_we,
  input  logic [ADDR_W-1:0]             i_waddr,
  input  logic [WIDTH-1:0]              i_wdata,
  input  logic [BANKS-1:0][ROW_W-1:0]   i_rrow,   // read row of each bank
  output logic [BANKS-1:0][WIDTH-1:0]   o_rdata   // registered read data
);

  logic [WIDTH-1:0] mem [BANKS][ROWS];

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    always_ff @(posedge i_clk) begin
      if (i_we && (int'(i_waddr) % BANKS) == b)
        mem[b][int'(i_waddr) / BANKS] <= i_wdata;
      o_rdata[b] <= mem[b][i_rrow[b]];
    end
  end

endmodule
