// Address counters of the voice road-noise filter.
//
// Up counter: points into the circular sample memory. Between convolutions
// it holds the address of the oldest sample, which is where the next new
// sample is written (i_advance_wr then moves it on by one, to the new
// oldest sample). During a convolution i_step advances it by BANKS per
// cycle, so it walks the buffer from the oldest sample to the newest and,
// after DEPTH/BANKS steps, is back where it started. With BANKS read ports
// the BANKS consecutive addresses up..up+BANKS-1 are spread over all banks:
// bank b reads row up/BANKS if b >= up%BANKS, else the next row; o_rot
// (= up % BANKS) tells the datapath which bank holds the oldest of them.
// Down counter: row of the filter coefficient memory, loaded with the last
// row by i_start and decremented by i_step, so the last coefficient meets
// the oldest sample; o_last flags the final row.
//
// The up and down counters and the direction each counts follow the
// design; the banked addressing is this implementation's.
module dsp_addr_counters #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned BANKS = 1,
  localparam int unsigned ROWS   = DEPTH / BANKS,
  localparam int unsigned ADDR_W = $clog2(DEPTH),
  localparam int unsigned ROW_W  = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned ROT_W  = (BANKS > 1) ? $clog2(BANKS) : 1
) (
  input  logic                        i_clk,
  input  logic                        i_rst,         // asynchronous, active high
  input  logic                        i_advance_wr,  // up counter + 1
  input  logic                        i_start,       // down counter <= last row
  input  logic                        i_step,        // up + BANKS, down - 1
  output logic [ADDR_W-1:0]           o_wr_addr,     // up counter value
  output logic [BANKS-1:0][ROW_W-1:0] o_data_row,    // sample memory row per bank
  output logic [ROT_W-1:0]            o_rot,         // bank of the oldest word
  output logic [ROW_W-1:0]            o_filt_row,    // coefficient memory row
  output logic                        o_last         // down counter at row 0
);

  logic [ADDR_W-1:0] up_q;
  logic [ROW_W-1:0]  down_q;

  always_ff @(posedge i_clk or posedge i_rst) begin
    if (i_rst) begin
      up_q   <= '0;
      down_q <= '0;
    end else begin
      if (i_advance_wr)  up_q <= up_q + 1'b1;
      else if (i_step)   up_q <= up_q + ADDR_W'(BANKS);
      if (i_start)       down_q <= ROW_W'(ROWS - 1);
      else if (i_step)   down_q <= down_q - 1'b1;
    end
  end

  assign o_wr_addr  = up_q;
  assign o_filt_row = down_q;
  assign o_last     = (down_q == '0);
  assign o_rot      = ROT_W'(int'(up_q) % BANKS);

  always_comb begin
    for (int b = 0; b < BANKS; b++) begin
      if (b < int'(o_rot)) o_data_row[b] = ROW_W'((int'(up_q) / BANKS + 1) % ROWS);
      else                 o_data_row[b] = ROW_W'(int'(up_q) / BANKS);
    end
  end

endmodule
