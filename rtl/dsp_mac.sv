// Multiply-accumulate unit of the voice road-noise filter: N signed
// 16 x 16 multipliers whose products are added, each cycle i_en is high,
// into one accumulator that feeds its own sum back.
//
// Samples and coefficients are two's complement. Each product is sign
// extended to ACC_W bits and the sum wraps modulo 2^ACC_W (no saturation).
// i_clear empties the accumulator and wins over i_en. o_acc is the
// registered sum, so it reflects the products of the cycle before.
//
// The multiplier count N, the 16-bit operands and the 32-bit accumulator
// follow the design; signed arithmetic and wrap-around are this
// implementation's choices.
module dsp_mac #(
  parameter int unsigned N        = 1,
  parameter int unsigned SAMPLE_W = 16,
  parameter int unsigned ACC_W    = 32
) (
  input  logic                             i_clk,
  input  logic                             i_rst,    // asynchronous, active high
  input  logic                             i_clear,
  input  logic                             i_en,
  input  logic [N-1:0][SAMPLE_W-1:0]       i_a,      // samples
  input  logic [N-1:0][SAMPLE_W-1:0]       i_b,      // coefficients
  output logic signed [ACC_W-1:0]          o_acc
);

  logic signed [ACC_W-1:0] sum;

  always_comb begin
    sum = '0;
    for (int j = 0; j < N; j++)
      sum += ACC_W'(signed'(i_a[j])) * ACC_W'(signed'(i_b[j]));
  end

  always_ff @(posedge i_clk or posedge i_rst) begin
    if (i_rst)        o_acc <= '0;
    else if (i_clear) o_acc <= '0;
    else if (i_en)    o_acc <= o_acc + sum;
  end

endmodule
