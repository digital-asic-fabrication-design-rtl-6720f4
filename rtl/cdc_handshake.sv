// Toggle handshake that carries one word from clock domain A to clock
// domain B.
//
// Side A: a one-cycle i_a_valid while o_a_busy is low captures i_a_data in
// a holding register and flips the request toggle; o_a_busy stays high
// until B has taken the word and its acknowledge toggle has crossed back
// through two flip-flops. Side B: the request toggle crosses through two
// flip-flops; o_b_valid is high while a word is waiting and o_b_data
// (straight from A's holding register, which cannot change while the word
// waits) is stable; B takes it by raising i_b_ready, which flips the
// acknowledge toggle. Only single-bit toggles cross between the domains.
// A new word costs two to three clocks of each domain.
module cdc_handshake #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             i_a_clk,
  input  logic             i_a_rst,    // asynchronous, active high
  input  logic             i_a_valid,
  input  logic [WIDTH-1:0] i_a_data,
  output logic             o_a_busy,
  input  logic             i_b_clk,
  input  logic             i_b_rst,    // asynchronous, active high
  output logic             o_b_valid,
  output logic [WIDTH-1:0] o_b_data,
  input  logic             i_b_ready
);

  logic             req_tgl, ack_tgl;
  logic [1:0]       ack_sync_a, req_sync_b;
  logic [WIDTH-1:0] hold_q;

  always_ff @(posedge i_a_clk or posedge i_a_rst) begin
    if (i_a_rst) begin
      req_tgl    <= 1'b0;
      ack_sync_a <= '0;
      hold_q     <= '0;
    end else begin
      ack_sync_a <= {ack_sync_a[0], ack_tgl};
      if (i_a_valid && !o_a_busy) begin
        hold_q  <= i_a_data;
        req_tgl <= !req_tgl;
      end
    end
  end

  assign o_a_busy = req_tgl ^ ack_sync_a[1];

  always_ff @(posedge i_b_clk or posedge i_b_rst) begin
    if (i_b_rst) begin
      req_sync_b <= '0;
      ack_tgl    <= 1'b0;
    end else begin
      req_sync_b <= {req_sync_b[0], req_tgl};
      if (o_b_valid && i_b_ready) ack_tgl <= req_sync_b[1];
    end
  end

  assign o_b_valid = req_sync_b[1] ^ ack_tgl;
  assign o_b_data  = hold_q;

endmodule
