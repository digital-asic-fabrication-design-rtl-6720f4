// Standard cell test: measures the propagation delay of the same logic
// function built from four different standard-cell libraries.
//
// Four 2-input AND gates, one per library (high density, high speed,
// medium speed, high density low leakage), share the input pins A and B;
// a 4:1 multiplexer driven by the SW[1:0] pins puts one of their outputs
// on pin C. It is pure combinational logic from pins to pin: no clock, no
// register, no bus access. Logically C = A & B whatever SW is; the point of
// the block is the delay from A/B to C, which differs per selected gate.
//
// The structure (four library AND gates, shared inputs, a 4:1 mux, pins
// only) follows the design. Which physical cells are used is left to the
// flow: the LIB parameter of each std_and2 instance names the intended
// library. The order of the libraries on the SW codes is this file's own.
module std_cell_test (
  input  logic       i_a,
  input  logic       i_b,
  input  logic [1:0] i_sw,
  output logic       o_c
);

  logic [3:0] and_y;

  std_and2 #(.LIB("hd"))   u_and_hd   (.i_a(i_a), .i_b(i_b), .o_y(and_y[0]));
  std_and2 #(.LIB("hs"))   u_and_hs   (.i_a(i_a), .i_b(i_b), .o_y(and_y[1]));
  std_and2 #(.LIB("ms"))   u_and_ms   (.i_a(i_a), .i_b(i_b), .o_y(and_y[2]));
  std_and2 #(.LIB("hdll")) u_and_hdll (.i_a(i_a), .i_b(i_b), .o_y(and_y[3]));

  always_comb begin
    unique case (i_sw)
      2'd0: o_c = and_y[0];
      2'd1: o_c = and_y[1];
      2'd2: o_c = and_y[2];
      2'd3: o_c = and_y[3];
    endcase
  end

endmodule
