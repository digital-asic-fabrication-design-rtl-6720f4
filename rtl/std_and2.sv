// Two-input AND gate standing for one standard-cell library's and2 cell.
// LIB names the library the gate is to be mapped to (hd, hs, ms, hdll);
// a physical flow binds each instance to that library's cell and keeps it
// from being merged with the others. Functionally every instance is A & B.
module std_and2 #(
  parameter string LIB = "hd"
) (
  input  logic i_a,
  input  logic i_b,
  output logic o_y
);

  assign o_y = i_a & i_b;

endmodule
