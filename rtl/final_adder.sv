// final_adder: carry-propagate adder for the last two rows of the reduction.
//
// s = x + y modulo 2^W. The adder architecture (ripple, carry look-ahead,
// prefix) is left to synthesis; the multiplier only needs the sum.
// Combinational.
module final_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] s
);
  assign s = x + y;
endmodule
