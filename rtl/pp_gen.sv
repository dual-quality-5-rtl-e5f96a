// pp_gen: partial-product generation of an N x N unsigned multiplier.
//
// Row i is the multiplicand ANDed with multiplier bit b[i], shifted left by i
// into a 2N-bit row, so that the sum of all rows is a * b. One AND gate per
// partial-product bit, as in any array or tree multiplier. Combinational.
module pp_gen #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] pp [N]
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      pp[i] = (2*N)'(a & {N{b[i]}}) << i;
    end
  end
endmodule
