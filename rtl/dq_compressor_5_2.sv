// dq_compressor_5_2: dual-quality 5:2 compressor.
//
// Inputs X1..X5 of one column plus the two carries Cin1, Cin2 from the column
// below; outputs Sum (this column), Carry, Cout1 and Cout2 (next column).
// With exact = 1 it is the exact three-full-adder compressor:
//   X1+X2+X3+X4+X5+Cin1+Cin2 = Sum + 2*(Carry + Cout1 + Cout2)
// With exact = 0 only the approximate part works: Sum and Carry come from
// its approximate gates and Cout1 = Cout2 = 0, so no carry crosses columns.
// The mode may change on any cycle; the outputs follow combinationally.
//
// The structure (shared approximate part, supplementary part switched off in
// approximate mode, output disconnect) follows the dual-quality compressor
// concept. The tri-state output disconnect is written as a 2:1 multiplexer,
// and the approximate equations are this design's own choice (see
// dq52_approx_part).
module dq_compressor_5_2 (
  input  logic [4:0] x,
  input  logic       cin1,
  input  logic       cin2,
  input  logic       exact,
  output logic       sum,
  output logic       carry,
  output logic       cout1,
  output logic       cout2
);
  logic s1, c1, sum_a, carry_a;
  logic sum_e, carry_e, cout2_e;

  dq52_approx_part u_apx (
    .x(x), .cin1(cin1), .cin2(cin2), .apx_en(~exact),
    .s1(s1), .c1(c1), .sum_a(sum_a), .carry_a(carry_a)
  );

  dq52_supp_part u_sup (
    .s1(s1), .x4(x[3]), .x5(x[4]), .cin1(cin1), .cin2(cin2), .en(exact),
    .sum(sum_e), .carry(carry_e), .cout2(cout2_e)
  );

  always_comb begin
    if (exact) begin
      sum   = sum_e;
      carry = carry_e;
      cout1 = c1;
      cout2 = cout2_e;
    end else begin
      sum   = sum_a;
      carry = carry_a;
      cout1 = 1'b0;
      cout2 = 1'b0;
    end
  end
endmodule
