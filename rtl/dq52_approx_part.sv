// dq52_approx_part: approximate part of the dual-quality 5:2 compressor.
//
// It holds the first full adder of the compressor chain (x1, x2, x3). That
// adder is shared: its sum s1 feeds the supplementary part and its carry c1
// is the exact Cout1, so it works in both modes. The remaining gates build an
// approximate sum/carry pair that needs no adder chain and sends no carries
// to the next column:
//   sum_a   = s1 | (x4 ^ x5) | (cin1 ^ cin2)
//   carry_a = c1 | (x4 & x5) | (cin1 & cin2)
// The value sum_a + 2*carry_a never exceeds the true count of ones, so the
// error is one-sided (an under-estimate of at most 2 for five data inputs).
//
// The split into a shared approximate part and a supplementary part, and the
// idea of gating off what a mode does not use, follow the dual-quality
// compressor concept. The approximate equations are this design's own choice.
// Gating is modelled as operand isolation: the approximate-only gates see
// their inputs ANDed with apx_en, so they are quiet in exact mode.
//
// Interface: x[0] = x1 ... x[4] = x5. Combinational, no clock.
module dq52_approx_part (
  input  logic [4:0] x,
  input  logic       cin1,
  input  logic       cin2,
  input  logic       apx_en,
  output logic       s1,
  output logic       c1,
  output logic       sum_a,
  output logic       carry_a
);
  logic x4_g, x5_g, cin1_g, cin2_g;

  full_adder u_fa1 (.a(x[0]), .b(x[1]), .c(x[2]), .sum(s1), .carry(c1));

  always_comb begin
    x4_g    = x[3] & apx_en;
    x5_g    = x[4] & apx_en;
    cin1_g  = cin1 & apx_en;
    cin2_g  = cin2 & apx_en;
    sum_a   = (s1 & apx_en) | (x4_g ^ x5_g) | (cin1_g ^ cin2_g);
    carry_a = (c1 & apx_en) | (x4_g & x5_g) | (cin1_g & cin2_g);
  end
endmodule
