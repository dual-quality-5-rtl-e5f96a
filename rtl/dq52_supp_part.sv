// dq52_supp_part: supplementary part of the dual-quality 5:2 compressor.
//
// The second and third full adders of the exact 5:2 chain: the first adder's
// sum s1 is added to x4 and cin1 (carry out = Cout2), and that sum is added to
// x5 and cin2 to give the exact Sum and Carry. Together with the shared first
// adder this gives x1+..+x5+cin1+cin2 = sum + 2*(carry + cout1 + cout2).
//
// The chain order follows the compressor's full-adder diagram. In approximate
// mode the part is switched off; here that is modelled by ANDing every input
// with en, so the part does not toggle and its outputs are 0 while en = 0.
//
// Combinational, no clock.
module dq52_supp_part (
  input  logic s1,
  input  logic x4,
  input  logic x5,
  input  logic cin1,
  input  logic cin2,
  input  logic en,
  output logic sum,
  output logic carry,
  output logic cout2
);
  logic s2;

  full_adder u_fa2 (.a(s1 & en), .b(x4 & en), .c(cin1 & en), .sum(s2),  .carry(cout2));
  full_adder u_fa3 (.a(s2),      .b(x5 & en), .c(cin2 & en), .sum(sum), .carry(carry));
endmodule
