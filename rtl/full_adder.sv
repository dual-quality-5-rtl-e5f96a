// full_adder: one-bit full adder, the cell from which the 5:2 compressor is
// chained. sum = a ^ b ^ c (weight 1), carry = majority(a, b, c) (weight 2).
// Purely combinational, no clock. The three-full-adder chain it serves
// follows the compressor diagram; the gate-level form is the standard one.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  always_comb begin
    sum   = a ^ b ^ c;
    carry = (a & b) | (a & c) | (b & c);
  end
endmodule
