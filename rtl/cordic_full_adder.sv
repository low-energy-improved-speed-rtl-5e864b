// cordic_full_adder: one-bit full adder, the arithmetic cell of the CORDIC.
//
// Forms the arithmetic sum of three input bits a, b, c: sum = a ^ b ^ c and
// carry = majority(a, b, c).  Purely combinational, no timing of its own.
// The three-input/two-output function is the document's; its circuit is a
// pass-transistor cell, which here is written as the two logic equations.
module cordic_full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  logic p;  // propagate

  always_comb begin
    p     = a ^ b;
    sum   = p ^ c;
    carry = p ? c : a;  // pass-gate style: propagate passes c, otherwise a (== b)
  end
endmodule
