// cordic_rca: WIDTH-bit ripple-carry adder built from full-adder cells.
//
// s = a + b + cin (mod 2**WIDTH), cout is the carry out of the top bit.
// The carry ripples from bit 0 upward through one cordic_full_adder per
// bit, so the combinational delay grows linearly with WIDTH.  A subtraction
// a - b is done by feeding ~b and cin = 1.  Building the adder from the full
// adders follows the document; the ripple topology is this design's choice.
module cordic_rca #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);
  logic [WIDTH:0] c;

  assign c[0] = cin;
  assign cout = c[WIDTH];

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    cordic_full_adder u_fa (
      .a    (a[i]),
      .b    (b[i]),
      .c    (c[i]),
      .sum  (s[i]),
      .carry(c[i+1])
    );
  end
endmodule
