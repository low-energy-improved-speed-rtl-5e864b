// cordic_bit_cell: one bit slice of the CORDIC operand complementer.
//
// Implements the CORDIC cell truth table: xn = x0 ^ z0, yn = y0 ^ z0,
// zn = z0.  z0 carries the direction of the current micro-rotation; when it
// is 1 both cross operands (the shifted x and shifted y bits) are inverted,
// which together with the carry-in of the following adder turns an addition
// into a subtraction.  zn hands the control on to the next slice, so WIDTH
// cells in a chain condition a whole word.  Combinational.  The truth table
// is the document's; reading it as the add/subtract conditioning slice is
// this design's interpretation.
module cordic_bit_cell (
  input  logic x0,
  input  logic y0,
  input  logic z0,
  output logic xn,
  output logic yn,
  output logic zn
);
  always_comb begin
    xn = z0 ? ~x0 : x0;
    yn = z0 ? ~y0 : y0;
    zn = z0;
  end
endmodule
