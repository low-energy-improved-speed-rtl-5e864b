// cordic_mux2: word-wide 2:1 multiplexer.
//
// y = d1 when sel is 1, otherwise d0.  Combinational.  In the iterative
// CORDIC one of these sits in front of each of the x, y and z registers and
// chooses between the external operand (load) and the value fed back from
// the adder-subtracters (iterate).  Using multiplexers for input selection
// follows the document; the width parameter is this design's choice.
module cordic_mux2 #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  output logic [WIDTH-1:0] y
);
  always_comb y = sel ? d1 : d0;
endmodule
