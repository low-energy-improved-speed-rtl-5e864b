// cordic_shift: arithmetic right shift by a run-time amount.
//
// y = d >>> sh, sign bits filling from the left; the shift amount is the
// iteration index, so the CORDIC multiplies by 2**-i without a multiplier.
// Built as a logarithmic barrel shifter: stage k shifts by 2**k when bit k
// of sh is set.  Combinational.  The shifter is this design's choice; the
// document does not describe how the shifted operands are formed.
module cordic_shift #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned SW    = 4
) (
  input  logic [WIDTH-1:0] d,
  input  logic [SW-1:0]    sh,
  output logic [WIDTH-1:0] y
);
  always_comb begin
    logic signed [WIDTH-1:0] t;
    t = signed'(d);
    for (int k = 0; k < SW; k++) begin
      if (sh[k]) t = t >>> (1 << k);
    end
    y = unsigned'(t);
  end
endmodule
