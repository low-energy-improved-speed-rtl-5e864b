// cordic_reg: word-wide register with load enable.
//
// q takes d on the rising clock edge when en is 1 and holds otherwise; an
// asynchronous active-low reset clears it to zero.  One register each holds
// x, y and z between CORDIC iterations.  The register is named by the
// document; the enable and reset behaviour are this design's choices.
module cordic_reg #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end
endmodule
