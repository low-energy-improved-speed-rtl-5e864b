// cordic_atan_rom: arctangent constants atan(2**-i) for the z lane.
//
// Returns, for the iteration index idx, atan(2**-idx) as a WIDTH-bit binary
// angle (2**WIDTH = one full turn, so idx = 0 gives 2**(WIDTH-3), i.e. 45
// degrees).  The ITER entries are computed at elaboration by
// cordic_pkg::atan_angle from the power series of atan, so the table
// follows WIDTH and ITER.  Combinational read.  The table and its angle
// format are this design's choices.
module cordic_atan_rom #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned ITER  = 16,
  localparam int unsigned IW   = (ITER > 1) ? $clog2(ITER) : 1
) (
  input  logic [IW-1:0]    idx,
  output logic [WIDTH-1:0] angle
);
  typedef logic [WIDTH-1:0] word_t;

  function automatic word_t entry(input int unsigned i);
    return WIDTH'(cordic_pkg::atan_angle(i, WIDTH));
  endfunction

  word_t table_q [ITER];

  for (genvar i = 0; i < ITER; i++) begin : g_tab
    assign table_q[i] = entry(i);
  end

  always_comb begin
    angle = '0;
    for (int i = 0; i < ITER; i++) begin
      if (idx == IW'(i)) angle = table_q[i];
    end
  end
endmodule
