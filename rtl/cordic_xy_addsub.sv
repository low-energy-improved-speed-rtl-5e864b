// cordic_xy_addsub: the cross-coupled x/y adder-subtracter of one CORDIC
// micro-rotation.
//
//   neg = 0 (d = +1):  x_next = x - ys,  y_next = y + xs
//   neg = 1 (d = -1):  x_next = x + ys,  y_next = y - xs
//
// xs and ys are x and y already shifted right by the iteration index.  A
// chain of WIDTH cordic_bit_cell slices complements both shifted operands
// when neg = 1 (the direction control enters at bit 0 and is passed from
// slice to slice).  The y lane adds the conditioned xs with carry-in neg.
// The x lane must subtract exactly when the y lane adds, so it inverts the
// conditioned ys once more and uses carry-in ~neg.  Both sums use
// cordic_rca.  Combinational; results wrap modulo 2**WIDTH, so the caller
// keeps magnitudes in range.
//
// Truth-table verification: when tt_mode is 1 a multiplexer in front of
// each slice replaces the chained direction by the slice's own bit tt_z[i],
// and the slice outputs are brought out on cell_x, cell_y, cell_z, so every
// slice can be checked against the cell truth table from the ports.  The
// sums are meaningless in that mode.  The micro-rotation equations are the standard
// CORDIC ones; the document names the adder-subtracter and the bit cell.
module cordic_xy_addsub #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic [WIDTH-1:0] xs,
  input  logic [WIDTH-1:0] ys,
  input  logic             neg,
  input  logic             tt_mode,
  input  logic [WIDTH-1:0] tt_z,
  output logic [WIDTH-1:0] x_next,
  output logic [WIDTH-1:0] y_next,
  output logic [WIDTH-1:0] cell_x,
  output logic [WIDTH-1:0] cell_y,
  output logic [WIDTH-1:0] cell_z
);
  logic [WIDTH-1:0] xs_c;   // xs ^ neg
  logic [WIDTH-1:0] ys_c;   // ys ^ neg
  logic [WIDTH:0]   dir;    // direction control passed along the slices
  logic [WIDTH-1:0] z_in;   // control entering each slice

  assign dir[0] = neg;

  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    assign z_in[i] = tt_mode ? tt_z[i] : dir[i];
    cordic_bit_cell u_cell (
      .x0(xs[i]),
      .y0(ys[i]),
      .z0(z_in[i]),
      .xn(xs_c[i]),
      .yn(ys_c[i]),
      .zn(dir[i+1])
    );
  end

  assign cell_x = xs_c;
  assign cell_y = ys_c;
  assign cell_z = dir[WIDTH:1];

  // x lane: x + (ys ^ ~neg) + ~neg
  cordic_rca #(.WIDTH(WIDTH)) u_x_add (
    .a   (x),
    .b   (~ys_c),
    .cin (~dir[WIDTH]),
    .s   (x_next),
    .cout()
  );

  // y lane: y + (xs ^ neg) + neg
  cordic_rca #(.WIDTH(WIDTH)) u_y_add (
    .a   (y),
    .b   (xs_c),
    .cin (dir[WIDTH]),
    .s   (y_next),
    .cout()
  );
endmodule
