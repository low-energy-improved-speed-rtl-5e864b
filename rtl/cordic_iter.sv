// cordic_iter: bit-parallel iterative CORDIC (circular coordinates).
//
// Computes, one micro-rotation per clock, either
//   rotation  mode (mode = MODE_ROTATE): (x, y) rotated by the angle z_in,
//             x_out = K (x cos z - y sin z), y_out = K (y cos z + x sin z),
//             z_out ~ 0;
//   vectoring mode (mode = MODE_VECTOR): x_out = K sqrt(x^2 + y^2),
//             y_out ~ 0, z_out = z_in + atan(y_in / x_in);
// with the CORDIC gain K = prod sqrt(1 + 2**-2i) ~ 1.6468 left in the
// result.  All WIDTH bits of a word are processed at once (bit-parallel);
// the same hardware is reused for ITER iterations (iterative).
//
// Structure: x, y and z each have a cordic_reg fed by a cordic_mux2 that
// selects the external operand on load and the datapath result while
// iterating.  x and y are shifted right by the iteration index i
// (cordic_shift) and cross-added in cordic_xy_addsub, whose chain of
// cordic_bit_cell slices complements the shifted operands by the direction.
// z is updated by a ripple adder with the constant atan(2**-i) from
// cordic_atan_rom.  The direction neg (d = -1) is the sign of z in rotation
// mode and the inverse of the sign of y in vectoring mode.  cordic_ctrl
// sequences load and iterations.
//
// Number formats: x, y two's complement; z a binary angle (2**WIDTH = full
// turn).  No gain compensation and no quadrant pre-rotation: rotation mode
// needs |z_in| <= 90 degrees, vectoring mode x_in > 0, and
// |(x_in, y_in)| <= 2**(WIDTH-2) keeps x and y from overflowing.
//
// Truth-table verification mode (test_mode = 1 while ready): multiplexers
// feed x_in and y_in straight to the bit-cell chain, each slice i takes
// z_in[i] as its control, and the output multiplexers show the slice
// outputs: x_out[i] = x_in[i] ^ z_in[i], y_out[i] = y_in[i] ^ z_in[i],
// z_out[i] = z_in[i].  This path is combinational.  test_mode is ignored
// while an operation runs, so it cannot disturb the iterations.
//
// Interface/timing: start is taken when ready is 1 (operands and mode are
// sampled in that cycle); done pulses ITER+1 cycles later, when x_out,
// y_out, z_out hold the result; they stay valid until the next start, and
// a start may be given in the done cycle.
//
// What follows the document: a bit-parallel iterative CORDIC made of
// registers, multiplexers and full-adder based adder-subtracters, its bit
// cell truth table, the multiplexer-selected switch between the algorithm
// and a truth-table verification mode, input and output selection by
// multiplexers, and the vector-rotation / inverse-tangent functions.
// This design's own choices: word width and iteration count (16 each),
// angle format, shifter, arctangent table, controller and handshake.
module cordic_iter
  import cordic_pkg::*;
#(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned ITER  = 16,
  localparam int unsigned IW   = (ITER > 1) ? $clog2(ITER) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  cordic_mode_e     mode,
  input  logic             test_mode,
  input  logic [WIDTH-1:0] x_in,
  input  logic [WIDTH-1:0] y_in,
  input  logic [WIDTH-1:0] z_in,
  output logic             ready,
  output logic             done,
  output logic [WIDTH-1:0] x_out,
  output logic [WIDTH-1:0] y_out,
  output logic [WIDTH-1:0] z_out
);
  logic          load;
  logic          iterate;
  logic [IW-1:0] iter_idx;

  cordic_ctrl #(.ITER(ITER)) u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start),
    .ready   (ready),
    .load    (load),
    .iterate (iterate),
    .iter_idx(iter_idx),
    .done    (done)
  );

  // mode register, captured with the operands
  cordic_mode_e mode_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    mode_q <= MODE_ROTATE;
    else if (load) mode_q <= mode;
  end

  logic [WIDTH-1:0] x_q, y_q, z_q;          // state registers
  logic [WIDTH-1:0] x_d, y_d, z_d;          // register inputs (mux outputs)
  logic [WIDTH-1:0] x_nx, y_nx, z_nx;       // datapath results
  logic [WIDTH-1:0] xs, ys;                 // shifted x, y
  logic [WIDTH-1:0] atan_i;                 // atan(2**-i)
  logic             neg;                    // direction d = -1
  logic             tt;                     // truth-table mode active
  logic [WIDTH-1:0] cx, cy;                 // operands into the bit cells
  logic [WIDTH-1:0] cell_x, cell_y, cell_z; // bit-cell outputs
  logic             reg_en;

  assign reg_en = load | iterate;

  // input selection: 0 = datapath result, 1 = external operand
  cordic_mux2 #(.WIDTH(WIDTH)) u_mux_x (.sel(load), .d0(x_nx), .d1(x_in), .y(x_d));
  cordic_mux2 #(.WIDTH(WIDTH)) u_mux_y (.sel(load), .d0(y_nx), .d1(y_in), .y(y_d));
  cordic_mux2 #(.WIDTH(WIDTH)) u_mux_z (.sel(load), .d0(z_nx), .d1(z_in), .y(z_d));

  cordic_reg #(.WIDTH(WIDTH)) u_reg_x (.clk(clk), .rst_n(rst_n), .en(reg_en), .d(x_d), .q(x_q));
  cordic_reg #(.WIDTH(WIDTH)) u_reg_y (.clk(clk), .rst_n(rst_n), .en(reg_en), .d(y_d), .q(y_q));
  cordic_reg #(.WIDTH(WIDTH)) u_reg_z (.clk(clk), .rst_n(rst_n), .en(reg_en), .d(z_d), .q(z_q));

  cordic_shift #(.WIDTH(WIDTH), .SW(IW)) u_sh_x (.d(x_q), .sh(iter_idx), .y(xs));
  cordic_shift #(.WIDTH(WIDTH), .SW(IW)) u_sh_y (.d(y_q), .sh(iter_idx), .y(ys));

  // rotation: turn towards z = 0; vectoring: turn towards y = 0
  assign neg = (mode_q == MODE_ROTATE) ? z_q[WIDTH-1] : ~y_q[WIDTH-1];

  // truth-table verification: only while idle
  assign tt = test_mode & ready;

  cordic_mux2 #(.WIDTH(WIDTH)) u_mux_cx (.sel(tt), .d0(xs), .d1(x_in), .y(cx));
  cordic_mux2 #(.WIDTH(WIDTH)) u_mux_cy (.sel(tt), .d0(ys), .d1(y_in), .y(cy));

  cordic_xy_addsub #(.WIDTH(WIDTH)) u_xy (
    .x      (x_q),
    .y      (y_q),
    .xs     (cx),
    .ys     (cy),
    .neg    (neg),
    .tt_mode(tt),
    .tt_z   (z_in),
    .x_next (x_nx),
    .y_next (y_nx),
    .cell_x (cell_x),
    .cell_y (cell_y),
    .cell_z (cell_z)
  );

  cordic_atan_rom #(.WIDTH(WIDTH), .ITER(ITER)) u_atan (.idx(iter_idx), .angle(atan_i));

  // z lane: z - d * atan(2**-i) = z + (atan ^ ~neg) + ~neg
  cordic_rca #(.WIDTH(WIDTH)) u_z_add (
    .a   (z_q),
    .b   (atan_i ^ {WIDTH{~neg}}),
    .cin (~neg),
    .s   (z_nx),
    .cout()
  );

  // output selection: registers (algorithm) or bit cells (verification)
  cordic_mux2 #(.WIDTH(WIDTH)) u_mux_ox (.sel(tt), .d0(x_q), .d1(cell_x), .y(x_out));
  cordic_mux2 #(.WIDTH(WIDTH)) u_mux_oy (.sel(tt), .d0(y_q), .d1(cell_y), .y(y_out));
  cordic_mux2 #(.WIDTH(WIDTH)) u_mux_oz (.sel(tt), .d0(z_q), .d1(cell_z), .y(z_out));
endmodule
