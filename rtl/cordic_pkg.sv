// cordic_pkg: types and constant functions shared by the iterative CORDIC.
//
// Angles are binary angles: a W-bit two's-complement word in which 2**W
// stands for one full turn, so +45 degrees is 2**(W-3) and the representable
// range is [-180, +180) degrees.  The arctangent table atan(2**-i) is
// computed at elaboration time by atan_angle() from the power series
//   atan(t) = t - t**3/3 + t**5/5 - ...   with t = 2**-i, i >= 1,
// evaluated in Q62 fixed point on 128-bit integers (each term is an exact
// power of two divided by an odd k), and atan(1) = pi/4 exactly.  The result
// is rounded to the nearest binary-angle LSB.  This table is this design's
// choice; the operating modes (vector rotation, inverse tangent) follow the
// CORDIC algorithm the circuit implements.
package cordic_pkg;

  // Rotation mode drives z to zero (rotates (x,y) by z); vectoring mode
  // drives y to zero (magnitude in x, atan(y/x) accumulated in z).
  typedef enum logic {
    MODE_ROTATE = 1'b0,
    MODE_VECTOR = 1'b1
  } cordic_mode_e;

  localparam int unsigned FRAC = 62;
  // pi * 2**62, rounded
  localparam logic [127:0] PI_Q62 = 128'd14488038916154245685;

  // atan(2**-i) as a W-bit binary angle (2**W = one full turn).
  function automatic logic [127:0] atan_angle(input int unsigned i, input int unsigned w);
    logic [127:0] acc_pos;
    logic [127:0] acc_neg;
    logic [127:0] atan_q;
    logic [127:0] num;
    logic [127:0] den;
    int unsigned k;
    acc_pos = '0;
    acc_neg = '0;
    if (i == 0) begin
      atan_q = PI_Q62 >> 2;
    end else begin
      k = 1;
      while (i * k <= FRAC) begin
        if (((k - 1) / 2) % 2 == 0) acc_pos = acc_pos + ((128'd1 << (FRAC - i * k)) / 128'(k));
        else                        acc_neg = acc_neg + ((128'd1 << (FRAC - i * k)) / 128'(k));
        k = k + 2;
      end
      atan_q = acc_pos - acc_neg;
    end
    // angle = atan / (2*pi) * 2**w, rounded to nearest
    num = (atan_q << w) + PI_Q62;
    den = PI_Q62 << 1;
    return num / den;
  endfunction

endpackage
