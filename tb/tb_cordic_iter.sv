// tb_cordic_iter: end-to-end test of the iterative CORDIC at its default
// size (no parameter overrides).
//
// Each operation is checked twice:
//  * bit-exact against a reference CORDIC written here with integer
//    arithmetic and its own arctangent table, taken from the real-valued
//    $atan and rounded;
//  * against the mathematical result (cos/sin, sqrt, atan2 in real
//    arithmetic, times the CORDIC gain), within a few LSBs.
// It also checks that done arrives exactly ITER+1 cycles after the start
// and counts the mechanisms of the design: rotation mode, vectoring mode,
// both micro-rotation directions, a start accepted in the done cycle
// (back-to-back), a start ignored while busy, the truth-table
// verification mode (outputs compared bit by bit with the cell truth
// table) and a verification request ignored while busy.  A mechanism never seen
// is a failure.
module tb_cordic_iter;
  import cordic_pkg::*;

  localparam int W    = 16;   // must match the DUT defaults
  localparam int ITER = 16;
  localparam real PI  = 3.14159265358979323846;
  localparam int TOL_XY = 12; // LSBs against exact math (z: for |v| >= 4000)
  localparam int TOL_Z  = 16;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, test_mode = 1'b0;
  // cell truth table: row {x0,y0,z0} -> {xn,yn,zn}
  localparam logic [2:0] TT [8] = '{3'b000, 3'b111, 3'b010, 3'b101,
                                    3'b100, 3'b011, 3'b110, 3'b001};
  cordic_mode_e mode = MODE_ROTATE;
  logic [W-1:0] x_in = '0, y_in = '0, z_in = '0;
  logic ready, done;
  logic [W-1:0] x_out, y_out, z_out;

  cordic_iter dut (
    .clk(clk), .rst_n(rst_n), .start(start), .mode(mode), .test_mode(test_mode),
    .x_in(x_in), .y_in(y_in), .z_in(z_in),
    .ready(ready), .done(done), .x_out(x_out), .y_out(y_out), .z_out(z_out)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_rot = 0, n_vec = 0, n_dir_pos = 0, n_dir_neg = 0, n_b2b = 0, n_ignored = 0;
  int n_tt = 0, n_tt_ignored = 0;
  int max_err_xy = 0, max_err_z = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // direction of each micro-rotation, observed inside the datapath
  always @(posedge clk) begin
    if (rst_n && dut.iterate) begin
      if (dut.neg) n_dir_neg++;
      else         n_dir_pos++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  int atan_tab [ITER];
  real gain;

  function automatic int wrapw(input longint v);
    logic [W-1:0] t;
    t = W'(v);
    return int'(signed'(t));
  endfunction

  task automatic ref_cordic(input cordic_mode_e m, input int x0, input int y0, input int z0,
                            output int xr, output int yr, output int zr);
    int x, y, z, xs, ys, xn, yn, d;
    x = x0; y = y0; z = z0;
    for (int i = 0; i < ITER; i++) begin
      if (m == MODE_ROTATE) d = (z < 0) ? -1 : 1;
      else                  d = (y < 0) ? 1 : -1;
      xs = x >>> i;
      ys = y >>> i;
      xn = wrapw(longint'(x) - d * ys);
      yn = wrapw(longint'(y) + d * xs);
      z  = wrapw(longint'(z) - d * atan_tab[i]);
      x = xn; y = yn;
    end
    xr = x; yr = y; zr = z;
  endtask

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  // angle difference modulo a full turn
  function automatic int adiff(input int a, input int b);
    return wrapw(longint'(a) - longint'(b));
  endfunction

  // ---------------- driver ----------------
  // Start an operation at the current negedge (ready must be 1) and wait for
  // done; checks latency and results.  If poke is set, a second start with
  // different operands is pulsed while busy and must be ignored.
  task automatic run_op(input cordic_mode_e m, input int x0, input int y0, input int z0,
                        input bit poke, input bit keep_ready);
    int t0, xr, yr, zr, xo, yo, zo;
    real ang, ex, ey, ez;
    checks++;
    if (!ready) begin failures++; $display("FAIL not ready at start"); end
    mode = m; x_in = W'(x0); y_in = W'(y0); z_in = W'(z0);
    start = 1'b1;
    t0 = cycle;
    @(negedge clk);
    start = 1'b0;
    if (poke) begin
      @(negedge clk);
      start = 1'b1; x_in = W'(x0 + 1234); mode = (m == MODE_ROTATE) ? MODE_VECTOR : MODE_ROTATE;
      @(negedge clk);
      start = 1'b0;
      n_ignored++;
    end
    if (poke && m == MODE_VECTOR) begin
      // verification request while busy: must not disturb the run
      @(negedge clk);
      test_mode = 1'b1;
      x_in = ~x_in;
      @(negedge clk);
      test_mode = 1'b0;
      n_tt_ignored++;
    end
    while (!done) @(negedge clk);
    checks++;
    if (cycle - t0 != ITER + 1) begin
      failures++;
      $display("FAIL latency %0d exp %0d", cycle - t0, ITER + 1);
    end
    xo = int'(signed'(x_out)); yo = int'(signed'(y_out)); zo = int'(signed'(z_out));
    ref_cordic(m, x0, y0, z0, xr, yr, zr);
    checks++;
    if (xo != xr || yo != yr || zo != zr) begin
      failures++;
      $display("FAIL %s in (%0d,%0d,%0d) got (%0d,%0d,%0d) ref (%0d,%0d,%0d)", m.name(),
               x0, y0, z0, xo, yo, zo, xr, yr, zr);
    end
    if (m == MODE_ROTATE) begin
      n_rot++;
      ang = real'(z0) * 2.0 * PI / real'(1 << W);
      ex = gain * (real'(x0) * $cos(ang) - real'(y0) * $sin(ang));
      ey = gain * (real'(y0) * $cos(ang) + real'(x0) * $sin(ang));
      ez = 0.0;
    end else begin
      n_vec++;
      ex = gain * $sqrt(real'(x0) * real'(x0) + real'(y0) * real'(y0));
      ey = 0.0;
      ez = real'(z0) + $atan2(real'(y0), real'(x0)) * real'(1 << W) / (2.0 * PI);
    end
    checks++;
    if (iabs(xo - $rtoi(ex)) > TOL_XY || iabs(yo - $rtoi(ey)) > TOL_XY ||
        iabs(adiff(zo, $rtoi(ez))) > TOL_Z) begin
      failures++;
      $display("FAIL %s accuracy in (%0d,%0d,%0d) got (%0d,%0d,%0d) exact (%f,%f,%f)", m.name(),
               x0, y0, z0, xo, yo, zo, ex, ey, ez);
    end
    if (iabs(xo - $rtoi(ex)) > max_err_xy) max_err_xy = iabs(xo - $rtoi(ex));
    if (iabs(yo - $rtoi(ey)) > max_err_xy) max_err_xy = iabs(yo - $rtoi(ey));
    if (iabs(adiff(zo, $rtoi(ez))) > max_err_z) max_err_z = iabs(adiff(zo, $rtoi(ez)));
    // results hold while idle unless another start follows immediately
    if (!keep_ready) begin
      @(negedge clk);
      checks++;
      if (x_out !== W'(xo) || y_out !== W'(yo) || z_out !== W'(zo) || done) begin
        failures++;
        $display("FAIL results not held after done");
      end
    end
  endtask

  // truth-table verification while idle: every slice against the table
  task automatic tt_check();
    checks++;
    if (!ready) begin failures++; $display("FAIL not ready for verification"); end
    x_in = W'($urandom); y_in = W'($urandom); z_in = W'($urandom);
    test_mode = 1'b1;
    #1;
    for (int i = 0; i < W; i++) begin
      checks++;
      if ({x_out[i], y_out[i], z_out[i]} !== TT[{x_in[i], y_in[i], z_in[i]}]) begin
        failures++;
        $display("FAIL verification slice %0d in %0b%0b%0b got %0b%0b%0b", i,
                 x_in[i], y_in[i], z_in[i], x_out[i], y_out[i], z_out[i]);
      end
    end
    n_tt++;
    @(negedge clk);
    test_mode = 1'b0;
  endtask

  function automatic int rnd(input int lo, input int hi);
    return lo + int'($urandom_range(0, hi - lo));
  endfunction

  initial begin
    gain = 1.0;
    for (int i = 0; i < ITER; i++) begin
      atan_tab[i] = $rtoi($atan(2.0 ** (-i)) * real'(1 << W) / (2.0 * PI) + 0.5);
      gain = gain * $sqrt(1.0 + 2.0 ** (-2 * i));
    end

    #22 rst_n = 1'b1;
    @(negedge clk);

    // directed cases: rotate (10000, 0) by 0, +45, -30, +90 degrees
    run_op(MODE_ROTATE, 10000, 0, 0, 1'b0, 1'b0);
    run_op(MODE_ROTATE, 10000, 0, 1 << (W - 3), 1'b0, 1'b0);
    run_op(MODE_ROTATE, 10000, 0, -(1 << W) / 12, 1'b1, 1'b0);
    run_op(MODE_ROTATE, 0, 9000, 1 << (W - 2), 1'b0, 1'b0);
    // directed vectoring: atan(1), atan(-1/2)
    run_op(MODE_VECTOR, 8000, 8000, 0, 1'b0, 1'b0);
    run_op(MODE_VECTOR, 12000, -6000, 0, 1'b1, 1'b0);

    // random operations; some back-to-back (start in the done cycle)
    for (int n = 0; n < 400; n++) begin
      bit b2b;
      b2b = (n % 3 == 0);
      if (b2b && n > 0) n_b2b++;
      if (n % 2 == 0)
        run_op(MODE_ROTATE, rnd(-11000, 11000), rnd(-11000, 11000), rnd(-(1 << (W - 2)), 1 << (W - 2)),
               (n % 17 == 5), b2b);
      else begin
        int xv, yv;
        do begin
          xv = rnd(1, 11000); yv = rnd(-11000, 11000);
        end while (xv * xv + yv * yv < 4000 * 4000);
        run_op(MODE_VECTOR, xv, yv, rnd(-4096, 4096), (n % 17 == 6), b2b);
      end
      if (n % 50 == 7 && !b2b) tt_check();
    end

    $display("mechanisms: rotate=%0d vector=%0d dir+=%0d dir-=%0d back_to_back=%0d ignored_start=%0d",
             n_rot, n_vec, n_dir_pos, n_dir_neg, n_b2b, n_ignored);
    $display("            truth_table_mode=%0d truth_table_request_ignored=%0d", n_tt, n_tt_ignored);
    $display("max error vs exact: xy=%0d LSB z=%0d LSB", max_err_xy, max_err_z);
    checks++; if (n_rot == 0)     begin failures++; $display("FAIL no rotation op"); end
    checks++; if (n_vec == 0)     begin failures++; $display("FAIL no vectoring op"); end
    checks++; if (n_dir_pos == 0) begin failures++; $display("FAIL no d=+1 iteration"); end
    checks++; if (n_dir_neg == 0) begin failures++; $display("FAIL no d=-1 iteration"); end
    checks++; if (n_b2b == 0)     begin failures++; $display("FAIL no back-to-back start"); end
    checks++; if (n_ignored == 0) begin failures++; $display("FAIL no ignored start"); end
    checks++; if (n_tt == 0)      begin failures++; $display("FAIL no verification mode"); end
    checks++; if (n_tt_ignored == 0) begin failures++; $display("FAIL no ignored verification"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
