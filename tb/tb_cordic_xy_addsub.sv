// tb_cordic_xy_addsub: checks one micro-rotation of x and y.
// Random x, y, shifted operands and direction; expected values are the
// CORDIC update computed with integer arithmetic, wrapped to WIDTH bits.
// Then the truth-table verification mode: random per-slice controls, each
// slice's outputs compared with the cell truth table listed literally.
module tb_cordic_xy_addsub;
  localparam int W = 16;
  logic [W-1:0] x, y, xs, ys, xn, yn;
  logic neg, tt_mode;
  logic [W-1:0] tt_z, cx, cy, cz;
  // cell truth table: row {x0,y0,z0} -> {xn,yn,zn}
  localparam logic [2:0] TT [8] = '{3'b000, 3'b111, 3'b010, 3'b101,
                                    3'b100, 3'b011, 3'b110, 3'b001};
  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0;

  cordic_xy_addsub #(.WIDTH(W)) dut (.x(x), .y(y), .xs(xs), .ys(ys), .neg(neg),
                                     .tt_mode(tt_mode), .tt_z(tt_z),
                                     .x_next(xn), .y_next(yn),
                                     .cell_x(cx), .cell_y(cy), .cell_z(cz));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tt_mode = 1'b0;
    tt_z = '0;
    for (int n = 0; n < 600; n++) begin
      int d, ex, ey;
      x = W'($urandom); y = W'($urandom);
      xs = W'($urandom); ys = W'($urandom);
      neg = 1'($urandom);
      #1;
      d  = neg ? -1 : 1;
      ex = int'(signed'(x)) - d * int'(signed'(ys));
      ey = int'(signed'(y)) + d * int'(signed'(xs));
      if (neg) n_sub++; else n_add++;
      checks++;
      if (xn !== W'(ex) || yn !== W'(ey)) begin
        failures++;
        $display("FAIL neg=%0b x=%h y=%h xs=%h ys=%h got %h %h exp %h %h",
                 neg, x, y, xs, ys, xn, yn, W'(ex), W'(ey));
      end
    end
    // truth-table verification mode
    tt_mode = 1'b1;
    for (int n = 0; n < 100; n++) begin
      xs = W'($urandom); ys = W'($urandom); tt_z = W'($urandom); neg = 1'($urandom);
      #1;
      for (int i = 0; i < W; i++) begin
        checks++;
        if ({cx[i], cy[i], cz[i]} !== TT[{xs[i], ys[i], tt_z[i]}]) begin
          failures++;
          $display("FAIL slice %0d in %0b%0b%0b got %0b%0b%0b", i, xs[i], ys[i], tt_z[i],
                   cx[i], cy[i], cz[i]);
        end
      end
    end
    checks++;
    if (n_add == 0 || n_sub == 0) begin failures++; $display("FAIL direction not covered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
