// tb_cordic_bit_cell: checks the CORDIC bit cell against its truth table.
// The eight rows (inputs x0 y0 z0 -> outputs xn yn zn) are listed literally.
module tb_cordic_bit_cell;
  logic x0, y0, z0, xn, yn, zn;
  int checks = 0, failures = 0;

  // row r: inputs are r (x0 y0 z0), outputs TT[r] (xn yn zn)
  localparam logic [2:0] TT [8] = '{3'b000, 3'b111, 3'b010, 3'b101,
                                    3'b100, 3'b011, 3'b110, 3'b001};

  cordic_bit_cell dut (.x0(x0), .y0(y0), .z0(z0), .xn(xn), .yn(yn), .zn(zn));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 8; r++) begin
      {x0, y0, z0} = 3'(r);
      #1;
      checks++;
      if ({xn, yn, zn} != TT[r]) begin
        failures++;
        $display("FAIL in=%03b got %0b%0b%0b exp %03b", 3'(r), xn, yn, zn, TT[r]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
