// tb_cordic_full_adder: exhaustive check of the full-adder cell.
// All eight input combinations are applied and {carry, sum} is compared
// with the integer sum a + b + c.
module tb_cordic_full_adder;
  logic a, b, c, sum, carry;
  int checks = 0, failures = 0;

  cordic_full_adder dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int exp;
      {a, b, c} = 3'(v);
      #1;
      exp = int'(a) + int'(b) + int'(c);
      checks++;
      if ({carry, sum} != 2'(exp)) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b got %0b%0b exp %0d", a, b, c, carry, sum, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
