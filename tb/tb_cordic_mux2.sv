// tb_cordic_mux2: random check of the 2:1 word multiplexer.
module tb_cordic_mux2;
  localparam int W = 16;
  logic sel;
  logic [W-1:0] d0, d1, y;
  int checks = 0, failures = 0;

  cordic_mux2 #(.WIDTH(W)) dut (.sel(sel), .d0(d0), .d1(d1), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      sel = n[0] ^ $urandom_range(0, 1) == 1;
      d0  = W'($urandom);
      d1  = W'($urandom);
      #1;
      checks++;
      if (y !== (sel ? d1 : d0)) begin
        failures++;
        $display("FAIL sel=%0b d0=%h d1=%h y=%h", sel, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
