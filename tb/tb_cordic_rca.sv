// tb_cordic_rca: checks the ripple-carry adder against integer addition,
// with random operands plus the all-ones/carry-in corner cases.
module tb_cordic_rca;
  localparam int W = 16;
  logic [W-1:0] a, b, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  cordic_rca #(.WIDTH(W)) dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  task automatic check();
    longint exp;
    #1;
    exp = longint'(a) + longint'(b) + longint'(cin);
    checks++;
    if ({cout, s} != (W+1)'(exp)) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%0b got %0b_%h", a, b, cin, cout, s);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '1; b = '0; cin = 1'b1; check();
    a = '1; b = '1; cin = 1'b1; check();
    a = '0; b = '0; cin = 1'b0; check();
    for (int n = 0; n < 500; n++) begin
      a = W'($urandom); b = W'($urandom); cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
