// tb_cordic_reg: checks the enabled register against a one-word model,
// including hold when disabled and asynchronous reset in mid-run.
module tb_cordic_reg;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] d = '0, q, model;
  int checks = 0, failures = 0;

  cordic_reg #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    #12;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset value %h", q); end
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 2) != 0);
      d  = W'($urandom);
      if (n == 150) begin
        rst_n = 1'b0;
        #1;
        model = '0;
        checks++;
        if (q !== '0) begin failures++; $display("FAIL async reset %h", q); end
        rst_n = 1'b1;
      end
      @(posedge clk);
      if (en) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL n=%0d q=%h exp %h", n, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
