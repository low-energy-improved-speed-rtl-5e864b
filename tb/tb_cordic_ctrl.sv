// tb_cordic_ctrl: checks the controller's sequence and timing.
// For each operation: load only in the start cycle, iterate with
// iter_idx = 0 .. ITER-1 in the next ITER cycles, done exactly ITER+1
// cycles after the start, starts during a run ignored, and back-to-back
// starts in the done cycle accepted.
module tb_cordic_ctrl;
  localparam int ITER = 16;
  localparam int IW = $clog2(ITER);
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic ready, load, iterate, done;
  logic [IW-1:0] iter_idx;
  int checks = 0, failures = 0;
  int cycle = 0;

  cordic_ctrl #(.ITER(ITER)) dut (.clk(clk), .rst_n(rst_n), .start(start), .ready(ready),
                                  .load(load), .iterate(iterate), .iter_idx(iter_idx), .done(done));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL cycle %0d %s=%0b exp %0b", cycle, what, got, exp);
    end
  endtask

  // one operation; start asserted in the current cycle (checked at negedge)
  task automatic run_op(input bit poke_busy);
    int t0;
    expect_bit("ready", ready, 1'b1);
    expect_bit("load", load, 1'b1);
    expect_bit("iterate", iterate, 1'b0);
    t0 = cycle;
    @(negedge clk);
    start = 1'b0;
    for (int i = 0; i < ITER; i++) begin
      start = poke_busy && (i == 3);   // ignored: controller busy
      #1;
      expect_bit("iterate", iterate, 1'b1);
      expect_bit("load", load, 1'b0);
      expect_bit("ready", ready, 1'b0);
      expect_bit("done", done, 1'b0);
      checks++;
      if (iter_idx != IW'(i)) begin
        failures++;
        $display("FAIL iter_idx=%0d exp %0d", iter_idx, i);
      end
      @(negedge clk);
      start = 1'b0;
    end
    expect_bit("done", done, 1'b1);
    expect_bit("ready", ready, 1'b1);
    checks++;
    if (cycle - t0 != ITER + 1) begin
      failures++;
      $display("FAIL latency %0d exp %0d", cycle - t0, ITER + 1);
    end
  endtask

  initial begin
    #22 rst_n = 1'b1;
    @(negedge clk);
    expect_bit("ready", ready, 1'b1);
    expect_bit("done", done, 1'b0);
    start = 1'b1;
    #1;
    run_op(1'b1);
    // back-to-back: start again in the done cycle
    start = 1'b1;
    #1;
    run_op(1'b0);
    // idle gap
    repeat (3) begin
      @(negedge clk);
      expect_bit("done", done, 1'b0);
      expect_bit("iterate", iterate, 1'b0);
    end
    start = 1'b1;
    #1;
    run_op(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
