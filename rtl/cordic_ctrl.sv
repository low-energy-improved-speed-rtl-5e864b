// cordic_ctrl: iteration controller of the bit-parallel iterative CORDIC.
//
// Two states.  In IDLE, ready is 1; a start there asserts load for that
// cycle (the input multiplexers select the external operands and the
// registers capture them) and moves to RUN with the iteration index at 0.
// In RUN, iterate is 1 every cycle (the multiplexers select the datapath
// results) and iter_idx counts 0 .. ITER-1; after the last iteration the
// FSM returns to IDLE and done pulses for one cycle in the next cycle,
// together with ready, so a new start may follow with no gap.  A start seen
// while RUN is ignored.  Timing: done comes ITER+1 cycles after the start
// was taken; one operation every ITER+1 cycles.  The controller and its
// handshake are this design's choice; the document only names the
// selection input of the multiplexers.
module cordic_ctrl #(
  parameter int unsigned ITER = 16,
  localparam int unsigned IW  = (ITER > 1) ? $clog2(ITER) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          ready,
  output logic          load,
  output logic          iterate,
  output logic [IW-1:0] iter_idx,
  output logic          done
);
  typedef enum logic {
    S_IDLE = 1'b0,
    S_RUN  = 1'b1
  } state_e;

  state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      iter_idx <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            state    <= S_RUN;
            iter_idx <= '0;
          end
        end
        S_RUN: begin
          if (iter_idx == IW'(ITER - 1)) begin
            state    <= S_IDLE;
            iter_idx <= '0;
            done     <= 1'b1;
          end else begin
            iter_idx <= iter_idx + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    ready   = (state == S_IDLE);
    load    = ready && start;
    iterate = (state == S_RUN);
  end

  // done never coincides with an iteration
  a_done_idle: assert property (@(posedge clk) done |-> ready);
  // load and iterate are exclusive register-write sources
  a_excl: assert property (@(posedge clk) !(load && iterate));
endmodule
