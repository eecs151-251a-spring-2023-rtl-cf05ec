// lp4_ctrl: controller of the pipelined list processor (architecture #4).
//
// The loop body is the two-cycle characteristic section of the modulo
// schedule:
//   FETCH_X   X<-Memory[NUMA], NUMA<-NEXT+1;
//   NEXT_SUM  NEXT<-Memory[NEXT], SUM<-SUM+X;
// Two states start the loop and two finish it. INIT (held while START is
// high) clears SUM and X, sets NEXT to 0 and NUMA to 1; PRIME fetches the
// first pointer, NEXT<-Memory[0], and runs SUM<-SUM+X harmlessly with X=0.
// After each NEXT_SUM the loop continues while NEXT (the register, tested in
// FETCH_X) is non-zero. When FETCH_X sees NEXT==0 it still fetches the last
// number, LAST_SUM adds it, and DONE holds until START rises again. START=1
// returns every state to INIT. The state sequence is this design's own
// reading of the lecture's schedule; the lecture names the start/finish
// states but does not draw this controller. Moore outputs, 2 cycles per node:
// done rises 2*N+2 edges after the first edge with start low.
module lp4_ctrl
  import lp_pkg::*;
(
  input  logic      clk,
  input  logic      start,
  input  logic      next_zero,
  output a4_ctrl_t  ctrl,
  output a4_state_e state
);

  a4_state_e state_d;

  always_comb begin
    if (start) begin
      state_d = A4_INIT;
    end else begin
      unique case (state)
        A4_INIT:     state_d = A4_PRIME;
        A4_PRIME:    state_d = A4_FETCH_X;
        A4_FETCH_X:  state_d = next_zero ? A4_LAST_SUM : A4_NEXT_SUM;
        A4_NEXT_SUM: state_d = A4_FETCH_X;
        A4_LAST_SUM: state_d = A4_DONE;
        A4_DONE:     state_d = A4_DONE;
        default:     state_d = A4_DONE;
      endcase
    end
  end

  always_ff @(posedge clk) state <= state_d;

  always_comb begin
    ctrl = '0;
    unique case (state)
      A4_INIT: begin
        ctrl.next_sel = 1'b0;  // NEXT<-0, NUMA<-1
        ctrl.ld_next  = 1'b1;
        ctrl.ld_numa  = 1'b1;
        ctrl.sum_sel  = 1'b0;  // SUM<-0
        ctrl.ld_sum   = 1'b1;
        ctrl.x_sel    = 1'b0;  // X<-0
        ctrl.ld_x     = 1'b1;
      end
      A4_FETCH_X: begin
        ctrl.a_sel    = 1'b1;  // address NUMA
        ctrl.x_sel    = 1'b1;
        ctrl.ld_x     = 1'b1;
        ctrl.add_sel1 = 1'b0;  // 1 + NEXT
        ctrl.add_sel2 = 1'b0;
        ctrl.next_sel = 1'b1;
        ctrl.ld_numa  = 1'b1;
      end
      A4_PRIME, A4_NEXT_SUM: begin
        ctrl.a_sel    = 1'b0;  // address NEXT
        ctrl.next_sel = 1'b1;
        ctrl.ld_next  = 1'b1;
        ctrl.add_sel1 = 1'b1;  // SUM + X
        ctrl.add_sel2 = 1'b1;
        ctrl.sum_sel  = 1'b1;
        ctrl.ld_sum   = 1'b1;
      end
      A4_LAST_SUM: begin
        ctrl.add_sel1 = 1'b1;
        ctrl.add_sel2 = 1'b1;
        ctrl.sum_sel  = 1'b1;
        ctrl.ld_sum   = 1'b1;
      end
      A4_DONE: ctrl.done = 1'b1;
      default: ;
    endcase
  end

  a_start_init: assert property (@(posedge clk) start |=> state == A4_INIT);
  a_valid_state: assert property (@(posedge clk) $past(start) |-> state <= A4_DONE);

endmodule
