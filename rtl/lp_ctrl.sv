// lp_ctrl: one-hot controller of the list processor, architectures 1 to 3.
//
// Four states, one flip-flop each: START, COMPUTE_SUM, GET_NEXT and DONE.
// The states, their transitions and the control values asserted in each
// follow the lecture's state diagram and one-hot implementation:
//   START        LD_SUM=1 SUM_SEL=0 LD_NEXT=1 NEXT_SEL=0 (clear SUM and NEXT)
//   COMPUTE_SUM  A_SEL=1 LD_SUM=1 SUM_SEL=1            (SUM <- SUM + number)
//   GET_NEXT     A_SEL=0 LD_NEXT=1 NEXT_SEL=1          (NEXT <- Memory[NEXT])
//   DONE         DONE=1, nothing loaded
// START=1 sends every state to START (the registers have no reset; the start
// input is the only way into a known state). START=0 moves START to
// COMPUTE_SUM; COMPUTE_SUM always moves to GET_NEXT; GET_NEXT returns to
// COMPUTE_SUM while the pointer just fetched (NEXT_ZERO, from the NEXT mux
// output) is non-zero, and goes to DONE when it is zero. DONE holds until
// START rises. SUM_SEL, A_SEL and ADD_SEL are all the COMPUTE_SUM flip-flop;
// NEXT_SEL is the GET_NEXT flip-flop. ADD_SEL is only used by architecture 3.
// Outputs are Moore outputs of the state register: valid one clk-to-Q after
// the edge, 2 cycles per list node.
module lp_ctrl
  import lp_pkg::*;
(
  input  logic     clk,
  input  logic     start,
  input  logic     next_zero,
  output lp_ctrl_t ctrl,
  output logic [NUM_STATES-1:0] state   // one-hot state, for observation
);

  logic [NUM_STATES-1:0] state_d;

  always_comb begin
    state_d = '0;
    if (start) begin
      state_d[S_START] = 1'b1;
    end else begin
      state_d[S_COMPUTE_SUM] = state[S_START] | (state[S_GET_NEXT] & ~next_zero);
      state_d[S_GET_NEXT]    = state[S_COMPUTE_SUM];
      state_d[S_DONE]        = state[S_DONE]  | (state[S_GET_NEXT] & next_zero);
    end
  end

  always_ff @(posedge clk) state <= state_d;

  always_comb begin
    ctrl.ld_sum   = state[S_START] | state[S_COMPUTE_SUM];
    ctrl.sum_sel  = state[S_COMPUTE_SUM];
    ctrl.ld_next  = state[S_START] | state[S_GET_NEXT];
    ctrl.next_sel = state[S_GET_NEXT];
    ctrl.a_sel    = state[S_COMPUTE_SUM];
    ctrl.add_sel  = state[S_COMPUTE_SUM];
    ctrl.done     = state[S_DONE];
  end

  // From a one-hot state the controller only reaches one-hot states, and
  // START always lands in the START state.
  a_onehot_kept: assert property (@(posedge clk) $onehot(state) |=> $onehot(state));
  a_start_state: assert property (@(posedge clk) start |=> state == NUM_STATES'(1 << S_START));

endmodule
