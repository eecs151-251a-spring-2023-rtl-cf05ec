// list_proc_a2: linked-list summer, micro-architecture #2 (NUMA register).
//
// Same function and interface as list_proc_a1. A third register, NUMA, holds
// the address of the number to add, so the pointer increment moves out of
// the cycle that adds into SUM:
//   if (START) NEXT<-0, SUM<-0, NUMA<-1;
//   repeat { SUM<-SUM+Memory[NUMA];
//            NUMA<-Memory[NEXT]+1, NEXT<-Memory[NEXT]; } until (NEXT==0);
//   R<-SUM, DONE<-1;
// NUMA has its own mux (NEXT_SEL: 1 = memory data + 1, 0 = constant 1) and
// shares NEXT_SEL and LD_NEXT with NEXT. A_SEL picks NEXT (0) or NUMA (1).
// The controller (lp_ctrl) is unchanged from architecture #1; it is still 2
// cycles per node, done rising 2*N+1 edges after the first edge with start
// low. This shortens the longest path (memory + 8-bit add moves to
// GET_NEXT) at the cost of one register and one mux.
module list_proc_a2
  import lp_pkg::*;
#(
  parameter int SUM_W = 8
) (
  input  logic             clk,
  input  logic             start,
  output addr_t            mem_addr,
  input  word_t            mem_rdata,
  output logic             done,
  output logic [SUM_W-1:0] r
);

  lp_ctrl_t ctrl;
  logic        next_zero;
  addr_t       next_q, next_d, numa_q, numa_d, data_plus1;
  logic [SUM_W-1:0] sum_q, sum_d, sum_add;

  lp_ctrl u_ctrl (
    .clk       (clk),
    .start     (start),
    .next_zero (next_zero),
    .ctrl      (ctrl),
    .state     ()
  );

  assign sum_add    = sum_q + SUM_W'($signed(mem_rdata));
  assign sum_d      = ctrl.sum_sel ? sum_add : '0;
  assign data_plus1 = addr_t'(mem_rdata) + addr_t'(1);
  assign next_d     = ctrl.next_sel ? addr_t'(mem_rdata) : '0;
  assign numa_d     = ctrl.next_sel ? data_plus1 : addr_t'(1);
  assign next_zero  = (next_d == '0);
  assign mem_addr   = ctrl.a_sel ? numa_q : next_q;

  always_ff @(posedge clk) begin
    if (ctrl.ld_sum)  sum_q  <= sum_d;
    if (ctrl.ld_next) begin
      next_q <= next_d;
      numa_q <= numa_d;
    end
  end

  assign r    = sum_q;
  assign done = ctrl.done;

endmodule
