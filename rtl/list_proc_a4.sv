// list_proc_a4: pipelined linked-list summer (micro-architecture #4).
//
// Same function and interface as list_proc_a1: sums the numbers of a linked
// list starting at address 0 of a single-ported, asynchronous-read memory
// (node at p: pointer at p, number at p+1; last pointer 0; at least one
// node). Each loop iteration is split into four operations, next (fetch
// pointer), numa (pointer+1), x (fetch number) and sum (add), and
// the modulo schedule packs three iterations into a 2-cycle section with
// one memory access and one add per cycle:
//   cycle 1: X<-Memory[NUMA], NUMA<-NEXT+1;
//   cycle 2: NEXT<-Memory[NEXT], SUM<-SUM+X;
// X and NUMA act as pipeline registers, so no cycle chains a memory read
// into an add. Datapath as drawn in the lecture: X mux (X_SEL: 0 / data),
// one adder with operand muxes ADD_SEL1 (constant 1 / SUM) and ADD_SEL2
// (NEXT / X), SUM mux (SUM_SEL: 0 / adder), NEXT mux (NEXT_SEL: 0 / data),
// NUMA mux (NEXT_SEL: 1 / adder), address mux A_SEL (NEXT / NUMA) and a
// zero test on the NEXT register. The controller is lp4_ctrl.
//
// Timing: hold start high one cycle or more; done rises 2*N+2 edges after
// the first edge with start low for an N-node list, and r holds the sum
// modulo 2**SUM_W.
module list_proc_a4
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

  a4_ctrl_t  ctrl;
  logic      next_zero;
  addr_t     next_q, next_d, numa_q, numa_d;
  logic [SUM_W-1:0] x_q, x_d, sum_q, sum_d, add_a, add_b, add_y;

  lp4_ctrl u_ctrl (
    .clk       (clk),
    .start     (start),
    .next_zero (next_zero),
    .ctrl      (ctrl),
    .state     ()
  );

  assign x_d       = ctrl.x_sel ? SUM_W'($signed(mem_rdata)) : '0;
  assign add_a     = ctrl.add_sel1 ? sum_q : SUM_W'(1);
  assign add_b     = ctrl.add_sel2 ? x_q : SUM_W'(next_q);
  assign add_y     = add_a + add_b;
  assign sum_d     = ctrl.sum_sel ? add_y : '0;
  assign next_d    = ctrl.next_sel ? addr_t'(mem_rdata) : '0;
  assign numa_d    = ctrl.next_sel ? addr_t'(add_y) : addr_t'(1);
  assign next_zero = (next_q == '0);
  assign mem_addr  = ctrl.a_sel ? numa_q : next_q;

  always_ff @(posedge clk) begin
    if (ctrl.ld_x)    x_q    <= x_d;
    if (ctrl.ld_sum)  sum_q  <= sum_d;
    if (ctrl.ld_next) next_q <= next_d;
    if (ctrl.ld_numa) numa_q <= numa_d;
  end

  assign r    = sum_q;
  assign done = ctrl.done;

endmodule
