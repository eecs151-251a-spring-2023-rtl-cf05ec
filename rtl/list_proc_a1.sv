// list_proc_a1: linked-list summer, micro-architecture #1 (direct form).
//
// Sums the 2's complement numbers of a linked list that starts at address 0
// of an external single-ported memory with asynchronous read. A node at
// address p holds the pointer to the next node at p and its number at p+1;
// the last node's pointer is 0 and the list has at least one node. Nodes need
// not be aligned. The datapath is a direct implementation of the RT program
//   if (START) NEXT<-0, SUM<-0;
//   repeat { SUM<-SUM+Memory[NEXT+1]; NEXT<-Memory[NEXT]; } until (NEXT==0);
//   R<-SUM, DONE<-1;
// with two registers (SUM, NEXT), two adders (SUM+data and NEXT+1), a
// constant-0 mux in front of each register and an address mux A_SEL that
// picks NEXT (0) or NEXT+1 (1). NEXT_ZERO is the zero test of the NEXT mux
// output, so the loop ends in the cycle that fetches a zero pointer. The
// controller is lp_ctrl.
//
// Interface: hold start high for at least one cycle, then low; mem_addr /
// mem_rdata form the memory read port; done rises 2*N+1 clock edges after
// the first edge with start low, for a list of N nodes (2 cycles per node),
// and r (the SUM register) then holds the sum modulo 2**SUM_W. SUM_W is 8 as
// in the lecture's port list; a wider SUM sign-extends each number.
module list_proc_a1
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
  addr_t       next_q, next_d, next_plus1;
  logic [SUM_W-1:0] sum_q, sum_d, sum_add;

  lp_ctrl u_ctrl (
    .clk       (clk),
    .start     (start),
    .next_zero (next_zero),
    .ctrl      (ctrl),
    .state     ()
  );

  // Datapath.
  assign sum_add    = sum_q + SUM_W'($signed(mem_rdata));
  assign sum_d      = ctrl.sum_sel ? sum_add : '0;
  assign next_d     = ctrl.next_sel ? addr_t'(mem_rdata) : '0;
  assign next_zero  = (next_d == '0);
  assign next_plus1 = next_q + addr_t'(1);
  assign mem_addr   = ctrl.a_sel ? next_plus1 : next_q;

  always_ff @(posedge clk) begin
    if (ctrl.ld_sum)  sum_q  <= sum_d;
    if (ctrl.ld_next) next_q <= next_d;
  end

  assign r    = sum_q;
  assign done = ctrl.done;

endmodule
