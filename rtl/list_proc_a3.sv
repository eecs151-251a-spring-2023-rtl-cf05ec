// list_proc_a3: linked-list summer, micro-architecture #3 (one shared adder).
//
// Same RT program, function and interface as list_proc_a2, but architecture
// #2 uses only one add per cycle, so the two adders are merged into one.
// The adder's second operand is always the memory data; its first operand
// comes from the ADD_SEL mux: SUM (1) in COMPUTE_SUM, giving SUM+number, or
// the constant 1 (0) in GET_NEXT, giving pointer+1 for NUMA. The adder is
// SUM_W bits wide; NUMA takes its low 8 bits. ADD_SEL is driven by the
// COMPUTE_SUM state of lp_ctrl. Performance is unchanged (2 cycles per
// node, done 2*N+1 edges after the first edge with start low): one mux is
// added and an 8-bit adder removed.
module list_proc_a3
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
  addr_t       next_q, next_d, numa_q, numa_d;
  logic [SUM_W-1:0] sum_q, sum_d, add_a, add_y;

  lp_ctrl u_ctrl (
    .clk       (clk),
    .start     (start),
    .next_zero (next_zero),
    .ctrl      (ctrl),
    .state     ()
  );

  assign add_a     = ctrl.add_sel ? sum_q : SUM_W'(1);
  assign add_y     = add_a + SUM_W'($signed(mem_rdata));
  assign sum_d     = ctrl.sum_sel ? add_y : '0;
  assign next_d    = ctrl.next_sel ? addr_t'(mem_rdata) : '0;
  assign numa_d    = ctrl.next_sel ? addr_t'(add_y) : addr_t'(1);
  assign next_zero = (next_d == '0);
  assign mem_addr  = ctrl.a_sel ? numa_q : next_q;

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
