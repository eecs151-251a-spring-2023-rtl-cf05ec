// list_proc_aligned: linked-list summer for nodes aligned on even addresses,
// byte-wide memory.
//
// If every node starts at an even address, the number of the node at p is at
// p with its low bit set, so the NUMA adder is not needed: the controller
// supplies the low address bit, 0 to fetch the pointer and 1 to fetch the
// number. Registers NEXT, X and SUM; one adder (SUM + X); the address is
// {NEXT[7:1], LOW_BIT}. The loop is
//   FETCH_X   X <- Memory[{NEXT[7:1],1}];
//   NEXT_SUM  NEXT <- Memory[{NEXT[7:1],0}], SUM <- SUM + X;
// and ends in the NEXT_SUM that fetches a zero pointer (zero test on the
// NEXT mux output, as in architecture 1). INIT, held while start is high,
// clears NEXT, X and SUM. The lecture gives the idea (drop the NUMA add,
// controller drives the low address bit); the state sequence and the use of
// X as the holding register between the two cycles are this design's.
//
// Interface as list_proc_a1; the low bit of every stored pointer is
// ignored. Timing: done rises 2*N+1 edges after the first edge with start
// low for an N-node list (2 cycles per node); r holds the sum modulo
// 2**SUM_W.
module list_proc_aligned
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

  typedef enum logic [1:0] {L_INIT, L_FETCH_X, L_NEXT_SUM, L_DONE} l_state_e;

  l_state_e state, state_d;
  addr_t    next_q;
  logic [SUM_W-1:0] x_q, sum_q;
  logic     low_bit, next_zero;

  assign low_bit   = (state == L_FETCH_X);
  assign mem_addr  = {next_q[ADDR_W-1:1], low_bit};
  assign next_zero = (mem_rdata == '0);

  always_comb begin
    if (start) begin
      state_d = L_INIT;
    end else begin
      unique case (state)
        L_INIT:     state_d = L_FETCH_X;
        L_FETCH_X:  state_d = L_NEXT_SUM;
        L_NEXT_SUM: state_d = next_zero ? L_DONE : L_FETCH_X;
        default:    state_d = L_DONE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    state <= state_d;
    unique case (state)
      L_INIT: begin
        next_q <= '0;
        x_q    <= '0;
        sum_q  <= '0;
      end
      L_FETCH_X:  x_q <= SUM_W'($signed(mem_rdata));
      L_NEXT_SUM: begin
        next_q <= addr_t'(mem_rdata);
        sum_q  <= sum_q + x_q;
      end
      default: ;
    endcase
  end

  assign r    = sum_q;
  assign done = (state == L_DONE);

  a_start_init: assert property (@(posedge clk) start |=> state == L_INIT);

endmodule
