// list_proc_wide: linked-list summer for aligned nodes in a 16-bit memory.
//
// If every node starts on an even byte address, a memory with a 16-bit
// output returns a whole node in one access, the NUMA increment disappears
// and the loop body shrinks to a single cycle:
//   {NEXT, X} <- Memory[NEXT], SUM <- SUM + X;
// halving the execution time. Here the memory is word addressed: the node
// at byte address p (p even) is word p/2, with the pointer in bits 15:8 and
// the number in bits 7:0 (the order of the {NEXT, X} concatenation). The low
// bit of a pointer is ignored. The controller has four states: INIT (held
// while start is high: NEXT<-0, X<-0, SUM<-0), LOOP (the transfer above,
// repeated while the fetched pointer is non-zero), LAST (SUM<-SUM+X for the
// final number) and DONE. The packing, the word addressing and the state
// sequence are this design's choices; the lecture gives only the transfer.
//
// Timing: done rises N+2 edges after the first edge with start low for an
// N-node list; r holds the sum modulo 2**SUM_W.
module list_proc_wide
  import lp_pkg::*;
#(
  parameter int SUM_W = 8
) (
  input  logic              clk,
  input  logic              start,
  output logic [ADDR_W-2:0] mem_addr,   // word address = NEXT[7:1]
  input  logic [2*WORD_W-1:0] mem_rdata, // {pointer, number}
  output logic              done,
  output logic [SUM_W-1:0]  r
);

  typedef enum logic [1:0] {W_INIT, W_LOOP, W_LAST, W_DONE} w_state_e;

  w_state_e state, state_d;
  addr_t    next_q;
  logic [SUM_W-1:0] x_q, sum_q;
  word_t    data_ptr, data_num;

  assign data_ptr = mem_rdata[2*WORD_W-1:WORD_W];
  assign data_num = mem_rdata[WORD_W-1:0];
  assign mem_addr = next_q[ADDR_W-1:1];

  always_comb begin
    if (start) begin
      state_d = W_INIT;
    end else begin
      unique case (state)
        W_INIT:  state_d = W_LOOP;
        W_LOOP:  state_d = (data_ptr == '0) ? W_LAST : W_LOOP;
        W_LAST:  state_d = W_DONE;
        default: state_d = W_DONE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    state <= state_d;
    unique case (state)
      W_INIT: begin
        next_q <= '0;
        x_q    <= '0;
        sum_q  <= '0;
      end
      W_LOOP: begin
        next_q <= data_ptr;
        x_q    <= SUM_W'($signed(data_num));
        sum_q  <= sum_q + x_q;
      end
      W_LAST:  sum_q <= sum_q + x_q;
      default: ;
    endcase
  end

  assign r    = sum_q;
  assign done = (state == W_DONE);

  a_start_init: assert property (@(posedge clk) start |=> state == W_INIT);

endmodule
