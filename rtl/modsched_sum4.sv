// modsched_sum4: E = (A+B) + (C+D), modulo scheduled on one adder.
//
// Each iteration i reads A[i], B[i], C[i], D[i] from a dual-port memory and
// writes E[i] = A[i]+B[i]+C[i]+D[i] back to it. Both the memory (4 loads and
// 1 store over 2 ports) and the single adder (3 adds) are busy for 3 cycles
// per iteration, so the characteristic section is 3 cycles long and the loop
// repeats it:
//   phase 0: port1 load A[i], port2 load B[i];   adder E[i-1] = AB + CD
//   phase 1: port1 load C[i], port2 load D[i];   adder AB = A[i] + B[i]
//   phase 2:                  port2 store E[i-1]; adder CD = C[i] + D[i]
// The final add and the store of an iteration wrap into the next section
// (subscript i-1), so two iterations are in flight. Section 0 omits the
// pieces of iteration -1 and section N_ITER omits those of iteration N_ITER;
// the whole run takes 3*(N_ITER+1) cycles. The schedule is the lecture's;
// the registers between the steps (A, B, C, D, AB, CD, E), the array layout
// (A at A_BASE, B at B_BASE, ... each N_ITER words) and the start/done
// handshake are this design's choices.
//
// Interface: pulse start in IDLE; busy is high for 3*(N_ITER+1) cycles, then
// done rises for one cycle and E[0..N_ITER-1] is in memory. Sums wrap modulo
// 2**W.
module modsched_sum4 #(
  parameter int W      = 8,
  parameter int ADDR_W = 8,
  parameter int N_ITER = 16,
  parameter int A_BASE = 0,
  parameter int B_BASE = A_BASE + N_ITER,
  parameter int C_BASE = B_BASE + N_ITER,
  parameter int D_BASE = C_BASE + N_ITER,
  parameter int E_BASE = D_BASE + N_ITER
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  output logic              busy,
  output logic              done,
  // memory port 1 (loads only)
  output logic [ADDR_W-1:0] addr1,
  input  logic [W-1:0]      rdata1,
  // memory port 2 (loads and the store of E)
  output logic [ADDR_W-1:0] addr2,
  output logic              we2,
  output logic [W-1:0]      wdata2,
  input  logic [W-1:0]      rdata2
);

  localparam int IW = $clog2(N_ITER + 1);

  logic [1:0]    phase;
  logic [IW-1:0] iter;          // section number 0..N_ITER
  logic          cur_valid;     // iteration iter is a real one (iter < N_ITER)
  logic          prev_valid;    // iteration iter-1 exists (iter > 0)
  logic [W-1:0]  ra, rb, rc, rd, rab, rcd, re;
  logic [W-1:0]  add_x, add_y, add_s;

  assign cur_valid  = busy && (int'(iter) < N_ITER);
  assign prev_valid = busy && (iter != '0);

  // Sequencer: phase counts 0,1,2 within a section, iter counts sections.
  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      phase <= '0;
      iter  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          phase <= '0;
          iter  <= '0;
        end
      end else if (phase == 2'd2) begin
        phase <= '0;
        if (int'(iter) == N_ITER) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          iter <= iter + 1'b1;
        end
      end else begin
        phase <= phase + 2'd1;
      end
    end
  end

  // Memory addresses and the store.
  always_comb begin
    addr1  = '0;
    addr2  = '0;
    we2    = 1'b0;
    wdata2 = re;
    unique case (phase)
      2'd0: begin
        addr1 = ADDR_W'(A_BASE + int'(iter));
        addr2 = ADDR_W'(B_BASE + int'(iter));
      end
      2'd1: begin
        addr1 = ADDR_W'(C_BASE + int'(iter));
        addr2 = ADDR_W'(D_BASE + int'(iter));
      end
      2'd2: begin
        addr2 = ADDR_W'(E_BASE + int'(iter) - 1);
        we2   = prev_valid;
      end
      default: ;
    endcase
  end

  // The single adder and its operand muxes.
  always_comb begin
    unique case (phase)
      2'd0:    begin add_x = rab; add_y = rcd; end
      2'd1:    begin add_x = ra;  add_y = rb;  end
      default: begin add_x = rc;  add_y = rd;  end
    endcase
  end
  assign add_s = add_x + add_y;

  always_ff @(posedge clk) begin
    unique case (phase)
      2'd0: begin
        if (cur_valid) begin
          ra <= rdata1;
          rb <= rdata2;
        end
        if (prev_valid) re <= add_s;
      end
      2'd1: begin
        if (cur_valid) begin
          rc  <= rdata1;
          rd  <= rdata2;
          rab <= add_s;
        end
      end
      2'd2: begin
        if (cur_valid) rcd <= add_s;
      end
      default: ;
    endcase
  end

  a_no_store_when_idle: assert property (@(posedge clk) disable iff (rst) we2 |-> busy);
  a_done_pulse:         assert property (@(posedge clk) disable iff (rst) done |=> !done);

endmodule
