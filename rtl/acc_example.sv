// acc_example: R0/R1/ACC datapath sequenced by an RT-language program.
//
// Datapath from the lecture's accumulator example: registers R0 and R1 each
// sit behind a 2:1 mux (S0, S1) whose input 1 feeds the register back to
// itself (hold) and whose input 0 takes the S3 mux output. S2 selects R0 (0)
// or R1 (1) as the adder's operand; the adder computes ACC + S2 output into
// ACC. S3 selects the S2 output (0) or ACC (1) as the value written back to
// R0/R1. A small FSM runs the three-cycle RT program
//   ACC<-ACC+R0, R1<-R0;  ACC<-ACC+R1, R0<-R1;  R0<-ACC;
// by driving only the mux selects and ACC's load enable, as the lecture
// describes (the controller moves data by steering the multiplexors).
//
// This design's additions, which the lecture does not draw: a load enable
// on ACC so that it holds outside the program, an 'init' port that loads
// R0, R1 and ACC from inputs (the figure has no data input), a 'go' input
// that starts the program from IDLE, and a synchronous reset of the FSM.
// Timing: with go high in IDLE, the three transfers happen on the next three
// rising edges; busy is high during them.
module acc_example #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         init,
  input  logic [W-1:0] r0_in,
  input  logic [W-1:0] r1_in,
  input  logic [W-1:0] acc_in,
  input  logic         go,
  output logic         busy,
  output logic [W-1:0] r0,
  output logic [W-1:0] r1,
  output logic [W-1:0] acc
);

  typedef enum logic [1:0] {IDLE, CYC1, CYC2, CYC3} acc_state_e;

  acc_state_e state;
  logic s0, s1, s2, s3, ld_acc;
  logic [W-1:0] s2_out, s3_out, acc_sum;

  // Controller: one state per RT-language cycle.
  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
    end else begin
      unique case (state)
        IDLE:    state <= (go && !init) ? CYC1 : IDLE;
        CYC1:    state <= CYC2;
        CYC2:    state <= CYC3;
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    s0 = 1'b1;  s1 = 1'b1;  s2 = 1'b0;  s3 = 1'b0;  ld_acc = 1'b0;
    unique case (state)
      CYC1: begin s2 = 1'b0; ld_acc = 1'b1; s3 = 1'b0; s1 = 1'b0; end
      CYC2: begin s2 = 1'b1; ld_acc = 1'b1; s3 = 1'b0; s0 = 1'b0; end
      CYC3: begin s3 = 1'b1; s0 = 1'b0; end
      default: ;
    endcase
  end

  // Datapath.
  assign s2_out  = s2 ? r1 : r0;
  assign s3_out  = s3 ? acc : s2_out;
  assign acc_sum = acc + s2_out;

  always_ff @(posedge clk) begin
    if (init) begin
      r0  <= r0_in;
      r1  <= r1_in;
      acc <= acc_in;
    end else begin
      r0 <= s0 ? r0 : s3_out;
      r1 <= s1 ? r1 : s3_out;
      if (ld_acc) acc <= acc_sum;
    end
  end

  assign busy = (state != IDLE);

endmodule
