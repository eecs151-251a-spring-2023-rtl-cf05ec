// abc_example: datapath and controller derived from an RT-language sequence.
//
// The four-cycle program  regA<-IN; regB<-IN; regC<-regA+regB; regB<-regC;
// implies the datapath: IN fans out to regA and to input 0 of a 2:1 mux in
// front of regB, whose input 1 is regC; regA and regB feed an adder whose
// sum goes to regC. The controller drives the three control points the
// lecture lists (clock enable of A, clock enable of B, the B mux select)
// from a four-state FSM, one state per cycle:
//   LOAD_A  ce_a=1                 regA <- IN
//   LOAD_B  ce_b=1, b_sel=0        regB <- IN
//   ADD     (regC loads every cycle) regC <- regA + regB
//   WRITE_B ce_b=1, b_sel=1        regB <- regC
// regC has no enable, as in the lecture's list of control points. After
// WRITE_B the FSM returns to LOAD_A and repeats the program; the synchronous
// reset to LOAD_A and the repetition are this design's choices. W (the data
// width) is not given by the lecture.
module abc_example #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] in,
  output logic [W-1:0] reg_a,
  output logic [W-1:0] reg_b,
  output logic [W-1:0] reg_c,
  output logic [1:0]   phase   // 0..3 = LOAD_A, LOAD_B, ADD, WRITE_B
);

  typedef enum logic [1:0] {LOAD_A, LOAD_B, ADD, WRITE_B} abc_state_e;

  abc_state_e state;
  logic ce_a, ce_b, b_sel;

  always_ff @(posedge clk) begin
    if (rst) state <= LOAD_A;
    else     state <= abc_state_e'(state + 2'd1);
  end

  assign ce_a  = (state == LOAD_A);
  assign ce_b  = (state == LOAD_B) || (state == WRITE_B);
  assign b_sel = (state == WRITE_B);

  always_ff @(posedge clk) begin
    if (ce_a) reg_a <= in;
    if (ce_b) reg_b <= b_sel ? reg_c : in;
    reg_c <= reg_a + reg_b;
  end

  assign phase = state;

endmodule
