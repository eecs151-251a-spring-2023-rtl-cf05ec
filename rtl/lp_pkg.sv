// lp_pkg: widths and types shared by the linked-list summing processors.
//
// Every integer and pointer in the list is 8 bits wide and the list memory
// has an 8-bit address port and an 8-bit data port, so WORD_W is 8. The
// one-hot state indices below name the four states of the controller used
// by architectures 1 to 3 (START, COMPUTE_SUM, GET_NEXT, DONE); the
// pipelined architecture 4 uses its own enumerated state type.
package lp_pkg;

  localparam int WORD_W = 8;
  localparam int ADDR_W = 8;

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // Bit positions of the one-hot controller state vector.
  typedef enum int unsigned {
    S_START       = 0,
    S_COMPUTE_SUM = 1,
    S_GET_NEXT    = 2,
    S_DONE        = 3
  } lp_state_idx_e;

  localparam int NUM_STATES = 4;

  // Control word produced by the shared controller (architectures 1-3).
  typedef struct packed {
    logic ld_sum;    // clock enable of SUM
    logic sum_sel;   // SUM mux: 1 = adder, 0 = constant 0
    logic ld_next;   // clock enable of NEXT (and NUMA)
    logic next_sel;  // NEXT mux: 1 = memory data, 0 = constant 0
    logic a_sel;     // address mux: 1 = second address source, 0 = NEXT
    logic add_sel;   // shared-adder operand select (architecture 3)
    logic done;      // DONE output
  } lp_ctrl_t;

  // States of the pipelined architecture 4 controller.
  typedef enum logic [2:0] {
    A4_INIT     = 3'd0,  // NEXT<-0, SUM<-0, NUMA<-1, X<-0
    A4_PRIME    = 3'd1,  // NEXT<-Memory[NEXT], SUM<-SUM+X (X is 0)
    A4_FETCH_X  = 3'd2,  // X<-Memory[NUMA], NUMA<-NEXT+1
    A4_NEXT_SUM = 3'd3,  // NEXT<-Memory[NEXT], SUM<-SUM+X
    A4_LAST_SUM = 3'd4,  // SUM<-SUM+X
    A4_DONE     = 3'd5
  } a4_state_e;

  // Control word of the architecture 4 datapath.
  typedef struct packed {
    logic a_sel;     // address mux: 1 = NUMA, 0 = NEXT
    logic x_sel;     // X mux: 1 = memory data, 0 = constant 0
    logic ld_x;      // clock enable of X
    logic add_sel1;  // adder operand 1: 1 = SUM, 0 = constant 1
    logic add_sel2;  // adder operand 2: 1 = X, 0 = NEXT
    logic sum_sel;   // SUM mux: 1 = adder, 0 = constant 0
    logic ld_sum;    // clock enable of SUM
    logic next_sel;  // NEXT mux (1 = data, 0 = 0) and NUMA mux (1 = adder, 0 = 1)
    logic ld_next;   // clock enable of NEXT
    logic ld_numa;   // clock enable of NUMA
    logic done;      // DONE output
  } a4_ctrl_t;

endpackage
