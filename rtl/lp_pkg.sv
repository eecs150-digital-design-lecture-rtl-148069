// lp_pkg: types shared by the linked-list summing processors.
//
// The list processor adds the 8-bit two's-complement numbers held in a
// linked list that starts at memory address 0. Each node is two bytes: the
// pointer to the next node at address p and the number at address p+1; the
// last node's pointer is 0. The controller of Architectures #1-#3 and the
// controller of Architecture #4 drive their datapaths through the control
// bundles declared here. Signal names follow the datapath drawings
// (LD_SUM, SUM_SEL, LD_NEXT, NEXT_SEL, A_SEL, ADD_SEL, X_SEL, LD_X,
// ADD_SEL1, ADD_SEL2, LD_NUMA). The Architecture #1-#3 controller is one-hot
// as in the lecture; the binary encoding of the Architecture #4 controller
// is this design's choice.
package lp_pkg;

  // Controls of Architectures #1, #2 and #3 (add_sel is used by #3 only).
  typedef struct packed {
    logic ld_sum;    // load SUM
    logic sum_sel;   // SUM mux: 1 = adder, 0 = constant 0
    logic ld_next;   // load NEXT (and NUMA in #2/#3)
    logic next_sel;  // NEXT mux: 1 = memory data, 0 = constant 0
    logic a_sel;     // address mux: 0 = NEXT, 1 = NEXT+1 (#1) or NUMA (#2/#3)
    logic add_sel;   // shared-adder operand: 1 = SUM, 0 = constant 1 (#3)
  } lp_ctl_t;

  // One-hot state of the Architecture #1-#3 controller: bit positions.
  typedef enum int unsigned {
    OH_START       = 0,
    OH_COMPUTE_SUM = 1,
    OH_GET_NEXT    = 2,
    OH_DONE        = 3
  } lp_state_bit_t;

  // Controls of Architecture #4.
  typedef struct packed {
    logic x_sel;     // X mux: 1 = memory data, 0 = constant 0
    logic ld_x;      // load X
    logic add_sel1;  // adder operand 1: 1 = SUM, 0 = constant 1
    logic add_sel2;  // adder operand 2: 1 = X, 0 = NEXT
    logic sum_sel;   // SUM mux: 1 = adder, 0 = constant 0
    logic ld_sum;    // load SUM
    logic next_sel;  // NEXT mux 1 = memory data / 0 = 0; NUMA mux 1 = adder / 0 = 1
    logic ld_next;   // load NEXT
    logic ld_numa;   // load NUMA
    logic a_sel;     // address mux: 0 = NEXT, 1 = NUMA
  } lp4_ctl_t;

  typedef enum logic [2:0] {
    S4_START    = 3'd0,  // x=0, numa=1, sum=0, next=0
    S4_GET_NEXT = 3'd1,  // NEXT <- Mem[NEXT], SUM <- SUM + X
    S4_GET_X    = 3'd2,  // X <- Mem[NUMA], NUMA <- NEXT + 1
    S4_FINISH   = 3'd3,  // SUM <- SUM + X (last number)
    S4_DONE     = 3'd4
  } lp4_state_t;

endpackage
