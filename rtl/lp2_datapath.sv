// lp2_datapath: datapath of list-processor Architecture #2.
//
// Adds register NUMA, the address of the number to add, so that the +1 add
// moves from COMPUTE_SUM into GET_NEXT:
//   COMPUTE_SUM: SUM <- SUM + Mem[NUMA]
//   GET_NEXT:    NUMA <- Mem[NEXT] + 1, NEXT <- Mem[NEXT]
// As drawn in the lecture, NUMA's mux shares NEXT_SEL (1 = D+1, 0 = the
// constant 1) and NUMA loads with LD_NEXT, so START sets NUMA to 1 while it
// clears NEXT. A_SEL picks NEXT (0) or NUMA (1). NEXT_ZERO compares the NEXT
// mux output with zero. Same controller and timing as Architecture #1 (two
// cycles per element), shorter critical path. No reset. ctl.add_sel is not
// used: this architecture has no shared adder.
module lp2_datapath
  import lp_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  lp_ctl_t           ctl,
  output logic [ADDR_W-1:0] mem_a,
  input  logic [DATA_W-1:0] mem_d,
  output logic              next_zero,
  output logic [DATA_W-1:0] sum
);

  logic [ADDR_W-1:0] next_q, next_d, numa_q, numa_d, d_inc;
  logic [DATA_W-1:0] sum_d, sum_add;

  assign d_inc     = ADDR_W'(mem_d) + ADDR_W'(1);
  assign mem_a     = ctl.a_sel ? numa_q : next_q;
  assign next_d    = ctl.next_sel ? ADDR_W'(mem_d) : '0;
  assign numa_d    = ctl.next_sel ? d_inc : ADDR_W'(1);
  assign next_zero = (next_d == '0);
  assign sum_add   = sum + mem_d;
  assign sum_d     = ctl.sum_sel ? sum_add : '0;

  ld_reg #(.W(ADDR_W)) u_next (.clk, .ld(ctl.ld_next), .d(next_d), .q(next_q));
  ld_reg #(.W(ADDR_W)) u_numa (.clk, .ld(ctl.ld_next), .d(numa_d), .q(numa_q));
  ld_reg #(.W(DATA_W)) u_sum  (.clk, .ld(ctl.ld_sum),  .d(sum_d),  .q(sum));

endmodule
