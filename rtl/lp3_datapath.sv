// lp3_datapath: datapath of list-processor Architecture #3.
//
// Architecture #2 with its two adders merged into one: since each cycle
// performs only one add, a mux ADD_SEL picks the second operand of the
// memory data D, SUM (1, in COMPUTE_SUM) or the constant 1 (0, in
// GET_NEXT). The adder output feeds both SUM's mux (input 1) and NUMA's mux
// (input 1). Everything else (NEXT, NUMA, the shared NEXT_SEL and LD_NEXT,
// A_SEL, NEXT_ZERO on the NEXT mux output) is as in Architecture #2 and as
// the lecture draws it. ADDR_W must equal DATA_W because the one adder
// produces both a sum and an address. Two cycles per element. No reset.
module lp3_datapath
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

  logic [ADDR_W-1:0] next_q, next_d, numa_q, numa_d;
  logic [DATA_W-1:0] sum_d, add_a, add_y;

  assign add_a     = ctl.add_sel ? sum : DATA_W'(1);
  assign add_y     = add_a + mem_d;
  assign mem_a     = ctl.a_sel ? numa_q : next_q;
  assign next_d    = ctl.next_sel ? ADDR_W'(mem_d) : '0;
  assign numa_d    = ctl.next_sel ? ADDR_W'(add_y) : ADDR_W'(1);
  assign next_zero = (next_d == '0);
  assign sum_d     = ctl.sum_sel ? add_y : '0;

  ld_reg #(.W(ADDR_W)) u_next (.clk, .ld(ctl.ld_next), .d(next_d), .q(next_q));
  ld_reg #(.W(ADDR_W)) u_numa (.clk, .ld(ctl.ld_next), .d(numa_d), .q(numa_q));
  ld_reg #(.W(DATA_W)) u_sum  (.clk, .ld(ctl.ld_sum),  .d(sum_d),  .q(sum));

endmodule
