// lp4_datapath: datapath of list-processor Architecture #4.
//
// The loop is rescheduled so that no cycle has a memory read feeding an add:
//   GET_X:    X <- Mem[NUMA], NUMA <- NEXT + 1
//   GET_NEXT: NEXT <- Mem[NEXT], SUM <- SUM + X
// Each cycle does one memory access and one independent add, so the clock
// period is max(memory, adder) rather than their sum, and up to three list
// elements are in flight (the pointer of one, the number of the previous,
// the add of the one before). Structure, as the lecture draws it:
//   X      <- X_SEL ? D : 0,                      load LD_X
//   adder  =  (ADD_SEL1 ? SUM : 1) + (ADD_SEL2 ? X : NEXT)
//   SUM    <- SUM_SEL ? adder : 0,                load LD_SUM
//   NUMA   <- NEXT_SEL ? adder : 1,               load LD_NUMA
//   NEXT   <- NEXT_SEL ? D : 0,                   load LD_NEXT
//   A      =  A_SEL ? NUMA : NEXT
//   NEXT_ZERO = (NEXT register == 0)
// The one adder produces both sums and addresses, so ADDR_W must equal
// DATA_W. No reset; asynchronous memory read.
module lp4_datapath
  import lp_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  lp4_ctl_t          ctl,
  output logic [ADDR_W-1:0] mem_a,
  input  logic [DATA_W-1:0] mem_d,
  output logic              next_zero,
  output logic [DATA_W-1:0] sum
);

  logic [ADDR_W-1:0] next_q, next_d, numa_q, numa_d;
  logic [DATA_W-1:0] x_q, x_d, sum_d, add_a, add_b, add_y;

  assign x_d       = ctl.x_sel ? mem_d : '0;
  assign add_a     = ctl.add_sel1 ? sum : DATA_W'(1);
  assign add_b     = ctl.add_sel2 ? x_q : DATA_W'(next_q);
  assign add_y     = add_a + add_b;
  assign sum_d     = ctl.sum_sel ? add_y : '0;
  assign numa_d    = ctl.next_sel ? ADDR_W'(add_y) : ADDR_W'(1);
  assign next_d    = ctl.next_sel ? ADDR_W'(mem_d) : '0;
  assign mem_a     = ctl.a_sel ? numa_q : next_q;
  assign next_zero = (next_q == '0);

  ld_reg #(.W(DATA_W)) u_x    (.clk, .ld(ctl.ld_x),    .d(x_d),    .q(x_q));
  ld_reg #(.W(DATA_W)) u_sum  (.clk, .ld(ctl.ld_sum),  .d(sum_d),  .q(sum));
  ld_reg #(.W(ADDR_W)) u_numa (.clk, .ld(ctl.ld_numa), .d(numa_d), .q(numa_q));
  ld_reg #(.W(ADDR_W)) u_next (.clk, .ld(ctl.ld_next), .d(next_d), .q(next_q));

endmodule
