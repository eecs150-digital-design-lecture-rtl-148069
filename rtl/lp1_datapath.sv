// lp1_datapath: datapath of list-processor Architecture #1 (direct
// implementation of SUM <- SUM + Mem[NEXT+1]; NEXT <- Mem[NEXT]).
//
// Two registers with load enable, NEXT and SUM, and two adders: NEXT+1 for
// the address of the number and SUM+D for the running sum. The address mux
// A_SEL picks NEXT (0) or NEXT+1 (1). NEXT's mux picks the memory data D (1)
// or 0 (0); SUM's mux picks the adder (1) or 0 (0). NEXT_ZERO compares the
// NEXT mux output with zero, so in GET_NEXT it reports whether the pointer
// being loaded is the end of the list. All of this follows the lecture's
// drawing; the widths are its 8 bits and the sum wraps at 2^DATA_W.
// No reset. The memory read is asynchronous, so one transfer per cycle.
// ctl.add_sel is not used: this architecture has no shared adder.
module lp1_datapath
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

  logic [ADDR_W-1:0] next_q, next_d, next_inc;
  logic [DATA_W-1:0] sum_d, sum_add;

  assign next_inc  = next_q + ADDR_W'(1);
  assign mem_a     = ctl.a_sel ? next_inc : next_q;
  assign next_d    = ctl.next_sel ? ADDR_W'(mem_d) : '0;
  assign next_zero = (next_d == '0);
  assign sum_add   = sum + mem_d;
  assign sum_d     = ctl.sum_sel ? sum_add : '0;

  ld_reg #(.W(ADDR_W)) u_next (.clk, .ld(ctl.ld_next), .d(next_d), .q(next_q));
  ld_reg #(.W(DATA_W)) u_sum  (.clk, .ld(ctl.ld_sum),  .d(sum_d),  .q(sum));

endmodule
