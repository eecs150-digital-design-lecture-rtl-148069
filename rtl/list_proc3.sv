// list_proc3: linked-list summing processor, Architecture #3: Architecture #2 with one adder shared between the sum
// (COMPUTE_SUM) and the address increment (GET_NEXT) through the ADD_SEL mux.
//
// The processor sums the DATA_W-bit two's-complement numbers of a linked
// list that starts at address 0 of an external single-ported memory (node =
// pointer at p, number at p+1, last pointer 0, at least one node). Pulse or
// hold start=1 to restart from the head of the list; after start returns to
// 0 the machine spends two cycles per node (COMPUTE_SUM, GET_NEXT) and then
// raises done, with the sum on r, until the next start. For n nodes done
// rises 2n+1 clock edges after the edge on which start was sampled as 1.
// Interface: mem_a drives the memory address, mem_d is its asynchronous
// read data. The controller is lp_ctrl, shared with the other two of
// Architectures #1-#3; the datapath is lp3_datapath.
module list_proc3
  import lp_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              start,
  output logic [ADDR_W-1:0] mem_a,
  input  logic [DATA_W-1:0] mem_d,
  output logic              done,
  output logic [DATA_W-1:0] r
);

  lp_ctl_t ctl;
  logic    next_zero;

  lp_ctrl u_ctrl (.clk, .start, .next_zero, .ctl, .done);

  lp3_datapath #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_dp (
    .clk, .ctl, .mem_a, .mem_d, .next_zero, .sum(r)
  );

endmodule
