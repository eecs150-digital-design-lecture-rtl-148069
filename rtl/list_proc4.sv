// list_proc4: linked-list summing processor, Architecture #4 (pipelined
// schedule with the extra register X).
//
// Sums the DATA_W-bit two's-complement numbers of a linked list that starts
// at address 0 of an external single-ported memory (node = pointer at p,
// number at p+1, last pointer 0, at least one node). Every cycle makes one
// memory access and one add that do not depend on each other, so the clock
// can run at max(memory, adder) delay. Pulse or hold start=1 to restart;
// after start returns to 0 done rises 2n+2 clock edges (for n nodes) after
// the edge on which start was sampled, with the sum on r, and stays until
// the next start. mem_a/mem_d connect to the asynchronous-read memory.
// Controller lp4_ctrl, datapath lp4_datapath.
module list_proc4
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

  lp4_ctl_t ctl;
  logic     next_zero;

  lp4_ctrl u_ctrl (.clk, .start, .next_zero, .ctl, .done);

  lp4_datapath #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_dp (
    .clk, .ctl, .mem_a, .mem_d, .next_zero, .sum(r)
  );

endmodule
