// list_mem: single-ported memory that holds the linked list.
//
// 2^ADDR_W words of DATA_W bits (256 x 8 by default, the 8-bit address and
// data ports of the problem statement). One address port a serves both
// directions: reads are asynchronous (d follows a combinationally, as the
// component library's "asynchronous read" memory), and a write of wd at a
// happens on the rising clock edge when we is 1. The write port is this
// design's addition so the list can be loaded; the contents have no reset.
module list_mem #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] a,
  output logic [DATA_W-1:0] d,
  input  logic              we,
  input  logic [DATA_W-1:0] wd
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk)
    if (we) mem[a] <= wd;

  assign d = mem[a];

endmodule
