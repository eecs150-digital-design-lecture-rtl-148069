// ld_reg: n-bit register with load enable.
//
// On a rising clock edge the register takes d when ld is 1 and keeps its
// value when ld is 0 (a 2-1 multiplexer, input 1 = new data, input 0 = the
// register's own output, in front of a plain register). As in the lecture's
// component library there is no reset input: the contents are whatever was
// last loaded. Timing: q changes one clock edge after ld=1 is seen.
module ld_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         ld,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk)
    if (ld) q <= d;

endmodule
