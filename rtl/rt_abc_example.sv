// rt_abc_example: datapath and controller derived from a register-transfer
// program.
//
// The program (one transfer per cycle)
//   regA <- IN;  regB <- IN;  regC <- regA + regB;  regB <- regC;
// implies the datapath built here: IN fans out to regA and regB, regA and
// regB feed an adder whose output goes to regC, and regB takes its input
// from a mux that selects IN (0) or regC (1). Each register has a load
// enable (ld_reg). The controller is a counter-like FSM: on start it runs
// the four steps in consecutive cycles, sampling in_data in the first two,
// then returns to idle; busy is 1 during the four steps. The start input,
// the state encoding and the width are this design's choices. No reset of
// the registers; the controller leaves them alone while idle.
module rt_abc_example #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         start,
  input  logic [W-1:0] in_data,
  output logic [W-1:0] rega,
  output logic [W-1:0] regb,
  output logic [W-1:0] regc,
  output logic         busy
);

  typedef enum logic [2:0] {IDLE, LOAD_A, LOAD_B, ADD_C, COPY_B} step_t;
  step_t step;

  logic ld_a, ld_b, ld_c, b_sel;
  logic [W-1:0] b_d, sum;

  always_ff @(posedge clk) begin
    unique case (step)
      IDLE:    step <= start ? LOAD_A : IDLE;
      LOAD_A:  step <= LOAD_B;
      LOAD_B:  step <= ADD_C;
      ADD_C:   step <= COPY_B;
      default: step <= IDLE;
    endcase
  end

  always_comb begin
    ld_a = (step == LOAD_A);
    ld_b = (step == LOAD_B) || (step == COPY_B);
    ld_c = (step == ADD_C);
    b_sel = (step == COPY_B);
  end

  assign busy = (step != IDLE);
  assign sum  = rega + regb;
  assign b_d  = b_sel ? regc : in_data;

  ld_reg #(.W(W)) u_a (.clk, .ld(ld_a), .d(in_data), .q(rega));
  ld_reg #(.W(W)) u_b (.clk, .ld(ld_b), .d(b_d),     .q(regb));
  ld_reg #(.W(W)) u_c (.clk, .ld(ld_c), .d(sum),     .q(regc));

endmodule
