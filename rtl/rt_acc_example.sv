// rt_acc_example: a datapath sequenced by a register-transfer program.
//
// Three registers R0, R1 and ACC and four 2-1 muxes S0..S3 run the program
//   ACC <- ACC + R0, R1 <- R0;
//   ACC <- ACC + R1, R0 <- R1;
//   R0  <- ACC;
// (";" separates cycles, "," transfers in the same cycle). Datapath, as the
// lecture draws it: S2 picks R0 (0) or R1 (1) as the adder's second operand;
// ACC loads ACC + S2 output on every clock edge (it has no load enable);
// S3 picks the S2 output (0) or ACC (1); R0 and R1 each have a mux whose
// input 0 is the S3 output and input 1 the register itself (hold). The
// controller only drives S0..S3. A start input (this design's choice; the
// lecture gives no way to begin) runs the three cycles once; busy is 1
// during them. While idle R0 and R1 hold and ACC keeps adding R0. The
// registers have no reset: the program works on whatever they hold.
module rt_acc_example #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         start,
  output logic [W-1:0] r0,
  output logic [W-1:0] r1,
  output logic [W-1:0] acc,
  output logic         busy
);

  typedef enum logic [1:0] {IDLE, STEP1, STEP2, STEP3} step_t;
  step_t step;

  logic s0, s1, s2, s3;
  logic [W-1:0] s2_y, s3_y;

  always_ff @(posedge clk) begin
    unique case (step)
      IDLE:    step <= start ? STEP1 : IDLE;
      STEP1:   step <= STEP2;
      STEP2:   step <= STEP3;
      default: step <= IDLE;
    endcase
  end

  always_comb begin
    // defaults: hold R0 and R1, add R0 into ACC
    s0 = 1'b1; s1 = 1'b1; s2 = 1'b0; s3 = 1'b0;
    unique case (step)
      STEP1: begin s2 = 1'b0; s3 = 1'b0; s1 = 1'b0; end  // ACC+R0, R1<-R0
      STEP2: begin s2 = 1'b1; s3 = 1'b0; s0 = 1'b0; end  // ACC+R1, R0<-R1
      STEP3: begin s3 = 1'b1; s0 = 1'b0; end             // R0<-ACC
      default: ;
    endcase
  end

  assign busy = (step != IDLE);
  assign s2_y = s2 ? r1 : r0;
  assign s3_y = s3 ? acc : s2_y;

  always_ff @(posedge clk) begin
    r0  <= s0 ? r0 : s3_y;
    r1  <= s1 ? r1 : s3_y;
    acc <= acc + s2_y;
  end

endmodule
