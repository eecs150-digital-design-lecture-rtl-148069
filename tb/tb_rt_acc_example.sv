// tb_rt_acc_example: self-checking test of the R0/R1/ACC register-transfer
// example. The registers start from arbitrary values; the testbench reads
// them while idle and applies the program itself,
//   ACC <- ACC + R0, R1 <- R0;  ACC <- ACC + R1, R0 <- R1;  R0 <- ACC;
// plus the idle behaviour (R0, R1 hold, ACC <- ACC + R0), checking all three
// registers and busy after every cycle, for several runs back to back.
module tb_rt_acc_example;
  localparam int W = 8;
  logic clk = 1'b0;
  logic start, busy;
  logic [W-1:0] r0, r1, acc;
  logic [W-1:0] e0, e1, ea, t0, t1, ta;
  int checks = 0, failures = 0;

  rt_acc_example #(.W(W)) dut (.clk, .start, .r0, .r1, .acc, .busy);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what, input logic eb);
    checks++;
    if (r0 !== e0 || r1 !== e1 || acc !== ea || busy !== eb) begin
      failures++;
      $display("%s: r0=%h r1=%h acc=%h busy=%b expected %h %h %h %b",
               what, r0, r1, acc, busy, e0, e1, ea, eb);
    end
  endtask

  initial begin
    start = 1'b0;
    // let the controller settle into idle
    repeat (6) @(negedge clk);
    for (int run = 0; run < 30; run++) begin
      automatic int idle = $urandom_range(0, 3);
      e0 = r0; e1 = r1; ea = acc;
      for (int i = 0; i < idle; i++) begin
        @(negedge clk);
        ea = ea + e0;
        compare("idle", 1'b0);
      end
      start = 1'b1;
      @(negedge clk);                  // idle cycle that samples start
      start = 1'b0;
      ea = ea + e0;
      compare("start", 1'b1);
      @(negedge clk);                  // ACC <- ACC + R0, R1 <- R0
      t1 = e0; ta = ea + e0; e1 = t1; ea = ta;
      compare("step1", 1'b1);
      @(negedge clk);                  // ACC <- ACC + R1, R0 <- R1
      t0 = e1; ta = ea + e1; e0 = t0; ea = ta;
      compare("step2", 1'b1);
      @(negedge clk);                  // R0 <- ACC
      t0 = ea; ta = ea + e0; e0 = t0; ea = ta;
      compare("step3", 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
