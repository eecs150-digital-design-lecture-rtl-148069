// tb_rt_abc_example: self-checking test of the regA/regB/regC
// register-transfer example. Feeds random IN values, runs the program
//   regA <- IN; regB <- IN; regC <- regA + regB; regB <- regC;
// and checks the three registers after each cycle, and that they hold while
// idle.
module tb_rt_abc_example;
  localparam int W = 8;
  logic clk = 1'b0;
  logic start, busy;
  logic [W-1:0] in_data, rega, regb, regc;
  logic [W-1:0] ea, eb, ec;
  int checks = 0, failures = 0;

  rt_abc_example #(.W(W)) dut (.clk, .start, .in_data, .rega, .regb, .regc, .busy);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what, input logic ebusy);
    checks++;
    if (rega !== ea || regb !== eb || regc !== ec || busy !== ebusy) begin
      failures++;
      $display("%s: a=%h b=%h c=%h busy=%b expected %h %h %h %b",
               what, rega, regb, regc, busy, ea, eb, ec, ebusy);
    end
  endtask

  initial begin
    start = 1'b0; in_data = '0;
    repeat (6) @(negedge clk);
    for (int run = 0; run < 40; run++) begin
      ea = rega; eb = regb; ec = regc;
      repeat ($urandom_range(0, 2)) begin
        in_data = W'($urandom);
        @(negedge clk);
        compare("idle", 1'b0);
      end
      start = 1'b1; in_data = W'($urandom);
      @(negedge clk);
      start = 1'b0;
      compare("start", 1'b1);
      in_data = W'($urandom);
      @(negedge clk); ea = in_data;            compare("regA<-IN", 1'b1);
      in_data = W'($urandom);
      @(negedge clk); eb = in_data;            compare("regB<-IN", 1'b1);
      in_data = W'($urandom);
      @(negedge clk); ec = ea + eb;            compare("regC<-A+B", 1'b1);
      in_data = W'($urandom);
      @(negedge clk); eb = ec;                 compare("regB<-regC", 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
