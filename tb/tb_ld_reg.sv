// tb_ld_reg: self-checking test of the load-enable register. Random data and
// load patterns; the expected output is kept by the testbench from the rule
// "q takes d on a clock edge with ld=1, else keeps its value".
module tb_ld_reg;
  localparam int W = 8;
  logic clk = 1'b0;
  logic ld;
  logic [W-1:0] d, q, exp_q;
  int checks = 0, failures = 0;
  bit known = 1'b0;

  ld_reg #(.W(W)) dut (.clk, .ld, .d, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld = 1'b1; d = 8'h5a;
    @(negedge clk);
    exp_q = 8'h5a; known = 1'b1;
    for (int i = 0; i < 500; i++) begin
      ld = ($urandom_range(0, 2) == 0);
      d  = W'($urandom);
      @(posedge clk);
      if (ld) exp_q = d;
      @(negedge clk);
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("mismatch at %0d: q=%h expected %h", i, q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
