// tb_list_mem: self-checking test of the single-ported list memory. Writes
// every address with a value derived from the address, reads it back
// asynchronously (data valid in the same cycle as the address), then
// overwrites random addresses and checks them against a shadow copy.
module tb_list_mem;
  localparam int AW = 8, DW = 8;
  logic clk = 1'b0;
  logic [AW-1:0] a;
  logic [DW-1:0] d, wd;
  logic we;
  logic [DW-1:0] shadow [2**AW];
  int checks = 0, failures = 0;

  list_mem #(.ADDR_W(AW), .DATA_W(DW)) dut (.clk, .a, .d, .we, .wd);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(input logic [AW-1:0] addr);
    a = addr; we = 1'b0;
    #1;
    checks++;
    if (d !== shadow[addr]) begin
      failures++;
      $display("read %h: got %h expected %h", addr, d, shadow[addr]);
    end
  endtask

  initial begin
    we = 1'b0; a = '0; wd = '0;
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      a = AW'(i); wd = DW'(i * 37 + 11); we = 1'b1;
      shadow[i] = DW'(i * 37 + 11);
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < 2**AW; i++) check_read(AW'(i));
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 1) == 1) begin
        a = AW'($urandom); wd = DW'($urandom); we = 1'b1;
        shadow[a] = wd;
      end else begin
        check_read(AW'($urandom));
      end
    end
    @(negedge clk);
    for (int i = 0; i < 2**AW; i++) check_read(AW'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
