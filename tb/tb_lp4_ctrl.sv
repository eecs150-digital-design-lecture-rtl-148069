// tb_lp4_ctrl: self-checking test of the Architecture #4 controller. Walks
// START, the GET_NEXT/GET_X loop, the exit on NEXT_ZERO through FINISH to
// DONE, and START from inside the loop, comparing all control outputs with
// the transfers each state must perform:
//   START    X<-0, SUM<-0, NUMA<-1, NEXT<-0
//   GET_NEXT NEXT<-Mem[NEXT], SUM<-SUM+X
//   GET_X    X<-Mem[NUMA], NUMA<-NEXT+1
//   FINISH   SUM<-SUM+X
//   DONE     done=1
module tb_lp4_ctrl;
  import lp_pkg::*;
  logic clk = 1'b0;
  logic start, next_zero, done;
  lp4_ctl_t ctl;
  int checks = 0, failures = 0;

  lp4_ctrl dut (.clk, .start, .next_zero, .ctl, .done);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef enum {E_START, E_GN, E_GX, E_FIN, E_DONE} exp_t;

  task automatic expect_state(input exp_t s);
    lp4_ctl_t e;
    logic     ed;
    e = '0; ed = 1'b0;
    case (s)
      E_START: begin e.ld_x = 1; e.ld_sum = 1; e.ld_numa = 1; e.ld_next = 1; end
      E_GN:    begin e.next_sel = 1; e.ld_next = 1; e.add_sel1 = 1; e.add_sel2 = 1;
                     e.sum_sel = 1; e.ld_sum = 1; end
      E_GX:    begin e.a_sel = 1; e.x_sel = 1; e.ld_x = 1; e.next_sel = 1; e.ld_numa = 1; end
      E_FIN:   begin e.add_sel1 = 1; e.add_sel2 = 1; e.sum_sel = 1; e.ld_sum = 1; end
      E_DONE:  ed = 1'b1;
    endcase
    checks++;
    if (ctl !== e || done !== ed) begin
      failures++;
      $display("state %s: ctl=%b done=%b expected ctl=%b done=%b", s.name(), ctl, done, e, ed);
    end
  endtask

  task automatic step(input logic st, input logic nz);
    @(negedge clk);
    start = st; next_zero = nz;
    @(posedge clk);
    #1;
  endtask

  initial begin
    start = 1'b0; next_zero = 1'b0;
    for (int rep = 0; rep < 20; rep++) begin
      automatic int len = $urandom_range(1, 6);
      step(1, 1'($urandom_range(0, 1))); expect_state(E_START);
      if (rep % 4 == 1) begin step(1, 1); expect_state(E_START); end
      step(0, 1'($urandom_range(0, 1))); expect_state(E_GN);
      for (int k = 1; k <= len; k++) begin
        step(0, 1'($urandom_range(0, 1))); expect_state(E_GX);           // next_zero ignored in GET_NEXT
        if (k == len) begin step(0, 1); expect_state(E_FIN); end
        else          begin step(0, 0); expect_state(E_GN);  end
      end
      step(0, 1'($urandom_range(0, 1))); expect_state(E_DONE);
      step(0, 1'($urandom_range(0, 1))); expect_state(E_DONE);
    end
    step(1, 0); expect_state(E_START);
    step(0, 0); expect_state(E_GN);
    step(0, 0); expect_state(E_GX);
    step(1, 0); expect_state(E_START);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
