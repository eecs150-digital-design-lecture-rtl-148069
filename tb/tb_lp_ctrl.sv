// tb_lp_ctrl: self-checking test of the controller of list-processor
// Architectures #1-#3. Walks the state diagram (START, COMPUTE_SUM,
// GET_NEXT, DONE, the NEXT_ZERO branch and START from every state) and
// compares every control output with the values printed for each state.
module tb_lp_ctrl;
  import lp_pkg::*;
  logic clk = 1'b0;
  logic start, next_zero, done;
  lp_ctl_t ctl;
  int checks = 0, failures = 0;

  lp_ctrl dut (.clk, .start, .next_zero, .ctl, .done);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef enum {E_START, E_CS, E_GN, E_DONE} exp_t;

  // {ld_sum, sum_sel, ld_next, next_sel, a_sel, add_sel}, done
  task automatic expect_state(input exp_t s);
    lp_ctl_t e;
    logic    ed;
    e = '0; ed = 1'b0;
    case (s)
      E_START: begin e.ld_sum = 1; e.ld_next = 1; end
      E_CS:    begin e.a_sel = 1; e.ld_sum = 1; e.sum_sel = 1; e.add_sel = 1; end
      E_GN:    begin e.ld_next = 1; e.next_sel = 1; end
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
      if (rep % 3 == 0) begin step(1, 0); expect_state(E_START); end  // START held
      step(0, 1'($urandom_range(0, 1))); expect_state(E_CS);
      for (int k = 1; k <= len; k++) begin
        step(0, 1'($urandom_range(0, 1))); expect_state(E_GN);            // next_zero ignored in CS
        if (k == len) begin step(0, 1); expect_state(E_DONE); end
        else          begin step(0, 0); expect_state(E_CS);   end
      end
      step(0, 1'($urandom_range(0, 1))); expect_state(E_DONE);            // waits in DONE
      step(0, 0);                    expect_state(E_DONE);
    end
    // START from COMPUTE_SUM and from GET_NEXT
    step(1, 0); expect_state(E_START);
    step(0, 0); expect_state(E_CS);
    step(1, 0); expect_state(E_START);
    step(0, 0); expect_state(E_CS);
    step(0, 0); expect_state(E_GN);
    step(1, 1); expect_state(E_START);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
