// lp4_ctrl: controller of list-processor Architecture #4.
//
// Five states. START (held while start=1) initialises x=0, numa=1, sum=0
// and next=0. The loop alternates GET_NEXT (NEXT <- Mem[NEXT],
// SUM <- SUM + X) and GET_X (X <- Mem[NUMA], NUMA <- NEXT + 1), entered at
// GET_NEXT: with x=0 that first GET_NEXT gives next=Mem[0] and leaves sum=0,
// the loop's initial condition. GET_X looks at NEXT_ZERO: when the pointer
// just loaded is 0, the X fetched in that cycle is the last number and the
// machine goes to FINISH (SUM <- SUM + X, NEXT not loaded), then to DONE,
// two cycles after next became 0. DONE holds done=1 until the next start;
// start=1 in any state returns to START. For n nodes done rises 2n+2 clock
// edges after the edge on which start was sampled as 1: two cycles per
// element plus the two extra states. The lecture gives the schedule, the
// initial values and the two extra states; the state assignment, the
// entry through GET_NEXT and the binary encoding are this design's. No reset.
module lp4_ctrl
  import lp_pkg::*;
(
  input  logic     clk,
  input  logic     start,
  input  logic     next_zero,
  output lp4_ctl_t ctl,
  output logic     done
);

  lp4_state_t state, state_nx;

  always_comb begin
    if (start) state_nx = S4_START;
    else begin
      unique case (state)
        S4_START:    state_nx = S4_GET_NEXT;
        S4_GET_NEXT: state_nx = S4_GET_X;
        S4_GET_X:    state_nx = next_zero ? S4_FINISH : S4_GET_NEXT;
        S4_FINISH:   state_nx = S4_DONE;
        S4_DONE:     state_nx = S4_DONE;
        default:     state_nx = S4_DONE;
      endcase
    end
  end

  always_ff @(posedge clk) state <= state_nx;

  always_comb begin
    ctl  = '0;
    done = 1'b0;
    unique case (state)
      S4_START: begin
        ctl.ld_x     = 1'b1;  // X <- 0     (x_sel = 0)
        ctl.ld_sum   = 1'b1;  // SUM <- 0   (sum_sel = 0)
        ctl.ld_numa  = 1'b1;  // NUMA <- 1  (next_sel = 0)
        ctl.ld_next  = 1'b1;  // NEXT <- 0  (next_sel = 0)
      end
      S4_GET_NEXT: begin
        ctl.a_sel    = 1'b0;  // address = NEXT
        ctl.next_sel = 1'b1;
        ctl.ld_next  = 1'b1;  // NEXT <- D
        ctl.add_sel1 = 1'b1;  // SUM +
        ctl.add_sel2 = 1'b1;  //       X
        ctl.sum_sel  = 1'b1;
        ctl.ld_sum   = 1'b1;
      end
      S4_GET_X: begin
        ctl.a_sel    = 1'b1;  // address = NUMA
        ctl.x_sel    = 1'b1;
        ctl.ld_x     = 1'b1;  // X <- D
        ctl.add_sel1 = 1'b0;  // 1 +
        ctl.add_sel2 = 1'b0;  //     NEXT
        ctl.next_sel = 1'b1;
        ctl.ld_numa  = 1'b1;  // NUMA <- NEXT + 1
      end
      S4_FINISH: begin
        ctl.add_sel1 = 1'b1;
        ctl.add_sel2 = 1'b1;
        ctl.sum_sel  = 1'b1;
        ctl.ld_sum   = 1'b1;  // SUM <- SUM + X
      end
      S4_DONE: done = 1'b1;
      default: done = 1'b1;
    endcase
  end

endmodule
