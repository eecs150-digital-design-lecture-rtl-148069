// lp_ctrl: controller of list-processor Architectures #1, #2 and #3.
//
// Four states run the register-transfer program
//   START:       NEXT <- 0, SUM <- 0 (and NUMA <- 1 in #2/#3)
//   COMPUTE_SUM: SUM <- SUM + Mem[NEXT+1]   (Mem[NUMA] in #2/#3)
//   GET_NEXT:    NEXT <- Mem[NEXT]          (NUMA <- Mem[NEXT]+1 in #2/#3)
//   DONE:        R = SUM, DONE = 1
// START=1 sends the machine to START from any state and holds it there.
// With START=0 it goes START -> COMPUTE_SUM -> GET_NEXT and from GET_NEXT
// back to COMPUTE_SUM while NEXT_ZERO=0, or to DONE when NEXT_ZERO=1; DONE
// waits for the next START. As in the lecture's controller the state is
// one-hot, one flip-flop per state: the START flip-flop takes the START
// input itself and every other flip-flop is gated by START=0, so a single
// START cycle leaves exactly one bit set whatever the flip-flops held
// before. There is no other reset. Each output is the OR of the states the
// state diagram prints it as 1 in; outputs a state does not list are 0.
// ADD_SEL (Architecture #3's shared adder) is 1 in COMPUTE_SUM, a choice
// forced by the transfers. Moore outputs; two cycles per list element.
module lp_ctrl
  import lp_pkg::*;
(
  input  logic    clk,
  input  logic    start,
  input  logic    next_zero,
  output lp_ctl_t ctl,
  output logic    done
);

  logic [3:0] st, st_nx;

  always_comb begin
    st_nx[OH_START]       = start;
    st_nx[OH_COMPUTE_SUM] = !start && (st[OH_START] || (st[OH_GET_NEXT] && !next_zero));
    st_nx[OH_GET_NEXT]    = !start && st[OH_COMPUTE_SUM];
    st_nx[OH_DONE]        = !start && (st[OH_DONE] || (st[OH_GET_NEXT] && next_zero));
  end

  always_ff @(posedge clk) st <= st_nx;

  always_comb begin
    ctl.ld_sum   = st[OH_START] || st[OH_COMPUTE_SUM];
    ctl.sum_sel  = st[OH_COMPUTE_SUM];
    ctl.a_sel    = st[OH_COMPUTE_SUM];
    ctl.add_sel  = st[OH_COMPUTE_SUM];
    ctl.ld_next  = st[OH_START] || st[OH_GET_NEXT];
    ctl.next_sel = st[OH_GET_NEXT];
    done         = st[OH_DONE];
  end

  // START leaves the state one-hot, and the transitions keep it one-hot.
  a_start_onehot: assert property (@(posedge clk) start |=> $onehot(st))
    else $error("lp_ctrl: state %b is not one-hot after START", st);
  a_keep_onehot: assert property (@(posedge clk) $onehot(st) |=> $onehot(st))
    else $error("lp_ctrl: state %b lost its one-hot form", st);

endmodule
