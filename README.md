# Linked-list summing processor, four ways

This RTL builds one small problem at four levels of optimisation. The problem is to
walk a linked list in memory and add up the numbers it holds. The point is how the
same job can be rescheduled across a few registers, one memory port and one or two
adders to shorten the clock period or remove hardware. Two smaller examples sit next to
it. Each shows how a register-transfer program turns into a datapath plus a controller.

All code is synthesizable SystemVerilog (IEEE 1800-2017) with self-checking testbenches.

## The problem

A memory with an 8-bit address port and an 8-bit data port holds a singly linked list:

```
 address p   : pointer to the next node (0 = this is the last node)
 address p+1 : the number, 8-bit two's complement
```

The first node is always at address 0, and the list has at least one node. Nodes may
sit at any address, odd ones included. A number's address is `p+1` computed in 8 bits, so
it wraps. The memory has one port and an asynchronous read: data follows the address in
the same cycle, so each cycle allows exactly one read. That single port is what makes the
algorithm sequential.

Interface of every processor (`list_proc1` … `list_proc4`):

| port    | dir | width  | meaning |
|---------|-----|--------|---------|
| `start` | in  | 1      | restart from the head of the list; may be held for several cycles |
| `mem_a` | out | ADDR_W | memory address |
| `mem_d` | in  | DATA_W | memory read data (combinational) |
| `done`  | out | 1      | result valid; stays 1 until the next `start` |
| `r`     | out | DATA_W | the sum, modulo 2^8 |

There is no reset input anywhere in the datapaths. The registers are plain load-enable
registers (`ld_reg`), and `start` is the only initialisation. Before the first `start`,
`done` and `r` mean nothing.

The reference algorithm, in register-transfer notation (`,` = same cycle, `;` = next
cycle):

```
if (START) NEXT <- 0, SUM <- 0;
repeat {
    SUM  <- SUM + Mem[NEXT+1];
    NEXT <- Mem[NEXT];
} until (NEXT == 0);
R <- SUM, DONE <- 1;
```

## Architectures #1 to #3: one controller, three datapaths

All three use the same controller, `lp_ctrl`. It has four states, START, COMPUTE_SUM,
GET_NEXT and DONE, so a list element takes two cycles. The state is one-hot, with one
flip-flop per state:

* START's flip-flop takes the `start` input directly. Every other flip-flop is gated by
  `start = 0`. One cycle of `start` therefore leaves exactly one bit set, whatever the
  flip-flops held at power-up. Two assertions check that the state stays one-hot.
* START goes to COMPUTE_SUM, then GET_NEXT. GET_NEXT goes back to COMPUTE_SUM while
  NEXT_ZERO = 0 and to DONE when it is 1. DONE waits for `start`.

| state       | LD_SUM | SUM_SEL | LD_NEXT | NEXT_SEL | A_SEL | ADD_SEL | DONE |
|-------------|:------:|:-------:|:-------:|:--------:|:-----:|:-------:|:----:|
| START       | 1 | 0 | 1 | 0 | 0 | 0 | 0 |
| COMPUTE_SUM | 1 | 1 | 0 | 0 | 1 | 1 | 0 |
| GET_NEXT    | 0 | 0 | 1 | 1 | 0 | 0 | 0 |
| DONE        | 0 | 0 | 0 | 0 | 0 | 0 | 1 |

The three datapaths are:

* **#1, direct (`lp1_datapath`).** Registers NEXT and SUM, and two adders: `NEXT+1`
  forms the number's address, `SUM+D` the running sum. In COMPUTE_SUM the critical path
  is the 8-bit increment, then the memory, then the sum adder, all in series. With
  NEXT_ZERO as drawn, the zero test looks at the value being loaded into NEXT, so GET_NEXT
  already knows whether the pointer it just read ends the list.
* **#2, NUMA register (`lp2_datapath`).** A third register, NUMA, holds the address of the
  next number. It is loaded in GET_NEXT with `Mem[NEXT]+1`, alongside NEXT. This moves the
  increment out of COMPUTE_SUM and into the otherwise idle GET_NEXT. NUMA shares NEXT's
  select and load signals, so START sets NUMA to 1 while it clears NEXT.
* **#3, shared adder (`lp3_datapath`).** Each cycle of #2 now does only one add, so one
  adder serves both. ADD_SEL picks SUM (in COMPUTE_SUM) or the constant 1 (in GET_NEXT)
  as the operand added to the memory data. The adder's output feeds both SUM and NUMA.

Latency: `done` rises **2n+1** clock edges after the edge that samples `start = 1`, for
an n-node list.

Expected clock periods, using the delays of a simple component library (register
clk-to-Q and setup 0.5 ns each, 2:1 mux 1 ns, n-bit adder 2·log2(n)+2 ns, memory read
10 ns):

| architecture | critical path | period |
|---|---|---|
| #1 | COMPUTE_SUM: increment, memory, add | > 31 ns |
| #2, #3 | memory read, then add | > 23 ns |
| #4 | memory read or add, never both | > 14 ns |

These figures are estimates from that library, not the result of synthesis.

## Architecture #4: overlapping loop iterations

This is the part of the design that needs the most care.

In #1 to #3 every cycle reads memory and then adds the data it read, so the period is
`T_mem + T_add`. Architecture #4 adds a register **X** that holds a fetched number for
one cycle. The loop is then rescheduled so that no cycle adds a value read in that same
cycle:

```
GET_X:    X <- Mem[NUMA],    NUMA <- NEXT + 1
GET_NEXT: NEXT <- Mem[NEXT], SUM  <- SUM + X
```

Each cycle's memory access and add are independent, so the period becomes
`max(T_mem, T_add)`. Up to three elements are in flight at once:

* the pointer of element k+1 is being read;
* the number of element k has been read into X;
* element k−1 is already in SUM.

The cost is one more register and a few muxes. The datapath (`lp4_datapath`) uses one
adder with two operand muxes:

```
adder = (ADD_SEL1 ? SUM : 1) + (ADD_SEL2 ? X : NEXT)
X    <- X_SEL    ? D     : 0         (LD_X)
SUM  <- SUM_SEL  ? adder : 0         (LD_SUM)
NUMA <- NEXT_SEL ? adder : 1         (LD_NUMA)
NEXT <- NEXT_SEL ? D     : 0         (LD_NEXT)
A     = A_SEL ? NUMA : NEXT
NEXT_ZERO = (NEXT register == 0)
```

### Controller `lp4_ctrl`

| state    | transfers                           | next state |
|----------|-------------------------------------|-----------|
| START    | X←0, NUMA←1, SUM←0, NEXT←0          | GET_NEXT |
| GET_NEXT | NEXT←Mem[NEXT], SUM←SUM+X            | GET_X |
| GET_X    | X←Mem[NUMA], NUMA←NEXT+1             | FINISH if NEXT_ZERO, else GET_NEXT |
| FINISH   | SUM←SUM+X                            | DONE |
| DONE     | `done`=1                             | DONE (START on `start`) |

How the loop starts and stops:

* **Entry.** The loop's initial condition is `x=0, numa=1, sum=0, next=Mem[0]`. The
  address mux has no constant-0 input, so `Mem[0]` cannot be read in the START cycle.
  Instead START clears NEXT, and the loop is entered at GET_NEXT. With X = 0 that first
  GET_NEXT loads `Mem[0]` and leaves SUM at 0, which is exactly the initial condition.
* **Exit.** NEXT_ZERO looks at the NEXT register. GET_X runs with NEXT = 0 when the
  pointer just read ends the list. That GET_X fetches the last number, FINISH adds it, and
  DONE follows, two cycles after NEXT became 0.

Latency: `done` rises **2n+2** edges after `start` is sampled. That is still two cycles
per element, plus the two extra states. The state is binary-encoded, and unused codes go
to DONE.

## Register-transfer examples

* **`rt_acc_example`** has registers R0, R1 and ACC and muxes S0–S3, and runs
  `ACC←ACC+R0, R1←R0; ACC←ACC+R1, R0←R1; R0←ACC;`.
  * S2 feeds R0 or R1 to the adder. S3 picks that value or ACC as the source for R0 and
    R1, each of which otherwise holds its value.
  * ACC has no load enable, so it adds R0 on every idle cycle.
  * A `start` input runs the three steps once, and `busy` is high during them.
  * Because step 1 copies R0 into R1, step 2's `R0←R1` changes nothing and ACC ends up
    adding R0 twice. That is a property of the program itself, not of this RTL.
* **`rt_abc_example`** runs `regA←IN; regB←IN; regC←regA+regB; regB←regC;`.
  * IN goes to both regA and regB, an adder feeds regC, and regB has a mux that selects
    IN or regC.
  * The program runs once per `start`, with IN sampled in its first two cycles.

## Top level `lecture25_top`

The top places the four processors side by side, each with its own 256×8 `list_mem`, and
the two register-transfer examples next to them. All four processors share `start`, so
they run the same list at the same time and their results and latencies can be compared.

* **Loading a list.** The host port (`host_we`, `host_addr`, `host_wdata`) writes one byte
  per cycle into all four memories at once. While `host_we` is 1 the host address
  replaces the processors' address on each single-ported memory. Load only while the
  processors are idle.
* **Outputs.** `done[i]` and `r[i]` belong to Architecture #(i+1). The two examples have
  their own `acc_*` and `abc_*` ports.

Parameters: `DATA_W = ADDR_W = 8` on the processors and the top; `W = 8` on the examples.
Architectures #3 and #4 need `ADDR_W == DATA_W`, because one adder makes both sums and
addresses.

## Files

| file | contents |
|---|---|
| `rtl/lp_pkg.sv` | control-bundle structs, state encodings |
| `rtl/ld_reg.sv` | register with load enable |
| `rtl/list_mem.sv` | single-port memory: asynchronous read, synchronous write |
| `rtl/lp_ctrl.sv`, `rtl/lp{1,2,3}_datapath.sv`, `rtl/list_proc{1,2,3}.sv` | Architectures #1–#3 |
| `rtl/lp4_ctrl.sv`, `rtl/lp4_datapath.sv`, `rtl/list_proc4.sv` | Architecture #4 |
| `rtl/rt_acc_example.sv`, `rtl/rt_abc_example.sv` | register-transfer examples |
| `rtl/lecture25_top.sv` | top |
| `tb/tb_*.sv` | one self-checking testbench per unit, plus `tb_list_procs` (all four architectures) and `tb_lecture25_top` (end to end) |

## Verification

Every testbench computes its expected values independently of the RTL and ends with a
`TB_RESULT checks=N failures=M` line. Each also has a watchdog.

* **`tb_list_procs`** generates random lists and walks its own node table to get the sum.
  It checks `r` and the exact latency of all four architectures (2n+1 for #1–#3, 2n+2 for
  #4), and that `done` and `r` then hold. Cases covered:
  * a single node;
  * 2 to 60 nodes at aligned and odd addresses;
  * sums that overflow 8 bits;
  * a 128-node list filling all 256 bytes;
  * `start` held for several cycles;
  * a restart in the middle of a run.
* **`tb_lecture25_top`** runs at the default parameters. It loads lists through the host
  port, including the four-node example list with nodes at 0x0, 0x5, 0xE and 0xA. It
  counts each of these mechanisms and fails if any never occurs:
  * single node;
  * odd address;
  * 8-bit wrap;
  * full memory;
  * held `start`;
  * restart;
  * each register-transfer example.
* **`tb_lp_ctrl` and `tb_lp4_ctrl`** walk every state and branch and compare all control
  outputs with the tables above.

For each of these blocks, a deliberately broken copy was checked to make the testbench
fail.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/lp_pkg.sv tb/tb_lecture25_top.sv --top-module tb_lecture25_top
./obj_dir/Vtb_lecture25_top
```

## Where this RTL makes its own choices

* **Sum width.** SUM and R are 8 bits and wrap modulo 256. The problem statement makes all
  integers 8 bits and shows R as 8 bits, but a timing estimate for Architecture #1 speaks
  of a 15-bit add. For a wider result, widen SUM separately from the data path.
* **START in any state** goes back to START. The state diagram labels only the forward
  arcs with START = 0.
* **ADD_SEL** (#3) is 1 in COMPUTE_SUM and 0 in GET_NEXT. No per-state values are given;
  the transfers require these.
* **The Architecture #4 controller** is this design's own: the START→GET_NEXT entry, the
  FINISH state, the binary encoding. Only the schedule, the initial values and the need
  for one start state and one finish state come from the source.
* **The memory's write port** and the top's host load port are additions; the source shows
  only a read port. Each architecture also gets its own memory copy.
* **The `start` inputs of the two register-transfer examples**, their state machines and
  their 8-bit widths are choices; the source gives only the programs and the datapaths.
* **Encodings.** The Architecture #1–#3 controller is one-hot, as drawn in the source. Its
  equations are derived from the state diagram rather than from a gate-level drawing.
* **Not built.** The generic controller/datapath/memory template and the
  resource-utilisation chart are illustrations with no hardware function.
