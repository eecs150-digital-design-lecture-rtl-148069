// lecture25_top: the designs of the high-level design lecture side by side.
//
// Four implementations of the linked-list summing processor (Architectures
// #1 to #4: direct, with NUMA register, with a shared adder, and with the
// pipelined X/NUMA schedule) each run against their own copy of the list
// memory, so the four can be compared on the same list; next to them sit the
// two register-transfer examples (R0/R1/ACC and regA/regB/regC). The list
// memories are loaded through one host port that writes the same byte into
// all four: while host_we is 1 the host's address replaces the processors'
// address on each single-ported memory, so load only while the processors
// are idle (before start or after done). start restarts all four list
// processors at once; done[i]/r[i] belong to Architecture #(i+1). The
// shared host port and the private memories are this design's choices.
module lecture25_top #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  // list processors
  input  logic              start,
  input  logic              host_we,
  input  logic [ADDR_W-1:0] host_addr,
  input  logic [DATA_W-1:0] host_wdata,
  output logic [3:0]        done,
  output logic [DATA_W-1:0] r [4],
  // R0/R1/ACC register-transfer example
  input  logic              acc_start,
  output logic [7:0]        acc_r0,
  output logic [7:0]        acc_r1,
  output logic [7:0]        acc_acc,
  output logic              acc_busy,
  // regA/regB/regC register-transfer example
  input  logic              abc_start,
  input  logic [7:0]        abc_in,
  output logic [7:0]        abc_rega,
  output logic [7:0]        abc_regb,
  output logic [7:0]        abc_regc,
  output logic              abc_busy
);

  logic [ADDR_W-1:0] proc_a [4];
  logic [ADDR_W-1:0] mem_a  [4];
  logic [DATA_W-1:0] mem_d  [4];

  list_proc1 #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_arch1 (
    .clk, .start, .mem_a(proc_a[0]), .mem_d(mem_d[0]), .done(done[0]), .r(r[0]));
  list_proc2 #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_arch2 (
    .clk, .start, .mem_a(proc_a[1]), .mem_d(mem_d[1]), .done(done[1]), .r(r[1]));
  list_proc3 #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_arch3 (
    .clk, .start, .mem_a(proc_a[2]), .mem_d(mem_d[2]), .done(done[2]), .r(r[2]));
  list_proc4 #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_arch4 (
    .clk, .start, .mem_a(proc_a[3]), .mem_d(mem_d[3]), .done(done[3]), .r(r[3]));

  for (genvar i = 0; i < 4; i++) begin : g_mem
    assign mem_a[i] = host_we ? host_addr : proc_a[i];
    list_mem #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_mem (
      .clk, .a(mem_a[i]), .d(mem_d[i]), .we(host_we), .wd(host_wdata));
  end

  rt_acc_example #(.W(8)) u_acc (
    .clk, .start(acc_start), .r0(acc_r0), .r1(acc_r1), .acc(acc_acc), .busy(acc_busy));

  rt_abc_example #(.W(8)) u_abc (
    .clk, .start(abc_start), .in_data(abc_in), .rega(abc_rega), .regb(abc_regb),
    .regc(abc_regc), .busy(abc_busy));

endmodule
