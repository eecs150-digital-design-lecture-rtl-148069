// tb_lecture25_top: end-to-end test of the whole top at its default sizes.
//
// Loads linked lists into the four list memories through the host write
// port (one byte per cycle), starts the four list-processor architectures
// together and checks each result against the sum computed from the
// testbench's own node table, and the two-cycles-per-element latency
// (2n+1 edges for Architectures #1-#3, 2n+2 for #4). It then runs the two
// register-transfer examples through the top's ports. Mechanisms counted,
// each of which must occur at least once: single-node list, list at odd
// addresses, sum that wraps, list filling the whole memory, START held for
// several cycles, restart in the middle of a run, a run of each
// register-transfer example.
module tb_lecture25_top;
  localparam int DW = 8, AW = 8;
  logic clk = 1'b0;
  logic start, host_we;
  logic [AW-1:0] host_addr;
  logic [DW-1:0] host_wdata;
  logic [3:0] done;
  logic [DW-1:0] r [4];
  logic acc_start, acc_busy, abc_start, abc_busy;
  logic [7:0] acc_r0, acc_r1, acc_acc, abc_in, abc_rega, abc_regb, abc_regc;
  logic [DW-1:0] image [256];
  int checks = 0, failures = 0;
  typedef enum {M_SINGLE, M_ODD, M_WRAP, M_FULL, M_HOLD, M_RESTART, M_ACC, M_ABC, M_NUM} mech_t;
  int seen [M_NUM];

  lecture25_top dut (
    .clk, .start, .host_we, .host_addr, .host_wdata, .done, .r,
    .acc_start, .acc_r0, .acc_r1, .acc_acc, .acc_busy,
    .abc_start, .abc_in, .abc_rega, .abc_regb, .abc_regc, .abc_busy);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Write image[] into the four list memories through the host port.
  task automatic host_load();
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      host_we = 1'b1; host_addr = AW'(i); host_wdata = image[i];
    end
    @(negedge clk);
    host_we = 1'b0;
  endtask

  // The four-node example list of the problem statement: nodes at 0x0, 0x5,
  // 0xE and 0xA (pointers 0x5, 0xE, 0xA, 0); the numbers are chosen here.
  task automatic load_example(output logic [DW-1:0] sum);
    logic [DW-1:0] x [4];
    x[0] = 8'd7; x[1] = 8'hF3; x[2] = 8'd100; x[3] = 8'd21;   // 7, -13, 100, 21
    for (int i = 0; i < 256; i++) image[i] = DW'($urandom);
    image[8'h0] = 8'h05; image[8'h1] = x[0];
    image[8'h5] = 8'h0E; image[8'h6] = x[1];
    image[8'hE] = 8'h0A; image[8'hF] = x[2];
    image[8'hA] = 8'h00; image[8'hB] = x[3];
    host_load();
    sum = 8'd115;                                              // 7 - 13 + 100 + 21
    seen[M_ODD]++;
  endtask

  // Build an n-node list in image[], load it through the host port and
  // return the expected sum.
  task automatic load_list(input int n, input bit aligned, output logic [DW-1:0] sum);
    bit used [256];
    int addr [$];
    int s = 0;
    bit odd = 0;
    for (int i = 0; i < 256; i++) begin used[i] = 0; image[i] = DW'($urandom); end
    addr.push_back(0); used[0] = 1; used[1] = 1;
    while (addr.size() < n) begin
      int p = aligned ? 2 * $urandom_range(1, 127) : $urandom_range(2, 254);
      if (!used[p] && !used[p+1]) begin
        used[p] = 1; used[p+1] = 1; addr.push_back(p);
        if (p % 2 == 1) odd = 1;
      end
    end
    for (int k = 0; k < n; k++) begin
      image[addr[k]]   = (k == n - 1) ? '0 : DW'(addr[k+1]);
      image[addr[k]+1] = DW'($urandom);
      s += int'(signed'(image[addr[k]+1]));
    end
    host_load();
    if (odd) seen[M_ODD]++;
    if (s > 127 || s < -128) seen[M_WRAP]++;
    if (n == 1) seen[M_SINGLE]++;
    if (n == 128) seen[M_FULL]++;
    sum = DW'(s);
  endtask

  task automatic run(input int n, input logic [DW-1:0] sum, input int hold);
    int lat [4];
    int k = 0;
    @(negedge clk); start = 1'b1;
    repeat (hold - 1) @(negedge clk);
    if (hold > 1) seen[M_HOLD]++;
    @(negedge clk); start = 1'b0;
    for (int i = 0; i < 4; i++) lat[i] = -1;
    while (done != 4'hf && k < 4 * n + 20) begin
      @(posedge clk); #1; k++;
      for (int i = 0; i < 4; i++) if (lat[i] < 0 && done[i]) lat[i] = k;
    end
    for (int i = 0; i < 4; i++) begin
      int el = (i == 3) ? 2 * n + 2 : 2 * n + 1;
      check(r[i] === sum && lat[i] == el,
            $sformatf("arch #%0d n=%0d r=%0d exp %0d latency %0d exp %0d",
                      i + 1, n, $signed(r[i]), $signed(sum), lat[i], el));
    end
  endtask

  initial begin
    logic [DW-1:0] s;
    logic [7:0] e0, e1, ea, ta, tb;
    for (int i = 0; i < M_NUM; i++) seen[i] = 0;
    start = 1'b0; host_we = 1'b0; host_addr = '0; host_wdata = '0;
    acc_start = 1'b0; abc_start = 1'b0; abc_in = '0;

    load_example(s);      run(4, s, 1);
    load_list(1, 0, s);   run(1, s, 1);
    load_list(5, 0, s);   run(5, s, 3);
    for (int t = 0; t < 8; t++) begin
      automatic int n = $urandom_range(2, 100);
      load_list(n, t % 2 == 0, s); run(n, s, 1);
    end
    load_list(128, 1, s); run(128, s, 1);
    // restart in the middle of a run
    load_list(40, 0, s);
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    repeat (23) @(negedge clk);
    run(40, s, 1); seen[M_RESTART]++;

    // R0/R1/ACC example: one program run
    repeat (4) @(negedge clk);
    e0 = acc_r0; e1 = acc_r1; ea = acc_acc;
    acc_start = 1'b1; @(negedge clk); acc_start = 1'b0;
    ea = ea + e0;                                  // idle cycle sampling start
    @(negedge clk); e1 = e0; ea = ea + e0;         // ACC<-ACC+R0, R1<-R0
    @(negedge clk); ea = ea + e1; e0 = e1;         // ACC<-ACC+R1, R0<-R1
    @(negedge clk); ta = ea; tb = ea + e0; e0 = ta; ea = tb;  // R0<-ACC
    check(acc_r0 === e0 && acc_r1 === e1 && acc_acc === ea && !acc_busy,
          $sformatf("rt_acc: %h %h %h exp %h %h %h", acc_r0, acc_r1, acc_acc, e0, e1, ea));
    seen[M_ACC]++;

    // regA/regB/regC example
    abc_start = 1'b1; @(negedge clk); abc_start = 1'b0;
    abc_in = 8'd100; @(negedge clk);
    abc_in = 8'd27;  @(negedge clk);
    abc_in = 8'd0;   @(negedge clk); @(negedge clk);
    check(abc_rega == 8'd100 && abc_regb == 8'd127 && abc_regc == 8'd127 && !abc_busy,
          $sformatf("rt_abc: %0d %0d %0d", abc_rega, abc_regb, abc_regc));
    seen[M_ABC]++;

    for (int i = 0; i < M_NUM; i++) begin
      mech_t m;
      m = mech_t'(i);
      $display("mechanism %s occurred %0d times", m.name(), seen[i]);
      check(seen[i] > 0, $sformatf("mechanism %s never occurred", m.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
