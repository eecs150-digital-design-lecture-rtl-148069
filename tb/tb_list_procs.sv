// tb_list_procs: self-checking test of the four list-processor
// architectures, run side by side on the same memory image.
//
// The testbench builds linked lists in a 256-byte array (first node at 0,
// other nodes at random, also odd, addresses, last pointer 0), works out the
// expected sum by walking its own node table, starts all four processors
// together and checks, for each: the result r, that done rises exactly
// 2n+1 (Architectures #1-#3) or 2n+2 (Architecture #4) clock edges after
// START is sampled for an n-node list, i.e. two cycles per element, and that
// done and r then hold. Cases: one node, random lengths, a list that fills
// the whole memory, a sum that wraps, START held for several cycles, and a
// restart in the middle of a run.
module tb_list_procs;
  localparam int DW = 8, AW = 8, NARCH = 4;
  logic clk = 1'b0;
  logic start;
  logic [AW-1:0] mem_a [NARCH];
  logic [DW-1:0] mem_d [NARCH];
  logic [NARCH-1:0] done;
  logic [DW-1:0] r [NARCH];
  logic [DW-1:0] image [256];
  int checks = 0, failures = 0;
  int n_restart = 0, n_wrap = 0, n_odd = 0, n_single = 0, n_full = 0;

  list_proc1 #(.DATA_W(DW), .ADDR_W(AW)) u1 (.clk, .start, .mem_a(mem_a[0]), .mem_d(mem_d[0]), .done(done[0]), .r(r[0]));
  list_proc2 #(.DATA_W(DW), .ADDR_W(AW)) u2 (.clk, .start, .mem_a(mem_a[1]), .mem_d(mem_d[1]), .done(done[1]), .r(r[1]));
  list_proc3 #(.DATA_W(DW), .ADDR_W(AW)) u3 (.clk, .start, .mem_a(mem_a[2]), .mem_d(mem_d[2]), .done(done[2]), .r(r[2]));
  list_proc4 #(.DATA_W(DW), .ADDR_W(AW)) u4 (.clk, .start, .mem_a(mem_a[3]), .mem_d(mem_d[3]), .done(done[3]), .r(r[3]));

  for (genvar i = 0; i < NARCH; i++) begin : g_rd
    assign mem_d[i] = image[mem_a[i]];
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Build a list of n nodes. aligned=1 places nodes on even addresses only.
  // Returns the expected sum (mod 2^DW) computed from the node table.
  function automatic logic [DW-1:0] build_list(input int n, input bit aligned,
                                              output bit wrapped, output bit odd);
    bit used [256];
    int addr [$];
    int s = 0;
    for (int i = 0; i < 256; i++) begin used[i] = 0; image[i] = DW'($urandom); end
    addr.push_back(0); used[0] = 1; used[1] = 1;
    odd = 0;
    while (addr.size() < n) begin
      int p = aligned ? 2 * $urandom_range(1, 127) : $urandom_range(2, 254);
      if (!used[p] && !used[p+1]) begin
        used[p] = 1; used[p+1] = 1; addr.push_back(p);
        if (p % 2 == 1) odd = 1;
      end
    end
    for (int k = 0; k < n; k++) begin
      logic [DW-1:0] x;
      x = DW'($urandom);
      image[addr[k]]   = (k == n - 1) ? '0 : DW'(addr[k+1]);
      image[addr[k]+1] = x;
      s += int'(signed'(x));
    end
    wrapped = (s > 127) || (s < -128);
    return DW'(s);
  endfunction

  // Run all architectures on the current image; hold START for hold cycles.
  task automatic run(input int n, input logic [DW-1:0] expect_sum, input int hold);
    int lat [NARCH];
    bit seen [NARCH];
    int k;
    @(negedge clk); start = 1'b1;
    repeat (hold - 1) @(negedge clk);
    @(negedge clk); start = 1'b0;        // START was sampled on the edge before
    for (int i = 0; i < NARCH; i++) begin seen[i] = 0; lat[i] = -1; end
    k = 0;
    while (!(seen[0] && seen[1] && seen[2] && seen[3]) && k < 4 * n + 20) begin
      @(posedge clk); #1; k++;
      for (int i = 0; i < NARCH; i++)
        if (!seen[i] && done[i]) begin seen[i] = 1; lat[i] = k; end
    end
    for (int i = 0; i < NARCH; i++) begin
      int exp_lat = (i == 3) ? 2 * n + 2 : 2 * n + 1;
      checks++;
      if (r[i] !== expect_sum || lat[i] != exp_lat) begin
        failures++;
        $display("arch #%0d n=%0d: r=%0d expected %0d, latency %0d expected %0d",
                 i + 1, n, $signed(r[i]), $signed(expect_sum), lat[i], exp_lat);
      end
    end
    repeat (3) @(posedge clk);
    #1;
    for (int i = 0; i < NARCH; i++) begin
      checks++;
      if (!done[i] || r[i] !== expect_sum) begin
        failures++;
        $display("arch #%0d: result not held after done", i + 1);
      end
    end
  endtask

  initial begin
    logic [DW-1:0] s;
    bit wr, od;
    start = 1'b0;
    for (int i = 0; i < 256; i++) image[i] = '0;
    // one node
    s = build_list(1, 0, wr, od); run(1, s, 1); n_single++;
    // random lengths, some held START
    for (int t = 0; t < 40; t++) begin
      automatic int n = $urandom_range(2, 60);
      s = build_list(n, t % 5 == 0, wr, od);
      run(n, s, (t % 7 == 0) ? 3 : 1);
      n_wrap += int'(wr); n_odd += int'(od);
    end
    // list that fills the whole memory
    s = build_list(128, 1, wr, od); run(128, s, 1); n_full++; n_wrap += int'(wr);
    // restart in the middle of a run: the second run must be unaffected
    s = build_list(30, 0, wr, od);
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    repeat (17) @(negedge clk);
    run(30, s, 1); n_restart++;
    $display("coverage: single=%0d wrap=%0d odd_addr=%0d full_mem=%0d restart=%0d",
             n_single, n_wrap, n_odd, n_full, n_restart);
    checks++;
    if (n_wrap == 0 || n_odd == 0) begin
      failures++;
      $display("coverage hole: wrap or odd-address case never produced");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
