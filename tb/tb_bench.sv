// tb_bench: a small benchmark kernel on the whole chip at its default sizes,
// read out through the performance counters. The kernel walks a 64-word
// array 1000 times, adding each word into a running sum and storing the sum
// back; every fourth pass a forward branch falls through to add one more,
// and a forward jump skips an instruction on every pass. It then copies
// counters to memory: instructions retired, forward and backward branches
// and forward jumps (total and predicted correctly), instruction fetches
// and hits, data accesses and hits, and cycles. The testbench checks the
// array against its own model of the kernel, and the counters against what
// the kernel must give: exactly 1000 of each branch kind; one or two
// backward mispredictions (the first taken pass and the loop exit); forward
// branch predictions as a two-bit counter model of the 3-in-4 pattern says;
// every forward jump predicted but the first; 2000 array accesses of which
// four miss (the array spans four cache lines); and fetch misses only on
// the first fetch of each code line. It prints the IPC and accuracies.
module tb_bench;
  import rv_pkg::*;
  import tb_prog_pkg::*;

  logic clk = 0, clk_vga = 0, rst = 1;
  always #10 clk = ~clk;
  always #5  clk_vga = ~clk_vga;

  logic [31:0] awaddr, wdata, araddr, rdata, retire_pc;
  logic [7:0]  awlen, arlen;
  logic [2:0]  awsize, arsize;
  logic [1:0]  awburst, arburst, bresp, rresp;
  logic [3:0]  wstrb, vga_r, vga_g, vga_b;
  logic awvalid, awready, wlast, wvalid, wready, bvalid, bready, arvalid, arready;
  logic rlast, rvalid, rready, vga_hs, vga_vs, retire_valid;
  logic ps2_clk = 1, ps2_data = 1;

  chip dut (
    .clk, .clk_vga_mem(clk_vga), .rst,
    .m_axi_awaddr(awaddr), .m_axi_awlen(awlen), .m_axi_awsize(awsize), .m_axi_awburst(awburst),
    .m_axi_awvalid(awvalid), .m_axi_awready(awready),
    .m_axi_wdata(wdata), .m_axi_wstrb(wstrb), .m_axi_wlast(wlast), .m_axi_wvalid(wvalid), .m_axi_wready(wready),
    .m_axi_bresp(bresp), .m_axi_bvalid(bvalid), .m_axi_bready(bready),
    .m_axi_araddr(araddr), .m_axi_arlen(arlen), .m_axi_arsize(arsize), .m_axi_arburst(arburst),
    .m_axi_arvalid(arvalid), .m_axi_arready(arready),
    .m_axi_rdata(rdata), .m_axi_rresp(rresp), .m_axi_rlast(rlast), .m_axi_rvalid(rvalid), .m_axi_rready(rready),
    .ps2_clk, .ps2_data, .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs, .retire_valid, .retire_pc
  );
  axi_dram_model #(.WORDS(65536), .BASE(32'h0800_0000)) u_ddr (
    .clk, .rst, .awaddr, .awlen, .awvalid, .awready, .wdata, .wstrb, .wlast, .wvalid, .wready,
    .bresp, .bvalid, .bready, .araddr, .arlen, .arvalid, .arready, .rdata, .rresp, .rlast, .rvalid, .rready
  );

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  task automatic check_range(input string what, input logic [31:0] got, input int lo, input int hi);
    checks++;
    if (int'(got) < lo || int'(got) > hi) begin failures++; $display("FAIL %s: %0d not in %0d..%0d", what, got, lo, hi); end
  endtask

  function automatic logic [31:0] peek(input logic [31:0] a);
    logic [5:0] idx;
    idx = a[11:6];
    if (dut.u_mem.u_main.u_cache.valid[idx] && dut.u_mem.u_main.u_cache.tag[idx] == a[31:12])
      return dut.u_mem.u_main.u_cache.data[idx][a[5:2]];
    return u_ddr.mem[a >> 2];
  endfunction

  localparam int ITER = 1000;
  localparam int R0 = 5 + 11 * ITER + ITER / 4 + 5 + 1;  // instructions older than the first counter read
  function automatic wq_t bench_program();
    wq_t p;
    p.push_back(lui(1, 1));                 // 0  x1 = 0x1100 array (cache lines 4..7)
    p.push_back(addi(1, 1, 256));           // 1
    p.push_back(addi(2, 0, ITER));          // 2
    p.push_back(addi(3, 0, 0));             // 3  sum
    p.push_back(addi(4, 0, 0));             // 4  offset
    p.push_back(add(5, 1, 4));              // 5  loop
    p.push_back(lw(6, 5, 0));               // 6
    p.push_back(add(3, 3, 6));              // 7
    p.push_back(sw(3, 5, 0));               // 8
    p.push_back(andi(7, 2, 3));             // 9
    p.push_back(bne(7, 0, 8));              // 10 forward branch, taken 3 times in 4
    p.push_back(addi(3, 3, 1));             // 11
    p.push_back(jal(0, 8));                 // 12 forward jump
    p.push_back(addi(3, 3, 100));           // 13 never executed
    p.push_back(addi(4, 4, 4));             // 14
    p.push_back(andi(4, 4, 255));           // 15
    p.push_back(addi(2, 2, -1));            // 16
    p.push_back(bne(2, 0, -48));            // 17
    for (int i = 0; i < 5; i++) p.push_back(addi(0, 0, 0));  // let the loop retire
    p.push_back(lui(11, 2));                // 18 x11 = 0x2000 results
    foreach (CNT[i]) begin
      p.push_back(csrrs(10, 12'hB00 + CNT[i], 0));
      p.push_back(sw(10, 11, 4 * i));
    end
    p.push_back(addi(12, 0, 1));
    p.push_back(sw(12, 11, 64));            // done flag
    p.push_back(jal(0, 0));
    return p;
  endfunction
  localparam int CNT [12] = '{2, 5, 6, 11, 12, 13, 14, 0, 3, 4, 7, 8};

  initial begin
    wq_t p;
    logic [31:0] model [64];
    logic [31:0] sum;
    int n_code, fwd_ok;
    logic [1:0] ctr;
    for (int i = 0; i < 65536; i++) u_ddr.mem[i] = 0;
    p = bench_program();
    foreach (p[i]) u_ddr.mem[i] = p[i];
    n_code = p.size();
    for (int k = 0; k < 64; k++) begin u_ddr.mem[(32'h1100 >> 2) + k] = k + 1; model[k] = k + 1; end
    sum = 0;
    for (int it = 0; it < ITER; it++) begin
      sum += model[it % 64];
      model[it % 64] = sum;
      if ((ITER - it) % 4 == 0) sum += 1;
    end
    // two-bit counter model of the forward branch (taken unless the down
    // counter is a multiple of 4); each update lands before the next lookup
    fwd_ok = 0; ctr = 1;
    for (int it = 0; it < ITER; it++) begin
      logic t;
      t = (ITER - it) % 4 != 0;
      if (ctr[1] == t) fwd_ok++;
      if (t && ctr != 3) ctr++;
      else if (!t && ctr != 0) ctr--;
    end
    repeat (4) @(posedge clk);
    rst = 0;
    while (peek(32'h2040) != 1) @(posedge clk);
    for (int k = 0; k < 64; k++) check($sformatf("array[%0d]", k), peek(32'h1100 + 4 * k), model[k]);
    // Each counter is read in EX1 while up to four older instructions are still
    // in flight, so a counter read by the instruction with R older instructions
    // lies in R-4..R (less the misses among them for the hit counters). The
    // k-th read instruction has R = 8011 + 2k older instructions; the first two
    // code lines and the four array lines miss before the reads, and the
    // result line misses on the first counter store.
    check_range("instret", peek(32'h2000), R0 - 4, R0);
    check("backward branches", peek(32'h2004), ITER);
    check_range("backward branches predicted", peek(32'h2008), ITER - 2, ITER - 1);
    check("forward branches", peek(32'h2020), ITER);
    check("forward branches predicted", peek(32'h2024), fwd_ok);
    check("forward jumps", peek(32'h2028), ITER);
    check("forward jumps predicted", peek(32'h202C), ITER - 1);
    check_range("fetches", peek(32'h200C), R0 + 6 - 4, R0 + 6);
    check_range("fetch hits", peek(32'h2010), R0 + 8 - 2 - 4, R0 + 8 - 2);
    check_range("data accesses", peek(32'h2014), 2 * ITER + 5 - 4, 2 * ITER + 5);
    check_range("data hits", peek(32'h2018), 2 * ITER + 6 - 5 - 4, 2 * ITER + 6 - 5);
    $display("bench: cycles=%0d instret=%0d IPC=%0.3f branch accuracy backward %0.2f%% forward %0.2f%%, forward jumps %0.2f%%",
             peek(32'h201C), peek(32'h2000), real'(peek(32'h2000)) / real'(peek(32'h201C)),
             100.0 * real'(peek(32'h2008)) / real'(peek(32'h2004)),
             100.0 * real'(peek(32'h2024)) / real'(peek(32'h2020)),
             100.0 * real'(peek(32'h202C)) / real'(peek(32'h2028)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
