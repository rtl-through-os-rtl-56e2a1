// tb_chip: end-to-end test of the whole processor at its default sizes.
//
// The test program is placed in the DRAM model (the job the Arm core does
// on the board), the processor is released from reset and runs it from
// DRAM through the cache. A PS/2 frame for the 'A' key (scan code 0x1C) is
// sent on the keyboard pins; the timer interrupt is set up by the program.
// At the end the result words are read back through the cache state and
// DRAM, and the testbench checks that each mechanism occurred at least once:
// fetch and data cache misses, dirty write-back, video memory access, ID
// stall, MEM1 wait for the data port, MEM2 wait for a response, EX2 flush,
// IF2 predicted-taken redirect, a dropped fetch and both interrupts. It also
// checks the VGA line period (800 pixels of 4 video clocks) and that every
// AXI burst address lies in the DRAM window above DRAM_BASE.
module tb_chip;
  import rv_pkg::*;
  import tb_prog_pkg::*;

  logic clk = 0, clk_vga = 0, rst = 1;
  always #10 clk = ~clk;        // 50 MHz
  always #5  clk_vga = ~clk_vga; // 100 MHz

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

  int checks = 0, failures = 0, cycles = 0;
  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // every AXI burst must fall inside the processor's DRAM window
  int n_bad_addr = 0;
  always @(posedge clk) begin
    if (awvalid && awready && (awaddr < 32'h0800_0000 || awaddr >= 32'h0800_0000 + 65536 * 4)) n_bad_addr++;
    if (arvalid && arready && (araddr < 32'h0800_0000 || araddr >= 32'h0800_0000 + 65536 * 4)) n_bad_addr++;
  end

  // a word as the program sees it: from the cache if the line is there, else DRAM
  function automatic logic [31:0] peek(input logic [31:0] a);
    logic [5:0] idx;
    idx = a[11:6];
    if (dut.u_mem.u_main.u_cache.valid[idx] && dut.u_mem.u_main.u_cache.tag[idx] == a[31:12])
      return dut.u_mem.u_main.u_cache.data[idx][a[5:2]];
    return u_ddr.mem[a >> 2];
  endfunction

  // mechanism counters
  int n_fmiss = 0, n_dmiss = 0, n_wb = 0, n_vram = 0, n_id_stall = 0, n_mem1_wait = 0;
  int n_mem2_wait = 0, n_flush = 0, n_pred = 0, n_drop = 0, n_irq = 0, n_retired = 0;
  always @(posedge clk) if (!rst) begin
    cycles++;
    if (dut.u_mem.u_main.mst == 0 && dut.u_mem.u_main.fst == 2 && dut.u_mem.u_main.dst != 2) n_fmiss++;
    if (dut.u_mem.u_main.mst == 0 && dut.u_mem.u_main.dst == 2) n_dmiss++;
    if (dut.u_dram.line_req_valid && dut.u_dram.line_req_ready && dut.u_dram.line_req_we) n_wb++;
    if (dut.u_mem.v_accept) n_vram++;
    if (dut.u_core.stall_req[2]) n_id_stall++;
    if (dut.u_core.stall_req[5]) n_mem1_wait++;
    if (dut.u_core.stall_req[6]) n_mem2_wait++;
    if (dut.u_core.flush_young) n_flush++;
    if (dut.u_core.if2_redirect && !dut.u_core.hold[1] && !dut.u_core.flush_young) n_pred++;
    if (dut.u_core.f_drop && dut.f_resp_valid) n_drop++;
    if (dut.u_core.take_irq) n_irq++;
    if (retire_valid) n_retired++;
  end

  // PS/2 frame: start, 8 data bits LSB first, odd parity, stop
  task automatic ps2_send(input logic [7:0] code);
    logic [10:0] f;
    f = {1'b1, ~^code, code, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data = f[i];
      repeat (20) @(posedge clk);
      ps2_clk = 0;
      repeat (40) @(posedge clk);
      ps2_clk = 1;
      repeat (20) @(posedge clk);
    end
  endtask

  // VGA line period
  int hs_falls = 0;
  int vclk = 0, t_first = 0, t_last = 0;
  logic hs_q = 1;
  always @(posedge clk_vga) begin
    vclk++;
    hs_q <= vga_hs;
    if (hs_q && !vga_hs) begin
      if (hs_falls == 0) t_first = vclk;
      t_last = vclk;
      hs_falls++;
    end
  end

  initial begin
    wq_t p;
    for (int i = 0; i < 65536; i++) u_ddr.mem[i] = 0;
    p = test_program();
    foreach (p[i]) u_ddr.mem[i] = p[i];
    repeat (4) @(posedge clk);
    rst = 0;
    repeat (200) @(posedge clk);
    ps2_send(8'h1C);
    ps2_send(8'hF0);
    ps2_send(8'h1C);
    while (peek(RES + 60) != 1) @(posedge clk);
    repeat (50) @(posedge clk);
    for (int i = 0; i < RES_WORDS; i++)
      if (i != 10) check($sformatf("RES[%0d]", i), peek(RES + 4 * i), expected(i));
    checks++;
    if (peek(RES + 40) < 80 || peek(RES + 40) > n_retired) begin
      failures++; $display("FAIL instret %0d", peek(RES + 40));
    end
    check("VRAM cell 0", dut.u_mem.u_vram.mem[0], 32'h741);
    check("DRAM holds 0x3000 after write-back", u_ddr.mem[32'h3000 >> 2], 77);
    $display("mechanisms: fetch_miss=%0d data_miss=%0d writeback=%0d vram=%0d id_stall=%0d mem1_wait=%0d mem2_wait=%0d flush=%0d predicted_taken=%0d dropped_fetch=%0d irq=%0d",
             n_fmiss, n_dmiss, n_wb, n_vram, n_id_stall, n_mem1_wait, n_mem2_wait, n_flush, n_pred, n_drop, n_irq);
    $display("cycles=%0d retired=%0d", cycles, n_retired);
    checks++; if (n_bad_addr != 0)  begin failures++; $display("FAIL %0d bursts outside DRAM window", n_bad_addr); end
    checks++; if (n_fmiss == 0)     begin failures++; $display("FAIL no fetch miss"); end
    checks++; if (n_dmiss == 0)     begin failures++; $display("FAIL no data miss"); end
    checks++; if (n_wb == 0)        begin failures++; $display("FAIL no write-back"); end
    checks++; if (n_vram < 2)       begin failures++; $display("FAIL no VRAM access"); end
    checks++; if (n_id_stall == 0)  begin failures++; $display("FAIL no ID stall"); end
    checks++; if (n_mem1_wait == 0) begin failures++; $display("FAIL no MEM1 wait"); end
    checks++; if (n_mem2_wait == 0) begin failures++; $display("FAIL no MEM2 wait"); end
    checks++; if (n_flush == 0)     begin failures++; $display("FAIL no flush"); end
    checks++; if (n_pred == 0)      begin failures++; $display("FAIL no predicted-taken"); end
    checks++; if (n_drop == 0)      begin failures++; $display("FAIL no dropped fetch"); end
    checks++; if (n_irq != 2)       begin failures++; $display("FAIL interrupts %0d", n_irq); end
    // wait for a few VGA lines: 800 pixels x 4 video clocks
    while (hs_falls < 4) @(posedge clk);
    check("VGA line period (video clocks)", 32'((t_last - t_first) / (hs_falls - 1)), 3200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
