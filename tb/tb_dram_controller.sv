// tb_dram_controller: writes lines through the controller into the AXI DRAM
// model and reads them back, checking the burst format (16 beats, INCR,
// 4-byte beats), the DRAM_BASE offset and the data.
module tb_dram_controller;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic line_req_valid, line_req_ready, line_req_we, line_done;
  logic [31:0] line_req_addr;
  logic [511:0] line_wdata, line_rdata;
  logic [31:0] awaddr, wdata, araddr, rdata;
  logic [7:0] awlen, arlen;
  logic [2:0] awsize, arsize;
  logic [1:0] awburst, arburst, bresp, rresp;
  logic [3:0] wstrb;
  logic awvalid, awready, wlast, wvalid, wready, bvalid, bready, arvalid, arready, rlast, rvalid, rready;
  dram_controller dut (
    .clk, .rst, .line_req_valid, .line_req_ready, .line_req_we, .line_req_addr, .line_wdata, .line_done, .line_rdata,
    .m_axi_awaddr(awaddr), .m_axi_awlen(awlen), .m_axi_awsize(awsize), .m_axi_awburst(awburst),
    .m_axi_awvalid(awvalid), .m_axi_awready(awready), .m_axi_wdata(wdata), .m_axi_wstrb(wstrb),
    .m_axi_wlast(wlast), .m_axi_wvalid(wvalid), .m_axi_wready(wready), .m_axi_bresp(bresp),
    .m_axi_bvalid(bvalid), .m_axi_bready(bready), .m_axi_araddr(araddr), .m_axi_arlen(arlen),
    .m_axi_arsize(arsize), .m_axi_arburst(arburst), .m_axi_arvalid(arvalid), .m_axi_arready(arready),
    .m_axi_rdata(rdata), .m_axi_rresp(rresp), .m_axi_rlast(rlast), .m_axi_rvalid(rvalid), .m_axi_rready(rready)
  );
  axi_dram_model #(.WORDS(4096), .BASE(32'h0800_0000)) u_ddr (.*);
  int checks = 0, failures = 0, wbeats = 0;
  always @(posedge clk) if (wvalid && wready) wbeats++;
  always @(posedge clk) if (awvalid && awready) begin
    checks++;
    if (awlen != 15 || awsize != 2 || awburst != 1 || awaddr[31:14] != 18'(32'h0800_0000 >> 14)) begin
      failures++; $display("FAIL aw %h %0d", awaddr, awlen);
    end
  end
  always @(posedge clk) if (arvalid && arready) begin
    checks++;
    if (arlen != 15 || arsize != 2 || arburst != 1) begin failures++; $display("FAIL ar"); end
  end

  task automatic xfer(input logic we, input logic [31:0] a, input logic [511:0] d);
    @(negedge clk); line_req_valid = 1; line_req_we = we; line_req_addr = a; line_wdata = d;
    @(posedge clk); while (!line_req_ready) @(posedge clk);
    @(negedge clk); line_req_valid = 0;
    while (!line_done) @(negedge clk);
  endtask

  logic [511:0] lines [8];
  initial begin
    line_req_valid = 0; line_req_we = 0; line_req_addr = 0; line_wdata = 0;
    for (int i = 0; i < 4096; i++) u_ddr.mem[i] = 0;
    repeat (3) @(posedge clk); rst = 0;
    for (int i = 0; i < 8; i++) begin
      for (int w = 0; w < 16; w++) lines[i][w*32 +: 32] = $urandom;
      xfer(1, 32'h400 + 64 * i, lines[i]);
    end
    checks++; if (wbeats != 128) begin failures++; $display("FAIL beats %0d", wbeats); end
    checks++; if (u_ddr.mem[(32'h400 >> 2) + 17] !== lines[1][32 +: 32]) begin failures++; $display("FAIL stored word"); end
    for (int i = 7; i >= 0; i--) begin
      xfer(0, 32'h400 + 64 * i, '0);
      checks++; if (line_rdata !== lines[i]) begin failures++; $display("FAIL read line %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
