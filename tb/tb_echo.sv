// tb_echo: the keyboard echo demo run on the whole chip at its default
// sizes. A small program copies a character generator from DRAM into video
// memory, enables the keyboard interrupt and idles; its interrupt handler
// reads the character from the keyboard CSR and writes it, white on blue,
// to the next text cell. The testbench types "hi!" (with Shift for '!') on
// the PS/2 pins, checks the three cells in video memory, and then checks
// every pixel of those three characters on the VGA outputs in the next frame
// against the glyphs it generated: foreground 0xF gives all channels 0xF,
// background 0x1 gives blue 0xA only.
module tb_echo;
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
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // generated character generator: row r of character c
  function automatic logic [7:0] glyph(input int c, input int r);
    return 8'((c * 37) ^ (r * 11) ^ 8'h5A);
  endfunction

  function automatic wq_t echo_program();
    wq_t p;
    p.push_back(lui(1, 4));                 // 0  x1 = 0x4000 font in DRAM
    p.push_back(lui(2, 20'h80000));         // 1  x2 = video memory
    p.push_back(addi(3, 0, 1024));          // 2  words to copy
    p.push_back(lui(4, 3));                 // 3  x4 = 0x3000 = word 3072
    p.push_back(add(4, 4, 2));              // 4
    p.push_back(lw(5, 1, 0));               // 5  copy loop
    p.push_back(sw(5, 4, 0));               // 6
    p.push_back(addi(1, 1, 4));             // 7
    p.push_back(addi(4, 4, 4));             // 8
    p.push_back(addi(3, 3, -1));            // 9
    p.push_back(bne(3, 0, -20));            // 10
    p.push_back(addi(6, 0, 0));             // 11 next cell offset
    p.push_back(addi(8, 0, 128));           // 12 handler at word 32
    p.push_back(csrrw(0, 12'h305, 8));      // 13 mtvec
    p.push_back(lui(9, 1));                 // 14
    p.push_back(addi(9, 9, -2048));         // 15 x9 = 0x800, MEIE
    p.push_back(csrrw(0, 12'h304, 9));      // 16 mie
    p.push_back(csrrsi(0, 12'h300, 8));     // 17 mstatus.MIE
    p.push_back(jal(0, 0));                 // 18 idle
    while (p.size() < 32) p.push_back(addi(0, 0, 0));
    p.push_back(csrrs(10, 12'hFC0, 0));     // 32 read and consume the character
    p.push_back(andi(10, 10, 255));         // 33
    p.push_back(lui(12, 2));                // 34
    p.push_back(addi(12, 12, -256));        // 35 x12 = 0x1F00: white on blue
    p.push_back(add(10, 10, 12));           // 36
    p.push_back(add(7, 2, 6));              // 37
    p.push_back(sw(10, 7, 0));              // 38 cell
    p.push_back(addi(6, 6, 4));             // 39
    p.push_back(MRET);                      // 40
    return p;
  endfunction

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
    repeat (200) @(posedge clk);
  endtask

  int n_irq = 0;
  always @(posedge clk) if (dut.u_core.take_irq) n_irq++;

  // pixel checker: the colour registered in phase 3 for (hc, vc) is on the
  // outputs one video clock later
  logic       armed = 0, pend = 0;
  int         p_x, p_y, n_pix = 0, n_bad = 0;
  logic [7:0] text [3] = '{"h", "i", "!"};
  always @(posedge clk_vga) begin
    if (pend) begin
      logic on;
      logic [11:0] exp;
      on  = glyph(text[p_x / 8], p_y)[7 - p_x % 8];
      exp = on ? 12'hFFF : 12'h00A;
      n_pix++;
      if ({vga_r, vga_g, vga_b} !== exp) begin
        n_bad++;
        if (n_bad < 5) $display("FAIL pixel (%0d,%0d): %h expected %h", p_x, p_y, {vga_r, vga_g, vga_b}, exp);
      end
    end
    pend <= armed && dut.u_vga.phase == 2'd3 && dut.u_vga.hc < 24 && dut.u_vga.vc < 16;
    p_x  <= int'(dut.u_vga.hc);
    p_y  <= int'(dut.u_vga.vc);
  end

  logic [31:0] cell3;
  initial begin
    wq_t p;
    for (int i = 0; i < 65536; i++) u_ddr.mem[i] = 0;
    p = echo_program();
    foreach (p[i]) u_ddr.mem[i] = p[i];
    for (int w = 0; w < 1024; w++)
      u_ddr.mem[4096 + w] = {glyph((4*w+3) / 16, (4*w+3) % 16), glyph((4*w+2) / 16, (4*w+2) % 16),
                             glyph((4*w+1) / 16, (4*w+1) % 16), glyph((4*w) / 16, (4*w) % 16)};
    repeat (4) @(posedge clk);
    rst = 0;
    while (!dut.u_core.u_csr.mstatus_mie) @(posedge clk);
    cell3 = dut.u_mem.u_vram.mem[3];
    ps2_send(8'h33); ps2_send(8'hF0); ps2_send(8'h33);                   // h
    ps2_send(8'h43); ps2_send(8'hF0); ps2_send(8'h43);                   // i
    ps2_send(8'h12); ps2_send(8'h16); ps2_send(8'hF0); ps2_send(8'h16);  // Shift 1
    ps2_send(8'hF0); ps2_send(8'h12);
    repeat (500) @(posedge clk);
    check("cell 0", dut.u_mem.u_vram.mem[0], 32'h1F68);
    check("cell 1", dut.u_mem.u_vram.mem[1], 32'h1F69);
    check("cell 2", dut.u_mem.u_vram.mem[2], 32'h1F21);
    check("cell 3 untouched", dut.u_mem.u_vram.mem[3], cell3);
    check("font word", dut.u_mem.u_vram.mem[3072 + 8'h68 * 4 + 1], u_ddr.mem[4096 + 8'h68 * 4 + 1]);
    check("keyboard interrupts", n_irq, 3);
    // wait for the start of the next frame, then check the 24 x 16 pixels
    @(posedge clk_vga);
    while (!(dut.u_vga.vc == 10'd524)) @(posedge clk_vga);
    while (dut.u_vga.vc != 10'd0) @(posedge clk_vga);
    armed = 1;
    while (dut.u_vga.vc != 10'd16) @(posedge clk_vga);
    armed = 0;
    repeat (4) @(posedge clk_vga);
    check("pixels checked", n_pix, 24 * 16);
    check("wrong pixels", n_bad, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
