// tb_vga_controller: a behavioural video memory holding a few text cells
// and glyph rows; checks the line and frame periods, the sync pulse widths
// and the colour of selected pixels against values computed from the
// cell contents.
module tb_vga_controller;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [11:0] vram_addr;
  logic [31:0] vram_rdata;
  logic [3:0] vga_r, vga_g, vga_b;
  logic vga_hs, vga_vs;
  vga_controller dut (.*);

  logic [31:0] mem [4096];
  always @(posedge clk) vram_rdata <= mem[vram_addr];

  int checks = 0, failures = 0;
  int clk_n = 0, hs_fall[$], vs_fall[$], hs_low = 0, hs_w = 0;
  logic hs_q = 1, vs_q = 1;
  // pixel sampler: pixel (x,y) appears at the outputs after its phase-3 edge
  logic [3:0] px_r [0:15][0:1];
  logic [3:0] px_b [0:15][0:1];
  always @(posedge clk) begin
    clk_n++;
    hs_q <= vga_hs; vs_q <= vga_vs;
    if (clk_n > 8) begin
      if (hs_q && !vga_hs) hs_fall.push_back(clk_n);
      if (vs_q && !vga_vs) vs_fall.push_back(clk_n);
      if (!vga_hs) hs_low++;
      if (!hs_q && vga_hs && hs_w == 0) hs_w = hs_low;
    end
    if (dut.phase == 2'd0 && dut.vc < 2 && dut.hc >= 1 && dut.hc <= 16)
      begin px_r[dut.hc - 1][dut.vc] = vga_r; px_b[dut.hc - 1][dut.vc] = vga_b; end
  end

  initial begin
    for (int i = 0; i < 4096; i++) mem[i] = 0;
    mem[0] = 32'h0000_1C41;      // 'A', fg 12 (bright red), bg 1 (blue)
    mem[1] = 32'h0000_0742;      // 'B', fg 7, bg 0
    mem[3072 + (8'h41 * 16) / 4] = 32'h0000_81F0;  // 'A' rows 0,1: 0xF0, 0x81
    mem[3072 + (8'h42 * 16) / 4] = 32'h0000_FF0F;  // 'B' rows 0,1: 0x0F, 0xFF
    repeat (3) @(posedge clk); rst = 0;
    while (vs_fall.size() < 2) @(posedge clk);
    checks++; if (hs_fall[1] - hs_fall[0] != 3200) begin failures++; $display("FAIL line %0d", hs_fall[1] - hs_fall[0]); end
    checks++; if (vs_fall[1] - vs_fall[0] != 3200 * 525) begin failures++; $display("FAIL frame %0d", vs_fall[1] - vs_fall[0]); end
    checks++; if (hs_w != 96 * 4) begin failures++; $display("FAIL hsync width %0d", hs_w); end
    for (int y = 0; y < 2; y++)
      for (int x = 0; x < 16; x++) begin
        logic [7:0] row; logic on; logic [3:0] c; logic [3:0] er, eb;
        row = (x < 8) ? (y == 0 ? 8'hF0 : 8'h81) : (y == 0 ? 8'h0F : 8'hFF);
        on  = row[7 - (x % 8)];
        c   = (x < 8) ? (on ? 4'hC : 4'h1) : (on ? 4'h7 : 4'h0);
        er  = (c[2] ? 4'hA : 0) + (c[3] ? 4'h5 : 0);
        eb  = (c[0] ? 4'hA : 0) + (c[3] ? 4'h5 : 0);
        checks++;
        if (px_r[x][y] !== er || px_b[x][y] !== eb) begin
          failures++; $display("FAIL pixel %0d,%0d r=%h b=%h expected %h %h", x, y, px_r[x][y], px_b[x][y], er, eb);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (4000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
