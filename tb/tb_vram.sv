// tb_vram: writes through port A with byte enables, reads back on both
// ports (port B on its own clock) and compares with a reference array.
module tb_vram;
  logic clk_a = 0, clk_b = 0;
  always #10 clk_a = ~clk_a;
  always #5  clk_b = ~clk_b;
  logic a_en;
  logic [3:0] a_be;
  logic [11:0] a_addr, b_addr;
  logic [31:0] a_wdata, a_rdata, b_rdata;
  vram dut (.*);
  logic [31:0] model [4096];
  int checks = 0, failures = 0;

  initial begin
    a_en = 0; a_be = 0; a_addr = 0; a_wdata = 0; b_addr = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk_a); a_en = 1; a_be = 4'hF; a_addr = 12'(i * 61); a_wdata = $urandom; model[i * 61] = a_wdata;
    end
    for (int i = 0; i < 64; i++) begin
      @(negedge clk_a); a_en = 1; a_be = 4'($urandom); a_addr = 12'(i * 61); a_wdata = $urandom;
      for (int b = 0; b < 4; b++) if (a_be[b]) model[i * 61][b*8 +: 8] = a_wdata[b*8 +: 8];
    end
    for (int i = 0; i < 64; i++) begin
      @(negedge clk_a); a_en = 1; a_be = 0; a_addr = 12'(i * 61);
      @(negedge clk_a);
      checks++; if (a_rdata !== model[i * 61]) begin failures++; $display("FAIL A %0d", i); end
    end
    a_en = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk_b); b_addr = 12'(i * 61);
      @(negedge clk_b);
      checks++; if (b_rdata !== model[i * 61]) begin failures++; $display("FAIL B %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk_a);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
