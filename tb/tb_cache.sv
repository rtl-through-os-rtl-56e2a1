// tb_cache: fills lines, checks hits and misses on both lookup ports,
// byte-enabled word writes and the dirty flag, victim reporting, and the
// direct-mapped conflict between two addresses 4 KB apart.
module tb_cache;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [31:0] f_addr, d_addr, d_wdata, fill_addr, f_data, d_data, v_addr;
  logic f_hit, d_hit, d_we, fill_we, v_valid, v_dirty;
  logic [3:0] d_be;
  logic [511:0] fill_line, v_line;
  cache dut (.*);
  int checks = 0, failures = 0;
  task automatic chk(input string w, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h", w, got, exp); end
  endtask
  function automatic logic [511:0] mk_line(input logic [31:0] base);
    logic [511:0] l;
    for (int w = 0; w < 16; w++) l[w*32 +: 32] = base + w;
    return l;
  endfunction

  initial begin
    f_addr = 0; d_addr = 0; d_wdata = 0; fill_addr = 0; d_we = 0; fill_we = 0; d_be = 0; fill_line = 0;
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    f_addr = 32'h0000_1040; d_addr = 32'h0000_1044; #1;
    chk("cold miss", {30'd0, f_hit, d_hit}, 0);
    // fill all 64 lines from 0x1000..0x1FFF
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); fill_we = 1; fill_addr = 32'h1000 + 64 * i; fill_line = mk_line(32'h1000 + 64 * i);
    end
    @(negedge clk); fill_we = 0;
    for (int i = 0; i < 64; i++) begin
      f_addr = 32'h1000 + 64 * i + 4 * (i % 16); d_addr = 32'h1000 + 64 * i + 60; #1;
      chk("fetch hit", {31'd0, f_hit}, 1);
      chk("fetch data", f_data, 32'h1000 + 64 * i + (i % 16));
      chk("data hit", {31'd0, d_hit}, 1);
      chk("data word", d_data, 32'h1000 + 64 * i + 15);
    end
    // conflicting address misses
    f_addr = 32'h2040; #1; chk("conflict miss", {31'd0, f_hit}, 0);
    // byte write marks dirty
    @(negedge clk); d_addr = 32'h1048; d_we = 1; d_be = 4'b0110; d_wdata = 32'hAABBCCDD;
    @(negedge clk); d_we = 0; #1;
    chk("merged", d_data, 32'h1042 & 32'hFF0000FF | 32'h00BBCC00);
    fill_addr = 32'h2048; #1;
    chk("victim valid dirty", {30'd0, v_valid, v_dirty}, 2'b11);
    chk("victim addr", v_addr, 32'h1040);
    chk("victim word", v_line[2*32 +: 32], (32'h1042 & 32'hFF0000FF) | 32'h00BBCC00);
    // refill at the conflicting address replaces the line and is clean
    @(negedge clk); fill_we = 1; fill_line = mk_line(32'h2040);
    @(negedge clk); fill_we = 0; f_addr = 32'h2044; d_addr = 32'h1044; #1;
    chk("new line hit", {31'd0, f_hit}, 1);
    chk("new line data", f_data, 32'h2041);
    chk("old line gone", {31'd0, d_hit}, 0);
    chk("clean after fill", {31'd0, v_dirty}, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
