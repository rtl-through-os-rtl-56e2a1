// tb_memory_subsystem: random data-port loads, stores and AMOs spread over
// main memory and video memory, concurrent fetches, and VGA-port reads of
// video memory on its own clock, all compared with a reference model. It
// also checks that a video memory load or store is answered in the next cycle and an AMO
// in the cycle after.
module tb_memory_subsystem;
  import rv_pkg::*;
  logic clk = 0, clk_v = 0, rst = 1;
  always #10 clk = ~clk;
  always #5  clk_v = ~clk_v;
  logic f_req_valid, f_req_ready, f_resp_valid, d_req_valid, d_req_ready, d_resp_valid;
  logic [31:0] f_req_addr, vga_rdata;
  logic [11:0] vga_addr;
  mem_resp_t f_resp, d_resp;
  mem_req_t d_req;
  logic line_req_valid, line_req_ready, line_req_we, line_done;
  logic [31:0] line_req_addr;
  logic [511:0] line_wdata, line_rdata;
  memory_subsystem dut (.*, .clk_vga_mem(clk_v));
  tb_line_mem #(.WORDS(16384)) u_lm (.*);

  logic [31:0] mm [4096];
  logic [31:0] vm [4096];
  int checks = 0, failures = 0, n_v = 0, n_m = 0;

  initial begin
    for (int i = 0; i < 4096; i++) begin mm[i] = ~i; u_lm.mem[i] = ~i; vm[i] = 0; dut.u_vram.mem[i] = 0; end
    f_req_valid = 0; d_req_valid = 0; d_req = '0; f_req_addr = 0; vga_addr = 0;
    repeat (3) @(posedge clk); rst = 0;
    fork
      for (int n = 0; n < 600; n++) begin
        @(negedge clk);
        f_req_valid = 1; f_req_addr = ({$urandom} % 1024) << 2;
        @(posedge clk); while (!f_req_ready) @(posedge clk);
        @(negedge clk); f_req_valid = 0;
        while (!f_resp_valid) @(negedge clk);
        checks++;
        if (f_resp.rdata !== mm[f_req_addr[13:2]]) begin failures++; $display("FAIL fetch %h", f_req_addr); end
      end
      for (int n = 0; n < 1200; n++) begin
        int k, lat;
        logic [31:0] a, old;
        logic v;
        @(negedge clk);
        v = $urandom % 2;
        a = v ? (VRAM_BASE | (({$urandom} % 4096) << 2)) : ((1024 + {$urandom} % 3072) << 2);
        d_req.addr = a; d_req.wdata = $urandom; d_req.be = 4'($urandom);
        k = $urandom % 3;
        d_req.op = k == 0 ? MEM_LOAD : k == 1 ? MEM_STORE : MEM_AMO;
        d_req.amo = ($urandom % 2) ? AMO_XOR : AMO_MIN;
        d_req_valid = 1;
        @(posedge clk); while (!d_req_ready) @(posedge clk);
        @(negedge clk); d_req_valid = 0;
        lat = 1;
        while (!d_resp_valid) begin @(negedge clk); lat++; end
        old = v ? vm[a[13:2]] : mm[a[13:2]];
        checks++;
        if (d_req.op != MEM_STORE && d_resp.rdata !== old) begin failures++; $display("FAIL data %h got %h exp %h", a, d_resp.rdata, old); end
        if (v) begin
          n_v++;
          checks++; if (lat != (d_req.op == MEM_AMO ? 2 : 1)) begin failures++; $display("FAIL vram latency %0d", lat); end
        end else n_m++;
        if (d_req.op == MEM_STORE) old = merge_be(old, d_req.wdata, d_req.be);
        if (d_req.op == MEM_AMO) old = amo_calc(d_req.amo, old, d_req.wdata);
        if (v) vm[a[13:2]] = old; else mm[a[13:2]] = old;
        if (d_req.op == MEM_AMO) @(posedge clk);
      end
    join
    // VGA port sees what the data port wrote
    for (int i = 0; i < 200; i++) begin
      @(negedge clk_v); vga_addr = 12'(i * 19);
      @(negedge clk_v);
      checks++; if (vga_rdata !== vm[i * 19]) begin failures++; $display("FAIL vga read %0d", i); end
    end
    $display("vram=%0d main=%0d", n_v, n_m);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
