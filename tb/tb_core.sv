// tb_core: runs the test program on the core alone, against an ideal
// memory with random response latency on both ports, and checks the result
// words, the retired-instruction count and that the pipeline mechanisms
// (ID stall, EX2 flush, IF2 predicted-taken redirect, interrupt drain,
// MEM2 wait) each occurred. Timer: the real timer controller; keyboard: a
// character 'a' is held available until the core acknowledges it.
module tb_core;
  import rv_pkg::*;
  import tb_prog_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic f_req_valid, f_req_ready, f_resp_valid;
  logic [31:0] f_req_addr;
  mem_resp_t f_resp, d_resp;
  logic d_req_valid, d_req_ready, d_resp_valid;
  mem_req_t d_req;
  logic timer_irq, tcmp_we, tcmp_hi, kb_ack, retire_valid;
  logic [31:0] tcmp_wdata, retire_pc;
  logic [63:0] time_val, timecmp_val;
  logic kb_valid;

  core dut (
    .clk, .rst, .f_req_valid, .f_req_ready, .f_req_addr, .f_resp_valid, .f_resp,
    .d_req_valid, .d_req_ready, .d_req, .d_resp_valid, .d_resp,
    .timer_irq, .time_val, .timecmp_val, .tcmp_we, .tcmp_hi, .tcmp_wdata,
    .kb_valid, .kb_data(8'h61), .kb_ack, .retire_valid, .retire_pc
  );
  timer_controller u_timer (.clk, .rst, .cmp_we(tcmp_we), .cmp_hi(tcmp_hi), .cmp_wdata(tcmp_wdata),
                            .time_val, .cmp_val(timecmp_val), .timer_irq);

  always_ff @(posedge clk)
    if (rst) kb_valid <= 1'b1;
    else if (kb_ack) kb_valid <= 1'b0;

  // ideal memory: 64 KB main memory and 1 KB of video memory
  logic [31:0] mem  [16384];
  logic [31:0] vmem [256];

  function automatic logic [31:0] rd(input logic [31:0] a);
    return a[31] ? vmem[a[9:2]] : mem[a[15:2]];
  endfunction

  logic f_busy, d_busy;
  int   f_cnt, d_cnt;
  logic [31:0] f_a;
  mem_req_t d_q;
  assign f_req_ready  = !f_busy || f_cnt == 0;
  assign f_resp_valid = f_busy && f_cnt == 0;
  assign f_resp.rdata = rd(f_a);
  assign f_resp.hit   = 1'b1;
  assign d_req_ready  = !d_busy || d_cnt == 0;
  assign d_resp_valid = d_busy && d_cnt == 0;
  assign d_resp.rdata = rd(d_q.addr);
  assign d_resp.hit   = 1'b1;

  always @(posedge clk) begin
    if (rst) begin
      f_busy <= 0; d_busy <= 0; f_cnt <= 0; d_cnt <= 0;
    end else begin
      if (f_busy && f_cnt > 0) f_cnt <= f_cnt - 1;
      else if (f_resp_valid) f_busy <= 0;
      if (f_req_valid && f_req_ready) begin
        f_busy <= 1; f_a <= f_req_addr; f_cnt <= ($urandom % 4 == 0) ? $urandom % 4 : 0;
      end
      if (d_busy && d_cnt > 0) d_cnt <= d_cnt - 1;
      else if (d_resp_valid) begin
        d_busy <= 0;
        if (d_q.op != MEM_LOAD) begin
          logic [31:0] nw;
          nw = (d_q.op == MEM_AMO) ? amo_calc(d_q.amo, rd(d_q.addr), d_q.wdata)
                                   : merge_be(rd(d_q.addr), d_q.wdata, d_q.be);
          if (d_q.addr[31]) vmem[d_q.addr[9:2]] <= nw; else mem[d_q.addr[15:2]] <= nw;
        end
      end
      if (d_req_valid && d_req_ready) begin
        d_busy <= 1; d_q <= d_req; d_cnt <= ($urandom % 3 == 0) ? $urandom % 5 : 0;
      end
    end
  end

  int checks = 0, failures = 0, cycles = 0;
  int n_id_stall = 0, n_flush = 0, n_pred = 0, n_irq = 0, n_mem_wait = 0, n_fwd = 0;
  always @(posedge clk) if (!rst) begin
    cycles++;
    if (dut.stall_req[2]) n_id_stall++;
    if (dut.flush_young) n_flush++;
    if (dut.if2_redirect && !dut.hold[1] && !dut.flush_young) n_pred++;
    if (dut.take_irq) n_irq++;
    if (dut.stall_req[6]) n_mem_wait++;
    if (dut.id.valid && !dut.hold[2] && dut.id_d.use_rs1 && dut.ex1.valid && dut.ex1.d.wb &&
        dut.ex1.d.rd == dut.id_d.rs1 && dut.id_d.rs1 != 0) n_fwd++;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    wq_t p;
    for (int i = 0; i < 16384; i++) mem[i] = 0;
    for (int i = 0; i < 256; i++) vmem[i] = 0;
    p = test_program();
    foreach (p[i]) mem[i] = p[i];
    repeat (3) @(posedge clk);
    rst = 0;
    while (mem[(RES >> 2) + 15] != 1) @(posedge clk);
    repeat (20) @(posedge clk);
    for (int i = 0; i < RES_WORDS; i++)
      if (i != 10) check($sformatf("RES[%0d]", i), mem[(RES >> 2) + i], expected(i));
    checks++;
    if (mem[(RES >> 2) + 10] < 80 || mem[(RES >> 2) + 10] > cycles) begin
      failures++; $display("FAIL instret %0d", mem[(RES >> 2) + 10]);
    end
    check("x0", dut.u_rf.regs[0], 0);
    check("x4", dut.u_rf.regs[4], 12);
    check("x28 sc fail", dut.u_rf.regs[28], 1);
    check("vram word", vmem[0], 32'h741);
    check("mepc after kbd irq", dut.u_csr.mepc, 32'd73 * 4 - 4);
    // branch counters: correct never above total, something counted
    checks++;
    if (dut.u_perf.count[PC_BBR_TOTAL] == 0 || dut.u_perf.count[PC_BBR_OK] > dut.u_perf.count[PC_BBR_TOTAL] ||
        dut.u_perf.count[PC_FBR_TOTAL] == 0 || dut.u_perf.count[PC_BJ_TOTAL] == 0 || dut.u_perf.count[PC_FJ_TOTAL] == 0) begin
      failures++; $display("FAIL branch counters");
    end
    $display("mechanisms: id_stall=%0d flush=%0d predicted_taken=%0d irq=%0d mem_wait=%0d forward=%0d cycles=%0d",
             n_id_stall, n_flush, n_pred, n_irq, n_mem_wait, n_fwd, cycles);
    checks++; if (n_id_stall == 0) begin failures++; $display("FAIL no ID stall"); end
    checks++; if (n_flush == 0)    begin failures++; $display("FAIL no flush"); end
    checks++; if (n_pred == 0)     begin failures++; $display("FAIL no predicted-taken redirect"); end
    checks++; if (n_irq != 2)      begin failures++; $display("FAIL interrupts taken %0d", n_irq); end
    checks++; if (n_mem_wait == 0) begin failures++; $display("FAIL no MEM2 wait"); end
    checks++; if (n_fwd == 0)      begin failures++; $display("FAIL no EX1 forwarding"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
