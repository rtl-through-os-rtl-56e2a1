// tb_timer_controller: checks that time counts one per cycle, that both
// compare halves are written, and that the interrupt rises exactly when
// time reaches the compare value and falls when compare is moved on; then,
// for 200 random compare values, that time and the interrupt match a cycle
// count kept by the testbench on every cycle.
module tb_timer_controller;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic cmp_we, cmp_hi, timer_irq;
  logic [31:0] cmp_wdata;
  logic [63:0] time_val, cmp_val;
  timer_controller dut (.*);
  int checks = 0, failures = 0;
  logic [63:0] model_time = 0;
  always @(posedge clk) model_time <= rst ? 64'd0 : model_time + 64'd1;

  initial begin
    cmp_we = 0; cmp_hi = 0; cmp_wdata = 0;
    repeat (2) @(posedge clk); rst = 0;
    @(negedge clk);
    checks++; if (timer_irq || cmp_val != '1) begin failures++; $display("FAIL reset"); end
    begin
      longint t0; t0 = time_val;
      repeat (10) @(negedge clk);
      checks++; if (time_val != t0 + 10) begin failures++; $display("FAIL count"); end
    end
    cmp_we = 1; cmp_hi = 1; cmp_wdata = 0; @(negedge clk);
    cmp_hi = 0; cmp_wdata = 32'(time_val) + 20; @(negedge clk);
    cmp_we = 0;
    checks++; if (cmp_val[63:32] != 0) begin failures++; $display("FAIL hi"); end
    begin
      int n; n = 0;
      while (!timer_irq && n < 100) begin @(negedge clk); n++; end
      checks++; if (time_val != cmp_val) begin failures++; $display("FAIL irq at %0d vs %0d", time_val, cmp_val); end
      checks++; if (n < 15 || n > 20) begin failures++; $display("FAIL irq after %0d cycles", n); end
    end
    repeat (3) @(negedge clk);
    checks++; if (!timer_irq) begin failures++; $display("FAIL irq level"); end
    cmp_we = 1; cmp_hi = 1; cmp_wdata = 32'hFFFF_FFFF; @(negedge clk); cmp_we = 0;
    checks++; if (timer_irq) begin failures++; $display("FAIL irq clear"); end
    // random compare values around the current time, checked every cycle
    // against a cycle count kept here
    for (int k = 0; k < 200; k++) begin
      logic [63:0] cmp;
      cmp = model_time + 64'($urandom % 60) - 64'd20;
      if (k % 7 == 0) cmp[63:32] = 32'($urandom % 2);   // upper half decides
      cmp_we = 1; cmp_hi = 1; cmp_wdata = cmp[63:32]; @(negedge clk);
      cmp_hi = 0; cmp_wdata = cmp[31:0]; @(negedge clk);
      cmp_we = 0;
      for (int c = 0; c < 40; c++) begin
        checks++;
        if (time_val != model_time || timer_irq != (model_time >= cmp)) begin
          failures++;
          if (failures < 5) $display("FAIL time %0d model %0d irq %0d cmp %h", time_val, model_time, timer_irq, cmp);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
