// tb_interrupt_controller: all combinations of sources and enables; checks
// the one-cycle registration of the sources, the enable gating and the
// external-over-timer priority.
module tb_interrupt_controller;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic timer_irq, kbd_irq, mstatus_mie, irq_pending;
  logic [31:0] mie, mip;
  logic [3:0] irq_cause;
  interrupt_controller dut (.*);
  int checks = 0, failures = 0;

  initial begin
    timer_irq = 0; kbd_irq = 0; mstatus_mie = 0; mie = 0;
    repeat (2) @(posedge clk); rst = 0;
    for (int n = 0; n < 64; n++) begin
      logic t, k, g, et, ek;
      @(negedge clk);
      t = n[0]; k = n[1]; g = n[2]; et = n[3]; ek = n[4];
      timer_irq = t; kbd_irq = k; mstatus_mie = g;
      mie = {20'd0, ek, 3'd0, et, 7'd0} | (n[5] ? 32'hFFFF_F77F : 0);
      @(negedge clk);
      checks++;
      if (mip !== ({20'd0, k, 3'd0, t, 7'd0}) ||
          irq_pending !== (g && ((k && ek) || (t && et))) ||
          (irq_pending && irq_cause !== ((k && ek) ? 4'd11 : 4'd7))) begin
        failures++; $display("FAIL n=%0d mip=%h pend=%b cause=%0d", n, mip, irq_pending, irq_cause);
      end
    end
    // registration: a source seen one cycle later
    @(negedge clk); timer_irq = 0; kbd_irq = 0; mstatus_mie = 1; mie = 32'h880;
    @(negedge clk); timer_irq = 1; #1;
    checks++; if (irq_pending) begin failures++; $display("FAIL not registered"); end
    @(negedge clk);
    checks++; if (!irq_pending || irq_cause != 7) begin failures++; $display("FAIL timer"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
