// tb_control_flow: random request patterns; hold, flush, drain, interrupt
// entry and the pc selection are compared with the oldest-first rules.
module tb_control_flow;
  logic [7:0] stall_req, hold;
  logic ex2_redirect, if2_redirect, irq_pending, pipe_empty;
  logic [31:0] ex2_target, if2_target, trap_vector, pc_target;
  logic flush_young, drain, take_irq, pc_load;
  control_flow dut (.*);
  int checks = 0, failures = 0;

  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic [7:0] eh;
      logic ef, el, eirq;
      logic [31:0] et;
      stall_req = 8'($urandom) & 8'b0110_0110 & (($urandom % 2) ? 8'hFF : 8'h00);
      ex2_redirect = $urandom % 2; if2_redirect = $urandom % 2;
      irq_pending = ($urandom % 4) == 0; pipe_empty = $urandom % 2;
      ex2_target = $urandom; if2_target = $urandom; trap_vector = $urandom;
      #1;
      for (int k = 0; k < 8; k++) eh[k] = |(stall_req >> k);
      ef = ex2_redirect && !eh[4];
      eirq = irq_pending && pipe_empty && !ef;
      el = ef || eirq || (if2_redirect && !eh[1]);
      et = ef ? ex2_target : eirq ? trap_vector : if2_target;
      checks++;
      if (hold !== eh || flush_young !== ef || take_irq !== eirq || drain !== irq_pending ||
          pc_load !== el || (el && pc_target !== et)) begin
        failures++;
        $display("FAIL stall=%b hold=%b flush=%b irq=%b load=%b", stall_req, hold, flush_young, take_irq, pc_load);
      end
      #1;
    end
    // an older stall (MEM2) defers the EX2 flush
    stall_req = 8'b0100_0000; ex2_redirect = 1; irq_pending = 0; if2_redirect = 0; #1;
    checks++; if (flush_young || !hold[4] || hold[7]) begin failures++; $display("FAIL defer"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
