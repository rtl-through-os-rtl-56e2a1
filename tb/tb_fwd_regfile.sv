// tb_fwd_regfile: random register writes through the WB port and random
// forwarding candidates; the read values and the hazard flag are compared
// with a reference that applies the youngest-stage-first rule.
module tb_fwd_regfile;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [4:0] rs1, rs2, fw_wen, fw_ready;
  logic use_rs1, use_rs2, hazard;
  logic [4:0] fw_rd [5];
  logic [31:0] fw_val [5];
  logic [31:0] rs1_val, rs2_val;
  fwd_regfile dut (.*);

  logic [31:0] model [32];
  int checks = 0, failures = 0;

  function automatic logic [32:0] expect_src(input logic [4:0] r);
    if (r == 0) return 33'd0;
    for (int s = 0; s < 5; s++)
      if (fw_wen[s] && fw_rd[s] == r) return {!fw_ready[s], fw_val[s]};
    return {1'b0, model[r]};
  endfunction

  initial begin
    for (int i = 0; i < 32; i++) model[i] = 0;
    fw_wen = 0; fw_ready = 0; rs1 = 0; rs2 = 0; use_rs1 = 0; use_rs2 = 0;
    for (int s = 0; s < 5; s++) begin fw_rd[s] = 0; fw_val[s] = 0; end
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      for (int s = 0; s < 5; s++) begin
        fw_wen[s] = ($urandom % 3) == 0;
        fw_rd[s]  = $urandom % 8;
        fw_ready[s] = (s == 4) ? 1'b1 : ($urandom % 4 != 0);
        fw_val[s] = $urandom;
      end
      rs1 = $urandom % 8; rs2 = $urandom % 8;
      use_rs1 = $urandom % 2; use_rs2 = $urandom % 2;
      #1;
      begin
        logic [32:0] e1, e2;
        e1 = expect_src(rs1); e2 = expect_src(rs2);
        checks++;
        if ((!e1[32] && rs1_val !== e1[31:0]) || (!e2[32] && rs2_val !== e2[31:0]) ||
            hazard !== ((use_rs1 && e1[32]) || (use_rs2 && e2[32]))) begin
          failures++;
          $display("FAIL rs1=%0d rs2=%0d got %h %h hz=%b", rs1, rs2, rs1_val, rs2_val, hazard);
        end
      end
      @(posedge clk);
      if (fw_wen[4] && fw_rd[4] != 0) model[fw_rd[4]] = fw_val[4];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
