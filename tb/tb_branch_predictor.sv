// tb_branch_predictor: drives random updates into the predictor and compares
// every lookup with a reference model of 2-bit saturating counters.
module tb_branch_predictor;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [31:0] lookup_pc, upd_pc;
  logic predict_taken, upd_valid, upd_taken;
  branch_predictor dut (.*);

  int ref_ctr [128];
  int checks = 0, failures = 0;

  initial begin
    for (int i = 0; i < 128; i++) ref_ctr[i] = 1;
    upd_valid = 0; upd_pc = 0; upd_taken = 0; lookup_pc = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      lookup_pc = {$urandom} & 32'h0000_03FC; #1;
      checks++;
      if (predict_taken !== (ref_ctr[lookup_pc[8:2]] >= 2)) begin
        failures++; $display("FAIL lookup %h n=%0d ref=%0d dut=%0d", lookup_pc, n, ref_ctr[lookup_pc[8:2]], dut.ctr[lookup_pc[8:2]]);
      end
      upd_valid = $urandom % 2;
      upd_pc    = {$urandom} & 32'h0000_00FC;   // a few hot entries
      upd_taken = $urandom % 4 != 0;
      @(posedge clk);
      if (upd_valid) begin
        int k; k = upd_pc[8:2];
        if (upd_taken && ref_ctr[k] < 3) ref_ctr[k]++;
        else if (!upd_taken && ref_ctr[k] > 0) ref_ctr[k]--;
      end
    end
    // saturation: four taken updates then one not-taken still predicts taken
    @(negedge clk); upd_valid = 1; upd_pc = 32'h100; upd_taken = 1;
    repeat (4) @(negedge clk);
    upd_taken = 0; @(negedge clk); upd_valid = 0;
    lookup_pc = 32'h100; #1;
    checks++; if (!predict_taken) begin failures++; $display("FAIL saturation"); end
    // distinct entries: entry 127 untouched by updates to others
    lookup_pc = 32'h1FC; #1;
    checks++; if (predict_taken !== (ref_ctr[127] >= 2)) begin failures++; $display("FAIL entry 127"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
