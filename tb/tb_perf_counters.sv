// tb_perf_counters: random retirement events; every counter is compared
// with reference counts kept by the testbench.
module tb_perf_counters;
  import rv_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic retire, is_branch, is_jump, backward, predicted_ok, if_hit, is_mem, d_hit;
  logic [63:0] count [NUM_PERF];
  perf_counters dut (.*);
  longint ref_c [NUM_PERF];
  int checks = 0, failures = 0;

  initial begin
    {retire, is_branch, is_jump, backward, predicted_ok, if_hit, is_mem, d_hit} = 0;
    for (int i = 0; i < NUM_PERF; i++) ref_c[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int n = 0; n < 2000; n++) begin
      int kind;
      retire = $urandom % 4 != 0;
      kind = $urandom % 3;
      is_branch = kind == 1; is_jump = kind == 2;
      backward = $urandom % 2; predicted_ok = $urandom % 5 != 0;
      if_hit = $urandom % 8 != 0; is_mem = $urandom % 3 == 0; d_hit = $urandom % 6 != 0;
      @(negedge clk);
      ref_c[PC_CYCLE]++;
      if (retire) begin
        ref_c[PC_INSTRET]++; ref_c[PC_IF_TOTAL]++;
        if (if_hit) ref_c[PC_IF_HIT]++;
        if (is_mem) begin ref_c[PC_D_TOTAL]++; if (d_hit) ref_c[PC_D_HIT]++; end
        if (is_branch) begin
          ref_c[backward ? PC_BBR_TOTAL : PC_FBR_TOTAL]++;
          if (predicted_ok) ref_c[backward ? PC_BBR_OK : PC_FBR_OK]++;
        end
        if (is_jump) begin
          ref_c[backward ? PC_BJ_TOTAL : PC_FJ_TOTAL]++;
          if (predicted_ok) ref_c[backward ? PC_BJ_OK : PC_FJ_OK]++;
        end
      end
    end
    for (int i = 0; i < NUM_PERF; i++) begin
      checks++;
      if (count[i] != 64'(ref_c[i])) begin failures++; $display("FAIL counter %0d: %0d vs %0d", i, count[i], ref_c[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
