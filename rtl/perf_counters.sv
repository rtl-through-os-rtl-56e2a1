// perf_counters: the performance counter suite.
//
// Fifteen 64-bit counters, numbered like the RISC-V mhpmcounter CSRs:
// 0 cycles, 2 instructions retired, 3/4 forward conditional branches
// (all/predicted correctly), 5/6 backward branches, 7/8 forward jumps,
// 9/10 backward jumps, 11/12 instruction fetches (all/cache hits), 13/14 data
// accesses (all/cache hits). Counter 1 is unused and reads zero (the time CSR
// is served by the timer controller). Apart from the cycle counter, every
// counter is advanced when an instruction retires in WB, from flags the
// instruction carried down the pipeline; this follows the document. Which
// events are counted follows the metrics the document reports; the
// numbering is this design's choice. The counters are read-only.
module perf_counters (
  input  logic        clk,
  input  logic        rst,
  input  logic        retire,
  input  logic        is_branch,
  input  logic        is_jump,
  input  logic        backward,
  input  logic        predicted_ok,
  input  logic        if_hit,
  input  logic        is_mem,
  input  logic        d_hit,
  output logic [63:0] count [rv_pkg::NUM_PERF]
);
  import rv_pkg::*;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NUM_PERF; i++) count[i] <= '0;
    end else begin
      count[PC_CYCLE] <= count[PC_CYCLE] + 64'd1;
      if (retire) begin
        count[PC_INSTRET]  <= count[PC_INSTRET] + 64'd1;
        count[PC_IF_TOTAL] <= count[PC_IF_TOTAL] + 64'd1;
        if (if_hit) count[PC_IF_HIT] <= count[PC_IF_HIT] + 64'd1;
        if (is_mem) begin
          count[PC_D_TOTAL] <= count[PC_D_TOTAL] + 64'd1;
          if (d_hit) count[PC_D_HIT] <= count[PC_D_HIT] + 64'd1;
        end
        if (is_branch && !backward) begin
          count[PC_FBR_TOTAL] <= count[PC_FBR_TOTAL] + 64'd1;
          if (predicted_ok) count[PC_FBR_OK] <= count[PC_FBR_OK] + 64'd1;
        end
        if (is_branch && backward) begin
          count[PC_BBR_TOTAL] <= count[PC_BBR_TOTAL] + 64'd1;
          if (predicted_ok) count[PC_BBR_OK] <= count[PC_BBR_OK] + 64'd1;
        end
        if (is_jump && !backward) begin
          count[PC_FJ_TOTAL] <= count[PC_FJ_TOTAL] + 64'd1;
          if (predicted_ok) count[PC_FJ_OK] <= count[PC_FJ_OK] + 64'd1;
        end
        if (is_jump && backward) begin
          count[PC_BJ_TOTAL] <= count[PC_BJ_TOTAL] + 64'd1;
          if (predicted_ok) count[PC_BJ_OK] <= count[PC_BJ_OK] + 64'd1;
        end
      end
    end
  end
endmodule
