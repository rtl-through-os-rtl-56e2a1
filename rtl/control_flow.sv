// control_flow: arbitration of the pipeline's stall, flush and drain requests.
//
// Stages are numbered 0 = IF1, 1 = IF2, 2 = ID, 3 = EX1, 4 = EX2, 5 = MEM1,
// 6 = MEM2, 7 = WB; a higher number holds an older instruction. Requests are
// served oldest first:
//  * Stall: a stage that cannot finish this cycle raises stall_req[k]. It and
//    every younger stage hold (hold[j] for j <= k); the stage after it takes
//    a bubble. WB never stalls.
//  * Flush: EX2 raises ex2_redirect when the next pc it resolved differs from
//    the one that was fetched after it (a misprediction, a trap or MRET). It is
//    acted on in the cycle EX2 moves on (no older stall): every younger stage
//    (IF2, ID, EX1) is invalidated, IF1 issues nothing, and the pc is loaded
//    with ex2_target.
//  * Prediction: IF2 raises if2_redirect when it has an instruction that is
//    predicted taken; when IF2 moves on and no flush is acted on, the pc is
//    loaded with if2_target and IF1 issues nothing that cycle.
//  * Drain: while an enabled interrupt is pending, IF1 issues nothing. Once
//    the pipeline is empty, take_irq is raised for one cycle: the CSRs enter
//    the trap and the pc is loaded with the trap vector.
// The stage names, the age rule and the drain for interrupts follow the
// document; the exact signalling is this design's own.
module control_flow (
  input  logic [7:0]  stall_req,
  input  logic        ex2_redirect,
  input  logic [31:0] ex2_target,
  input  logic        if2_redirect,
  input  logic [31:0] if2_target,
  input  logic        irq_pending,
  input  logic        pipe_empty,
  input  logic [31:0] trap_vector,
  output logic [7:0]  hold,
  output logic        flush_young,
  output logic        drain,
  output logic        take_irq,
  output logic        pc_load,
  output logic [31:0] pc_target
);
  always_comb begin
    for (int k = 0; k < 8; k++) begin
      hold[k] = 1'b0;
      for (int j = k; j < 8; j++) hold[k] = hold[k] | stall_req[j];
    end
    flush_young = ex2_redirect && !hold[4];
    drain       = irq_pending;
    take_irq    = irq_pending && pipe_empty && !flush_young;
    pc_load     = 1'b0;
    pc_target   = if2_target;
    if (flush_young) begin
      pc_load   = 1'b1;
      pc_target = ex2_target;
    end else if (take_irq) begin
      pc_load   = 1'b1;
      pc_target = trap_vector;
    end else if (if2_redirect && !hold[1]) begin
      pc_load   = 1'b1;
      pc_target = if2_target;
    end
  end
endmodule
