// core: eight-stage in-order RV32IA pipeline with machine-mode CSRs.
//
// Stages: IF1 issues a fetch of the pc to the memory's fetch port and reads
// the branch predictor; IF2 waits for the instruction word and, when the
// instruction is a conditional branch or JAL whose counter predicts taken,
// redirects IF1 to its target (one bubble). ID decodes, reads the
// forwarding register file and requests a stall when an operand is not yet
// computed or when a SYSTEM instruction would follow another one still in
// the pipeline. EX1 computes with the ALU (and reads a CSR); EX2 resolves
// the next pc, updates the predictor and, on a misprediction, trap or MRET,
// flushes the younger stages and redirects IF1. MEM1 issues the data
// access (stalling while the port is busy); MEM2 waits for its response
// (stalling until it is valid). WB writes the register file, applies CSR
// writes, enters traps for ECALL/EBREAK/illegal instructions, performs the
// mstatus part of MRET and advances the performance counters.
//
// Results are forwarded into ID from the ends of EX1, EX2, MEM1, MEM2 and
// WB as soon as they are computed: an ALU result one cycle after issue, a
// load result at the end of MEM2. Interrupts drain the pipeline: IF1 stops
// issuing, and when every stage is empty the trap is entered with mepc =
// the pc IF1 would have fetched next.
//
// LR/SC use a one-entry reservation held in MEM1; AMOs are carried out by
// the memory. Accesses are assumed naturally aligned. The stage structure,
// forwarding points, stall sources, 128-entry predictor, drain-based
// interrupts and the single-SYSTEM-instruction rule follow the document;
// IF2 prediction using the IF1 counter, traps resolved in EX2, and the
// handshake details are this design's own.
//
// Memory ports: requests are accepted when *_req_valid and *_req_ready are
// both high; a response (*_resp_valid, one cycle) answers each request, on
// a cache hit in the cycle after the request was accepted.
module core #(
  parameter logic [31:0] RESET_PC   = 32'h0000_0000,
  parameter int unsigned BP_ENTRIES = 128
) (
  input  logic              clk,
  input  logic              rst,
  // fetch port
  output logic              f_req_valid,
  input  logic              f_req_ready,
  output logic [31:0]       f_req_addr,
  input  logic              f_resp_valid,
  input  rv_pkg::mem_resp_t f_resp,
  // data port
  output logic              d_req_valid,
  input  logic              d_req_ready,
  output rv_pkg::mem_req_t  d_req,
  input  logic              d_resp_valid,
  input  rv_pkg::mem_resp_t d_resp,
  // timer controller
  input  logic              timer_irq,
  input  logic [63:0]       time_val,
  input  logic [63:0]       timecmp_val,
  output logic              tcmp_we,
  output logic              tcmp_hi,
  output logic [31:0]       tcmp_wdata,
  // keyboard controller
  input  logic              kb_valid,
  input  logic [7:0]        kb_data,
  output logic              kb_ack,
  // retirement trace
  output logic              retire_valid,
  output logic [31:0]       retire_pc
);
  import rv_pkg::*;

  // ------------------------------------------------------------------
  // Pipeline registers
  // ------------------------------------------------------------------
  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic        pred;      // predictor counter said taken
    logic        waiting;   // fetch outstanding
    logic        have;      // instruction captured
    logic [31:0] instr;
    logic        if_hit;
  } if2_t;

  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] instr;
    logic [31:0] pnext;     // predicted next pc
    logic        if_hit;
  } id_t;

  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    decoded_t    d;
    logic [31:0] a;         // rs1 value
    logic [31:0] b;         // rs2 value
    logic [31:0] pnext;
    logic        if_hit;
  } ex1_t;

  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    decoded_t    d;
    logic [31:0] result;
    logic [31:0] b;
    logic [31:0] csr_src;
    logic        taken;     // control transfer taken
    logic [31:0] target;    // its target
    logic [31:0] pnext;
    logic        if_hit;
  } ex2_t;

  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    decoded_t    d;
    logic [31:0] result;    // ALU result; memory address for memory ops
    logic [31:0] b;
    logic [31:0] csr_src;
    logic        pred_ok;
    logic        backward;
    logic        if_hit;
  } mem1_t;

  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    decoded_t    d;
    logic [31:0] result;
    logic [1:0]  off;       // byte offset of the access
    logic        req;       // a data request is outstanding
    logic [31:0] csr_src;
    logic        pred_ok;
    logic        backward;
    logic        if_hit;
  } mem2_t;

  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    decoded_t    d;
    logic [31:0] result;
    logic [31:0] csr_src;
    logic        pred_ok;
    logic        backward;
    logic        if_hit;
    logic        is_mem;
    logic        d_hit;
  } wb_t;

  logic [31:0] pc;
  if2_t  if2;
  id_t   id;
  ex1_t  ex1;
  ex2_t  ex2;
  mem1_t mem1;
  mem2_t mem2;
  wb_t   wb;
  logic  f_drop;            // the outstanding fetch belongs to a flushed path

  // control flow
  logic [7:0]  stall_req, hold;
  logic        flush_young, drain, take_irq, pc_load;
  logic [31:0] pc_target;
  logic        ex2_redirect, if2_redirect;
  logic [31:0] ex2_next, if2_target;
  logic        irq_pending;
  logic [3:0]  irq_cause;
  logic        pipe_empty;

  // CSR state
  logic [31:0] mtvec, mepc, mie, mip, csr_rdata;
  logic        mstatus_mie;

  // ------------------------------------------------------------------
  // IF1 / IF2
  // ------------------------------------------------------------------
  logic        bp_pred;
  logic        if2_avail, if2_adv, if1_issue;
  logic [31:0] if2_instr;
  logic        if2_hit_now;

  branch_predictor #(.ENTRIES(BP_ENTRIES)) u_bp (
    .clk, .rst,
    .lookup_pc(pc), .predict_taken(bp_pred),
    .upd_valid(ex2.valid && !hold[4] && (ex2.d.ctl == BR_BRANCH || ex2.d.ctl == BR_JAL || ex2.d.ctl == BR_JALR)),
    .upd_pc(ex2.pc), .upd_taken(ex2.taken)
  );

  always_comb begin
    if2_avail   = if2.have || (if2.waiting && f_resp_valid && !f_drop);
    if2_instr   = if2.have ? if2.instr : f_resp.rdata;
    if2_hit_now = if2.have ? if2.if_hit : f_resp.hit;
    // static target of a predicted-taken branch or JAL
    if2_redirect = 1'b0;
    if2_target   = if2.pc + 32'd4;
    if (if2.valid && if2_avail && if2.pred) begin
      if (if2_instr[6:0] == OP_BRANCH) begin
        if2_redirect = 1'b1;
        if2_target   = if2.pc + {{19{if2_instr[31]}}, if2_instr[31], if2_instr[7],
                                 if2_instr[30:25], if2_instr[11:8], 1'b0};
      end else if (if2_instr[6:0] == OP_JAL) begin
        if2_redirect = 1'b1;
        if2_target   = if2.pc + {{11{if2_instr[31]}}, if2_instr[31], if2_instr[19:12],
                                 if2_instr[20], if2_instr[30:21], 1'b0};
      end
    end
    stall_req[0] = 1'b0;
    stall_req[1] = if2.valid && !if2_avail;
  end

  assign if2_adv     = if2.valid && !hold[1];
  assign if1_issue   = !drain && !pc_load && (!if2.valid || if2_adv) && f_req_ready;
  assign f_req_valid = !drain && !pc_load && (!if2.valid || if2_adv);
  assign f_req_addr  = pc;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc     <= RESET_PC;
      if2    <= '0;
      f_drop <= 1'b0;
    end else begin
      if (pc_load)        pc <= pc_target;
      else if (if1_issue) pc <= pc + 32'd4;

      // a response for a flushed fetch is thrown away
      if (f_drop && f_resp_valid) f_drop <= 1'b0;
      if (flush_young && if2.valid && if2.waiting && !if2.have && !f_resp_valid && !f_drop)
        f_drop <= 1'b1;

      if (flush_young) begin
        if2.valid <= 1'b0;
      end else if (if1_issue) begin
        if2.valid   <= 1'b1;
        if2.pc      <= pc;
        if2.pred    <= bp_pred;
        if2.waiting <= 1'b1;
        if2.have    <= 1'b0;
      end else if (if2_adv) begin
        if2.valid <= 1'b0;
      end else if (if2.valid && if2.waiting && f_resp_valid && !f_drop) begin
        if2.have    <= 1'b1;
        if2.waiting <= 1'b0;
        if2.instr   <= f_resp.rdata;
        if2.if_hit  <= f_resp.hit;
      end
    end
  end

  // ------------------------------------------------------------------
  // ID
  // ------------------------------------------------------------------
  decoded_t    id_d;
  logic [31:0] rs1_val, rs2_val;
  logic        rf_hazard, sys_hazard;
  logic [4:0]  fw_wen, fw_ready;
  logic [4:0]  fw_rd  [5];
  logic [31:0] fw_val [5];
  logic [31:0] ex1_result, mem2_result;
  logic        mem2_ready;

  decoder u_dec (.instr(id.instr), .d(id_d));

  function automatic logic late_result(input decoded_t d);
    return d.memk == MK_LOAD || d.memk == MK_AMO || d.memk == MK_LR || d.memk == MK_SC;
  endfunction

  always_comb begin
    fw_wen[0] = ex1.valid  && ex1.d.wb;  fw_rd[0] = ex1.d.rd;  fw_ready[0] = !late_result(ex1.d);  fw_val[0] = ex1_result;
    fw_wen[1] = ex2.valid  && ex2.d.wb;  fw_rd[1] = ex2.d.rd;  fw_ready[1] = !late_result(ex2.d);  fw_val[1] = ex2.result;
    fw_wen[2] = mem1.valid && mem1.d.wb; fw_rd[2] = mem1.d.rd; fw_ready[2] = !late_result(mem1.d); fw_val[2] = mem1.result;
    fw_wen[3] = mem2.valid && mem2.d.wb; fw_rd[3] = mem2.d.rd; fw_ready[3] = mem2_ready;           fw_val[3] = mem2_result;
    fw_wen[4] = wb.valid   && wb.d.wb;   fw_rd[4] = wb.d.rd;   fw_ready[4] = 1'b1;                 fw_val[4] = wb.result;
  end

  fwd_regfile u_rf (
    .clk, .rst,
    .rs1(id_d.rs1), .rs2(id_d.rs2), .use_rs1(id_d.use_rs1), .use_rs2(id_d.use_rs2),
    .fw_wen, .fw_rd, .fw_ready, .fw_val,
    .rs1_val, .rs2_val, .hazard(rf_hazard)
  );

  assign sys_hazard = id_d.system && ((ex1.valid && ex1.d.system) || (ex2.valid && ex2.d.system) ||
                                      (mem1.valid && mem1.d.system) || (mem2.valid && mem2.d.system) ||
                                      (wb.valid && wb.d.system));
  assign stall_req[2] = id.valid && (rf_hazard || sys_hazard);

  always_ff @(posedge clk) begin
    if (rst) begin
      id <= '0;
    end else if (flush_young) begin
      id.valid <= 1'b0;
    end else if (!hold[2]) begin
      id.valid  <= if2.valid && !hold[1];
      id.pc     <= if2.pc;
      id.instr  <= if2_instr;
      id.pnext  <= if2_redirect ? if2_target : if2.pc + 32'd4;
      id.if_hit <= if2_hit_now;
    end
  end

  // ------------------------------------------------------------------
  // EX1
  // ------------------------------------------------------------------
  logic [31:0] alu_a, alu_b, alu_y;
  logic        ex1_cmp;
  assign alu_a = ex1.d.a_pc ? ex1.pc : ex1.a;
  assign alu_b = ex1.d.b_imm ? ex1.d.imm : ex1.b;

  alu u_alu (.op(ex1.d.alu_op), .a(alu_a), .b(alu_b), .y(alu_y));

  always_comb begin
    unique case (ex1.d.funct3)
      3'b000:  ex1_cmp = (ex1.a == ex1.b);
      3'b001:  ex1_cmp = (ex1.a != ex1.b);
      3'b100:  ex1_cmp = ($signed(ex1.a) <  $signed(ex1.b));
      3'b101:  ex1_cmp = ($signed(ex1.a) >= $signed(ex1.b));
      3'b110:  ex1_cmp = (ex1.a <  ex1.b);
      default: ex1_cmp = (ex1.a >= ex1.b);
    endcase
    if (ex1.d.csr_op != CSR_NONE)                        ex1_result = csr_rdata;
    else if (ex1.d.ctl == BR_JAL || ex1.d.ctl == BR_JALR) ex1_result = ex1.pc + 32'd4;
    else                                                 ex1_result = alu_y;
  end
  assign stall_req[3] = 1'b0;

  always_ff @(posedge clk) begin
    if (rst) begin
      ex1 <= '0;
    end else if (flush_young) begin
      ex1.valid <= 1'b0;
    end else if (!hold[3]) begin
      ex1.valid  <= id.valid && !hold[2];
      ex1.pc     <= id.pc;
      ex1.d      <= id_d;
      ex1.a      <= rs1_val;
      ex1.b      <= rs2_val;
      ex1.pnext  <= id.pnext;
      ex1.if_hit <= id.if_hit;
    end
  end

  // ------------------------------------------------------------------
  // EX2
  // ------------------------------------------------------------------
  always_comb begin
    ex2_next = ex2.taken ? ex2.target : ex2.pc + 32'd4;
    ex2_redirect = ex2.valid && (ex2_next != ex2.pnext);
  end
  assign stall_req[4] = 1'b0;

  always_ff @(posedge clk) begin
    if (rst) begin
      ex2 <= '0;
    end else if (!hold[4]) begin
      ex2.valid   <= ex1.valid && !hold[3] && !flush_young;
      ex2.pc      <= ex1.pc;
      ex2.d       <= ex1.d;
      ex2.result  <= ex1_result;
      ex2.b       <= ex1.b;
      ex2.csr_src <= ex1.d.csr_imm ? ex1.d.imm : ex1.a;
      ex2.pnext   <= ex1.pnext;
      ex2.if_hit  <= ex1.if_hit;
      unique case (ex1.d.ctl)
        BR_BRANCH: begin ex2.taken <= ex1_cmp; ex2.target <= ex1.pc + ex1.d.imm; end
        BR_JAL:    begin ex2.taken <= 1'b1;    ex2.target <= ex1.pc + ex1.d.imm; end
        BR_JALR:   begin ex2.taken <= 1'b1;    ex2.target <= {alu_y[31:1], 1'b0}; end
        BR_TRAP:   begin ex2.taken <= 1'b1;    ex2.target <= mtvec; end
        BR_MRET:   begin ex2.taken <= 1'b1;    ex2.target <= mepc; end
        default:   begin ex2.taken <= 1'b0;    ex2.target <= ex1.pc + 32'd4; end
      endcase
    end
  end

  // ------------------------------------------------------------------
  // MEM1
  // ------------------------------------------------------------------
  logic        resv_valid;
  logic [31:0] resv_addr;
  logic        sc_ok, mem1_need;
  logic [3:0]  st_be;

  always_comb begin
    sc_ok     = resv_valid && (resv_addr[31:2] == mem1.result[31:2]);
    mem1_need = mem1.valid && (mem1.d.memk == MK_LOAD || mem1.d.memk == MK_STORE ||
                               mem1.d.memk == MK_AMO || mem1.d.memk == MK_LR ||
                               (mem1.d.memk == MK_SC && sc_ok));
    unique case (mem1.d.funct3[1:0])
      2'b00:   st_be = 4'b0001 << mem1.result[1:0];
      2'b01:   st_be = 4'b0011 << mem1.result[1:0];
      default: st_be = 4'b1111;
    endcase
    d_req       = '0;
    d_req.addr  = {mem1.result[31:2], 2'b00};
    d_req.amo   = mem1.d.amo;
    unique case (mem1.d.memk)
      MK_STORE: begin d_req.op = MEM_STORE; d_req.be = st_be; d_req.wdata = mem1.b << {mem1.result[1:0], 3'b000}; end
      MK_SC:    begin d_req.op = MEM_STORE; d_req.be = 4'hF;  d_req.wdata = mem1.b; end
      MK_AMO:   begin d_req.op = MEM_AMO;   d_req.be = 4'hF;  d_req.wdata = mem1.b; end
      default:  begin d_req.op = MEM_LOAD;  d_req.be = 4'h0;  d_req.wdata = '0; end
    endcase
    d_req_valid  = mem1_need && !stall_req[6];
    stall_req[5] = mem1_need && !d_req_ready;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      resv_valid <= 1'b0;
      resv_addr  <= '0;
    end else if (mem1.valid && !hold[5]) begin
      if (mem1.d.memk == MK_LR) begin
        resv_valid <= 1'b1;
        resv_addr  <= mem1.result;
      end else if (mem1.d.memk == MK_SC) begin
        resv_valid <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mem1 <= '0;
    end else if (!hold[5]) begin
      mem1.valid    <= ex2.valid && !hold[4];
      mem1.pc       <= ex2.pc;
      mem1.d        <= ex2.d;
      mem1.result   <= ex2.result;
      mem1.b        <= ex2.b;
      mem1.csr_src  <= ex2.csr_src;
      mem1.pred_ok  <= !ex2_redirect;
      mem1.backward <= (ex2.target <= ex2.pc);
      mem1.if_hit   <= ex2.if_hit;
    end
  end

  // ------------------------------------------------------------------
  // MEM2
  // ------------------------------------------------------------------
  logic [31:0] ld_word;
  always_comb begin
    ld_word = d_resp.rdata >> {mem2.off, 3'b000};
    mem2_result = mem2.result;
    if (mem2.req) begin
      unique case (mem2.d.memk)
        MK_LOAD: unique case (mem2.d.funct3)
          3'b000:  mem2_result = {{24{ld_word[7]}}, ld_word[7:0]};
          3'b001:  mem2_result = {{16{ld_word[15]}}, ld_word[15:0]};
          3'b100:  mem2_result = {24'd0, ld_word[7:0]};
          3'b101:  mem2_result = {16'd0, ld_word[15:0]};
          default: mem2_result = d_resp.rdata;
        endcase
        MK_SC:   mem2_result = 32'd0;
        MK_AMO, MK_LR: mem2_result = d_resp.rdata;
        default: mem2_result = mem2.result;
      endcase
    end
    mem2_ready   = !mem2.req || d_resp_valid;
    stall_req[6] = mem2.valid && mem2.req && !d_resp_valid;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mem2 <= '0;
    end else if (!hold[6]) begin
      mem2.valid    <= mem1.valid && !hold[5];
      mem2.pc       <= mem1.pc;
      mem2.d        <= mem1.d;
      mem2.result   <= (mem1.d.memk == MK_SC) ? (sc_ok ? 32'd0 : 32'd1) : mem1.result;
      mem2.off      <= mem1.result[1:0];
      mem2.req      <= mem1_need && !hold[5];
      mem2.csr_src  <= mem1.csr_src;
      mem2.pred_ok  <= mem1.pred_ok;
      mem2.backward <= mem1.backward;
      mem2.if_hit   <= mem1.if_hit;
    end
  end

  // ------------------------------------------------------------------
  // WB
  // ------------------------------------------------------------------
  assign stall_req[7] = 1'b0;

  always_ff @(posedge clk) begin
    if (rst) begin
      wb <= '0;
    end else begin
      wb.valid    <= mem2.valid && !hold[6];
      wb.pc       <= mem2.pc;
      wb.d        <= mem2.d;
      wb.result   <= mem2_result;
      wb.csr_src  <= mem2.csr_src;
      wb.pred_ok  <= mem2.pred_ok;
      wb.backward <= mem2.backward;
      wb.if_hit   <= mem2.if_hit;
      wb.is_mem   <= mem2.req;
      wb.d_hit    <= d_resp.hit;
    end
  end

  assign retire_valid = wb.valid;
  assign retire_pc    = wb.pc;

  // ------------------------------------------------------------------
  // Control flow, CSRs, interrupts, counters
  // ------------------------------------------------------------------
  assign pipe_empty = !if2.valid && !id.valid && !ex1.valid && !ex2.valid &&
                      !mem1.valid && !mem2.valid && !wb.valid;

  control_flow u_cf (
    .stall_req, .ex2_redirect, .ex2_target(ex2_next), .if2_redirect, .if2_target,
    .irq_pending, .pipe_empty, .trap_vector(mtvec),
    .hold, .flush_young, .drain, .take_irq, .pc_load, .pc_target
  );

  logic wb_trap;
  assign wb_trap = wb.valid && wb.d.ctl == BR_TRAP;

  logic [63:0] perf [NUM_PERF];

  csr_file u_csr (
    .clk, .rst,
    .rd_addr(ex1.d.csr_addr), .rd_data(csr_rdata),
    .wr_valid(wb.valid && wb.d.csr_op != CSR_NONE), .wr_op(wb.d.csr_op),
    .wr_addr(wb.d.csr_addr), .wr_src(wb.csr_src),
    .trap_valid(wb_trap || take_irq), .trap_irq(take_irq),
    .trap_cause(take_irq ? irq_cause : wb.d.trap_cause),
    .trap_epc(take_irq ? pc : wb.pc), .trap_tval(32'd0),
    .mret_valid(wb.valid && wb.d.ctl == BR_MRET),
    .mtvec, .mepc, .mstatus_mie, .mie,
    .mip, .perf, .time_val, .timecmp_val, .kb_data, .kb_valid,
    .tcmp_we, .tcmp_hi, .tcmp_wdata, .kb_ack
  );

  interrupt_controller u_pic (
    .clk, .rst, .timer_irq, .kbd_irq(kb_valid), .mstatus_mie, .mie,
    .mip, .irq_pending, .irq_cause
  );

  perf_counters u_perf (
    .clk, .rst,
    .retire(wb.valid),
    .is_branch(wb.d.ctl == BR_BRANCH),
    .is_jump(wb.d.ctl == BR_JAL || wb.d.ctl == BR_JALR),
    .backward(wb.backward), .predicted_ok(wb.pred_ok),
    .if_hit(wb.if_hit), .is_mem(wb.is_mem), .d_hit(wb.d_hit),
    .count(perf)
  );

  // ------------------------------------------------------------------
  // Checks
  // ------------------------------------------------------------------
  // only one SYSTEM instruction may be in EX1..WB at a time
  a_one_system: assert property (@(posedge clk) disable iff (rst)
    $onehot0({ex1.valid && ex1.d.system, ex2.valid && ex2.d.system, mem1.valid && mem1.d.system,
              mem2.valid && mem2.d.system, wb.valid && wb.d.system}));
  // a data response only arrives for an outstanding request in MEM2
  a_resp_expected: assert property (@(posedge clk) disable iff (rst)
    d_resp_valid |-> (mem2.valid && mem2.req));
endmodule
