// decoder: combinational RV32IA + Zicsr instruction decoder for the ID stage.
//
// It turns a 32-bit instruction into the decoded_t control bundle that the
// instruction carries down the pipeline: register numbers and their use,
// the immediate, ALU function and operand selection, control-transfer kind,
// memory access kind and CSR operation. SYSTEM-class instructions (CSR
// accesses, ECALL, EBREAK, MRET, WFI) and any instruction that does not
// decode are flagged `system`; ECALL, EBREAK and illegal instructions become
// traps (ctl = BR_TRAP with their exception cause) that EX2 resolves like a
// jump to the trap vector. FENCE, FENCE.I and WFI execute as no-operations:
// with one cache shared by fetch and data and a single memory operation per
// port, memory is always coherent. The multiply/divide extension is not
// decoded (illegal), matching the synthesized design of the document.
module decoder (
  input  logic [31:0]      instr,
  output rv_pkg::decoded_t d
);
  import rv_pkg::*;

  logic [6:0] opc;
  logic [2:0] f3;
  logic [6:0] f7;
  logic [31:0] imm_i, imm_s, imm_b, imm_u, imm_j;

  always_comb begin
    opc   = instr[6:0];
    f3    = instr[14:12];
    f7    = instr[31:25];
    imm_i = {{20{instr[31]}}, instr[31:20]};
    imm_s = {{20{instr[31]}}, instr[31:25], instr[11:7]};
    imm_b = {{19{instr[31]}}, instr[31], instr[7], instr[30:25], instr[11:8], 1'b0};
    imm_u = {instr[31:12], 12'd0};
    imm_j = {{11{instr[31]}}, instr[31], instr[19:12], instr[20], instr[30:21], 1'b0};

    d            = '0;
    d.legal      = 1'b1;
    d.rs1        = instr[19:15];
    d.rs2        = instr[24:20];
    d.rd         = instr[11:7];
    d.funct3     = f3;
    d.alu_op     = ALU_ADD;
    d.ctl        = BR_NONE;
    d.memk       = MK_NONE;
    d.csr_op     = CSR_NONE;
    d.amo        = amo_e'(instr[31:27]);
    d.csr_addr   = instr[31:20];

    unique case (opc)
      OP_LUI:   begin d.wb = 1'b1; d.imm = imm_u; d.b_imm = 1'b1; d.alu_op = ALU_PASSB; end
      OP_AUIPC: begin d.wb = 1'b1; d.imm = imm_u; d.b_imm = 1'b1; d.a_pc = 1'b1; end
      OP_JAL:   begin d.wb = 1'b1; d.imm = imm_j; d.ctl = BR_JAL; end
      OP_JALR:  begin
        d.wb = 1'b1; d.imm = imm_i; d.b_imm = 1'b1; d.use_rs1 = 1'b1; d.ctl = BR_JALR;
        d.legal = (f3 == 3'b000);
      end
      OP_BRANCH: begin
        d.imm = imm_b; d.use_rs1 = 1'b1; d.use_rs2 = 1'b1; d.ctl = BR_BRANCH;
        d.legal = (f3 != 3'b010) && (f3 != 3'b011);
      end
      OP_LOAD: begin
        d.wb = 1'b1; d.imm = imm_i; d.b_imm = 1'b1; d.use_rs1 = 1'b1; d.memk = MK_LOAD;
        d.legal = (f3 == 3'b000) || (f3 == 3'b001) || (f3 == 3'b010) || (f3 == 3'b100) || (f3 == 3'b101);
      end
      OP_STORE: begin
        d.imm = imm_s; d.b_imm = 1'b1; d.use_rs1 = 1'b1; d.use_rs2 = 1'b1; d.memk = MK_STORE;
        d.legal = (f3 == 3'b000) || (f3 == 3'b001) || (f3 == 3'b010);
      end
      OP_IMM, OP_REG: begin
        d.wb = 1'b1; d.use_rs1 = 1'b1;
        d.use_rs2 = (opc == OP_REG);
        d.b_imm   = (opc == OP_IMM);
        d.imm     = imm_i;
        unique case (f3)
          3'b000: d.alu_op = (opc == OP_REG && f7[5]) ? ALU_SUB : ALU_ADD;
          3'b001: d.alu_op = ALU_SLL;
          3'b010: d.alu_op = ALU_SLT;
          3'b011: d.alu_op = ALU_SLTU;
          3'b100: d.alu_op = ALU_XOR;
          3'b101: d.alu_op = f7[5] ? ALU_SRA : ALU_SRL;
          3'b110: d.alu_op = ALU_OR;
          default: d.alu_op = ALU_AND;
        endcase
        if (opc == OP_REG)
          d.legal = (f7 == 7'b0000000) || (f7 == 7'b0100000 && (f3 == 3'b000 || f3 == 3'b101));
        else if (f3 == 3'b001)
          d.legal = (f7 == 7'b0000000);
        else if (f3 == 3'b101)
          d.legal = (f7 == 7'b0000000) || (f7 == 7'b0100000);
      end
      OP_FENCE: begin
        d.legal = (f3 == 3'b000) || (f3 == 3'b001);
      end
      OP_AMO: begin
        d.wb = 1'b1; d.use_rs1 = 1'b1; d.b_imm = 1'b1;  // address = rs1 + 0
        d.legal = (f3 == 3'b010);
        if (instr[31:27] == 5'b00010) begin
          d.memk = MK_LR;
          d.legal = d.legal && (instr[24:20] == 5'd0);
        end else if (instr[31:27] == 5'b00011) begin
          d.memk = MK_SC; d.use_rs2 = 1'b1;
        end else begin
          d.memk = MK_AMO; d.use_rs2 = 1'b1;
          unique case (instr[31:27])
            5'b00000, 5'b00001, 5'b00100, 5'b01000, 5'b01100,
            5'b10000, 5'b10100, 5'b11000, 5'b11100: ;
            default: d.legal = 1'b0;
          endcase
        end
      end
      OP_SYSTEM: begin
        d.system = 1'b1;
        if (f3 == 3'b000) begin
          unique case (instr[31:20])
            12'h000: begin d.ctl = BR_TRAP; d.trap_cause = EXC_ECALL_M; end
            12'h001: begin d.ctl = BR_TRAP; d.trap_cause = EXC_BREAK; end
            12'h302: d.ctl = BR_MRET;
            12'h105: ;  // WFI
            default: d.legal = 1'b0;
          endcase
        end else if (f3 == 3'b100) begin
          d.legal = 1'b0;
        end else begin
          d.wb      = 1'b1;
          d.csr_imm = f3[2];
          d.use_rs1 = !f3[2];
          d.imm     = {27'd0, instr[19:15]};
          unique case (f3[1:0])
            2'b01:   d.csr_op = CSR_RW;
            2'b10:   d.csr_op = CSR_RS;
            default: d.csr_op = CSR_RC;
          endcase
        end
      end
      default: d.legal = 1'b0;
    endcase

    if (!d.legal) begin
      d.system     = 1'b1;
      d.wb         = 1'b0;
      d.use_rs1    = 1'b0;
      d.use_rs2    = 1'b0;
      d.memk       = MK_NONE;
      d.csr_op     = CSR_NONE;
      d.ctl        = BR_TRAP;
      d.trap_cause = EXC_ILLEGAL;
    end
    if (d.rd == 5'd0) d.wb = 1'b0;
  end
endmodule
