// rv_pkg: types and constants shared by the core, the memory system and the
// peripherals of the RV32IA system.
//
// Memory ports (fetch, data, VGA) use one request struct and one response
// struct. A port carries a single outstanding operation: a request is taken
// when req_valid and req_ready are both high, and exactly one resp_valid
// pulse answers it later (one cycle later on a cache hit). Loads and stores
// always move a full aligned 32-bit word; byte enables select the bytes a
// store writes. Atomic memory operations (the A extension's AMO*.W) are
// carried out inside the memory, which returns the old word.
//
// The address map, CSR numbers and opcode encodings follow the RISC-V
// specifications except where marked as this design's own choice.
package rv_pkg;

  localparam int unsigned XLEN = 32;

  // ---------------------------------------------------------------------
  // Address map (own choice): main memory from 0, video memory at 0x8000_0000.
  // ---------------------------------------------------------------------
  localparam logic [31:0] VRAM_BASE = 32'h8000_0000;

  // ---------------------------------------------------------------------
  // Memory port
  // ---------------------------------------------------------------------
  typedef enum logic [1:0] {
    MEM_LOAD  = 2'd0,
    MEM_STORE = 2'd1,
    MEM_AMO   = 2'd2
  } mem_op_e;

  // AMO function, funct5 of the A extension
  typedef enum logic [4:0] {
    AMO_ADD  = 5'b00000,
    AMO_SWAP = 5'b00001,
    AMO_XOR  = 5'b00100,
    AMO_OR   = 5'b01000,
    AMO_AND  = 5'b01100,
    AMO_MIN  = 5'b10000,
    AMO_MAX  = 5'b10100,
    AMO_MINU = 5'b11000,
    AMO_MAXU = 5'b11100
  } amo_e;

  typedef struct packed {
    mem_op_e     op;
    amo_e        amo;
    logic [31:0] addr;   // byte address, bits [1:0] ignored
    logic [31:0] wdata;
    logic [3:0]  be;     // byte enables for stores
  } mem_req_t;

  typedef struct packed {
    logic [31:0] rdata;
    logic        hit;    // served from the cache (or VRAM) without a DRAM access
  } mem_resp_t;

  // Cache line transfer between main memory and the DRAM controller
  localparam int unsigned LINE_WORDS = 16;           // 64-byte line
  typedef logic [LINE_WORDS*32-1:0] line_t;

  // ---------------------------------------------------------------------
  // Opcodes
  // ---------------------------------------------------------------------
  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_AUIPC  = 7'b0010111;
  localparam logic [6:0] OP_JAL    = 7'b1101111;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_REG    = 7'b0110011;
  localparam logic [6:0] OP_FENCE  = 7'b0001111;
  localparam logic [6:0] OP_SYSTEM = 7'b1110011;
  localparam logic [6:0] OP_AMO    = 7'b0101111;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR, ALU_SRL, ALU_SRA,
    ALU_OR, ALU_AND, ALU_PASSB
  } alu_op_e;

  typedef enum logic [2:0] {
    BR_NONE, BR_BRANCH, BR_JAL, BR_JALR, BR_TRAP, BR_MRET
  } ctl_e;

  typedef enum logic [2:0] {
    MK_NONE, MK_LOAD, MK_STORE, MK_AMO, MK_LR, MK_SC
  } memkind_e;

  typedef enum logic [1:0] {
    CSR_NONE, CSR_RW, CSR_RS, CSR_RC
  } csr_op_e;

  // Decoded instruction, carried down the pipeline
  typedef struct packed {
    logic        legal;
    logic        system;     // SYSTEM class: CSR access, ECALL, EBREAK, MRET, or illegal
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic [4:0]  rd;
    logic        use_rs1;
    logic        use_rs2;
    logic        wb;         // writes rd
    logic [31:0] imm;
    alu_op_e     alu_op;
    logic        a_pc;       // operand A is the pc
    logic        b_imm;      // operand B is the immediate
    ctl_e        ctl;
    logic [2:0]  funct3;
    memkind_e    memk;
    amo_e        amo;
    csr_op_e     csr_op;
    logic        csr_imm;    // CSR source is the 5-bit zimm
    logic [11:0] csr_addr;
    logic [3:0]  trap_cause; // exception cause when ctl == BR_TRAP
  } decoded_t;

  // ---------------------------------------------------------------------
  // CSR numbers
  // ---------------------------------------------------------------------
  localparam logic [11:0] CSR_MSTATUS  = 12'h300;
  localparam logic [11:0] CSR_MISA     = 12'h301;
  localparam logic [11:0] CSR_MIE      = 12'h304;
  localparam logic [11:0] CSR_MTVEC    = 12'h305;
  localparam logic [11:0] CSR_MSCRATCH = 12'h340;
  localparam logic [11:0] CSR_MEPC     = 12'h341;
  localparam logic [11:0] CSR_MCAUSE   = 12'h342;
  localparam logic [11:0] CSR_MTVAL    = 12'h343;
  localparam logic [11:0] CSR_MIP      = 12'h344;
  localparam logic [11:0] CSR_MHARTID  = 12'hF14;
  localparam logic [11:0] CSR_TIME     = 12'hC01;
  localparam logic [11:0] CSR_TIMEH    = 12'hC81;
  // Own choice: timer compare and keyboard data in the custom machine ranges
  localparam logic [11:0] CSR_MTIMECMP  = 12'h7C0;
  localparam logic [11:0] CSR_MTIMECMPH = 12'h7C1;
  localparam logic [11:0] CSR_KBDATA    = 12'hFC0;

  // Performance counter indices (mhpmcounterN, N = 0..14, at 0xB00+N and
  // 0xB80+N for the upper half; user read-only copies at 0xC00+N / 0xC80+N)
  localparam int unsigned NUM_PERF = 15;
  localparam int unsigned PC_CYCLE      = 0;
  localparam int unsigned PC_INSTRET    = 2;
  localparam int unsigned PC_FBR_TOTAL  = 3;   // forward conditional branches
  localparam int unsigned PC_FBR_OK     = 4;
  localparam int unsigned PC_BBR_TOTAL  = 5;   // backward conditional branches
  localparam int unsigned PC_BBR_OK     = 6;
  localparam int unsigned PC_FJ_TOTAL   = 7;   // forward jumps
  localparam int unsigned PC_FJ_OK      = 8;
  localparam int unsigned PC_BJ_TOTAL   = 9;   // backward jumps
  localparam int unsigned PC_BJ_OK      = 10;
  localparam int unsigned PC_IF_TOTAL   = 11;  // instruction fetches of retired instructions
  localparam int unsigned PC_IF_HIT     = 12;
  localparam int unsigned PC_D_TOTAL    = 13;  // data accesses of retired instructions
  localparam int unsigned PC_D_HIT      = 14;

  // Exception and interrupt causes
  localparam logic [3:0] EXC_ILLEGAL = 4'd2;
  localparam logic [3:0] EXC_BREAK   = 4'd3;
  localparam logic [3:0] EXC_ECALL_M = 4'd11;
  localparam logic [3:0] IRQ_TIMER   = 4'd7;
  localparam logic [3:0] IRQ_EXT     = 4'd11;

  // AMO arithmetic, shared by main memory and video memory
  function automatic logic [31:0] amo_calc(amo_e f, logic [31:0] old, logic [31:0] src);
    unique case (f)
      AMO_SWAP: amo_calc = src;
      AMO_ADD:  amo_calc = old + src;
      AMO_XOR:  amo_calc = old ^ src;
      AMO_OR:   amo_calc = old | src;
      AMO_AND:  amo_calc = old & src;
      AMO_MIN:  amo_calc = ($signed(old) < $signed(src)) ? old : src;
      AMO_MAX:  amo_calc = ($signed(old) > $signed(src)) ? old : src;
      AMO_MINU: amo_calc = (old < src) ? old : src;
      AMO_MAXU: amo_calc = (old > src) ? old : src;
      default:  amo_calc = src;
    endcase
  endfunction

  // Byte-enable merge of a store into an old word
  function automatic logic [31:0] merge_be(logic [31:0] old, logic [31:0] nw, logic [3:0] be);
    for (int i = 0; i < 4; i++)
      merge_be[i*8 +: 8] = be[i] ? nw[i*8 +: 8] : old[i*8 +: 8];
  endfunction

endpackage
