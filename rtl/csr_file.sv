// csr_file: machine-mode control and status registers.
//
// Read port (EX1): rd_addr -> rd_data, combinational. Reads are made in EX1;
// this is safe because the decode stage lets only one SYSTEM instruction
// into the pipeline at a time, so no older CSR write is still in flight.
// Write port (WB): when a CSR instruction retires, wr_op (RW/RS/RC) is applied
// to the register at wr_addr with wr_src. Registers: mstatus (MIE bit 3,
// MPIE bit 7, MPP fixed to machine mode), misa (RV32IA), mie, mip (read
// only, from the interrupt controller), mtvec (direct mode only), mscratch,
// mepc, mcause, mtval, mhartid = 0, the performance counters (read only)
// and three custom CSRs: timer compare low/high (0x7C0/0x7C1, forwarded to
// the timer controller) and keyboard data (0xFC0, read only; retiring a
// read of it acknowledges the character).
// Trap entry (trap_valid, one cycle) saves epc, cause and tval, sets
// MPIE = MIE and clears MIE; mret_valid restores MIE from MPIE. Trap entry
// and a CSR write never coincide: a trap is taken either by a retiring
// ECALL/EBREAK/illegal instruction (no CSR write) or on an empty pipeline.
// The CSR set follows the RISC-V privileged architecture v1.10 as the
// document requires; the custom CSRs are this design's own choice.
module csr_file (
  input  logic        clk,
  input  logic        rst,
  // read
  input  logic [11:0] rd_addr,
  output logic [31:0] rd_data,
  // write at retirement
  input  logic        wr_valid,
  input  rv_pkg::csr_op_e wr_op,
  input  logic [11:0] wr_addr,
  input  logic [31:0] wr_src,
  // traps
  input  logic        trap_valid,
  input  logic        trap_irq,
  input  logic [3:0]  trap_cause,
  input  logic [31:0] trap_epc,
  input  logic [31:0] trap_tval,
  input  logic        mret_valid,
  // state out
  output logic [31:0] mtvec,
  output logic [31:0] mepc,
  output logic        mstatus_mie,
  output logic [31:0] mie,
  // sources
  input  logic [31:0] mip,
  input  logic [63:0] perf [rv_pkg::NUM_PERF],
  input  logic [63:0] time_val,
  input  logic [63:0] timecmp_val,
  input  logic [7:0]  kb_data,
  input  logic        kb_valid,
  // side effects
  output logic        tcmp_we,
  output logic        tcmp_hi,
  output logic [31:0] tcmp_wdata,
  output logic        kb_ack
);
  import rv_pkg::*;

  logic        mpie;
  logic [31:0] mscratch, mcause, mtval;

  function automatic logic [31:0] read_csr(input logic [11:0] a,
                                           input logic m_ie, input logic m_pie,
                                           input logic [31:0] v_mie, input logic [31:0] v_mip,
                                           input logic [31:0] v_mtvec, input logic [31:0] v_mscratch,
                                           input logic [31:0] v_mepc, input logic [31:0] v_mcause,
                                           input logic [31:0] v_mtval);
    logic [31:0] v;
    v = '0;
    unique case (a)
      CSR_MSTATUS:  v = {19'd0, 2'b11, 3'd0, m_pie, 3'd0, m_ie, 3'd0};
      CSR_MISA:     v = 32'h4000_0101;  // MXL=1, A and I
      CSR_MIE:      v = v_mie;
      CSR_MIP:      v = v_mip;
      CSR_MTVEC:    v = v_mtvec;
      CSR_MSCRATCH: v = v_mscratch;
      CSR_MEPC:     v = v_mepc;
      CSR_MCAUSE:   v = v_mcause;
      CSR_MTVAL:    v = v_mtval;
      CSR_MHARTID:  v = '0;
      default:      v = '0;
    endcase
    return v;
  endfunction

  logic [4:0] pidx;
  always_comb begin
    rd_data = read_csr(rd_addr, mstatus_mie, mpie, mie, mip, mtvec, mscratch, mepc, mcause, mtval);
    pidx = rd_addr[4:0];
    if ((rd_addr[11:8] == 4'hB || rd_addr[11:8] == 4'hC) && rd_addr[6:5] == 2'b00
        && pidx < 5'(NUM_PERF)) begin
      rd_data = rd_addr[7] ? perf[pidx[3:0]][63:32] : perf[pidx[3:0]][31:0];
    end
    if (rd_addr == CSR_TIME)      rd_data = time_val[31:0];
    if (rd_addr == CSR_TIMEH)     rd_data = time_val[63:32];
    if (rd_addr == CSR_MTIMECMP)  rd_data = timecmp_val[31:0];
    if (rd_addr == CSR_MTIMECMPH) rd_data = timecmp_val[63:32];
    if (rd_addr == CSR_KBDATA)    rd_data = {23'd0, kb_valid, kb_data};
  end

  // value written back by a retiring CSR instruction
  logic [31:0] old_w, new_w;
  always_comb begin
    old_w = read_csr(wr_addr, mstatus_mie, mpie, mie, mip, mtvec, mscratch, mepc, mcause, mtval);
    if (wr_addr == CSR_MTIMECMP)  old_w = timecmp_val[31:0];
    if (wr_addr == CSR_MTIMECMPH) old_w = timecmp_val[63:32];
    unique case (wr_op)
      CSR_RW:  new_w = wr_src;
      CSR_RS:  new_w = old_w | wr_src;
      CSR_RC:  new_w = old_w & ~wr_src;
      default: new_w = old_w;
    endcase
  end

  assign tcmp_we    = wr_valid && (wr_addr == CSR_MTIMECMP || wr_addr == CSR_MTIMECMPH);
  assign tcmp_hi    = (wr_addr == CSR_MTIMECMPH);
  assign tcmp_wdata = new_w;
  assign kb_ack     = wr_valid && (wr_addr == CSR_KBDATA);

  always_ff @(posedge clk) begin
    if (rst) begin
      mstatus_mie <= 1'b0;
      mpie        <= 1'b0;
      mie         <= '0;
      mtvec       <= '0;
      mscratch    <= '0;
      mepc        <= '0;
      mcause      <= '0;
      mtval       <= '0;
    end else if (trap_valid) begin
      mepc        <= {trap_epc[31:2], 2'b00};
      mcause      <= {trap_irq, 27'd0, trap_cause};
      mtval       <= trap_tval;
      mpie        <= mstatus_mie;
      mstatus_mie <= 1'b0;
    end else if (mret_valid) begin
      mstatus_mie <= mpie;
      mpie        <= 1'b1;
    end else if (wr_valid) begin
      unique case (wr_addr)
        CSR_MSTATUS:  begin mstatus_mie <= new_w[3]; mpie <= new_w[7]; end
        CSR_MIE:      mie      <= new_w & 32'h0000_0880;
        CSR_MTVEC:    mtvec    <= {new_w[31:2], 2'b00};
        CSR_MSCRATCH: mscratch <= new_w;
        CSR_MEPC:     mepc     <= {new_w[31:2], 2'b00};
        CSR_MCAUSE:   mcause   <= new_w;
        CSR_MTVAL:    mtval    <= new_w;
        default: ;
      endcase
    end
  end
endmodule
