// tb_csr_file: CSR read/write/set/clear, trap entry and MRET, counter and
// time reads, timer-compare forwarding and keyboard acknowledge.
module tb_csr_file;
  import rv_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [11:0] rd_addr, wr_addr;
  logic [31:0] rd_data, wr_src, trap_epc, trap_tval, mtvec, mepc, mie, mip, tcmp_wdata;
  logic wr_valid, trap_valid, trap_irq, mret_valid, mstatus_mie, kb_valid, tcmp_we, tcmp_hi, kb_ack;
  csr_op_e wr_op;
  logic [3:0] trap_cause;
  logic [63:0] perf [NUM_PERF];
  logic [63:0] time_val, timecmp_val;
  logic [7:0] kb_data;
  csr_file dut (.*);
  int checks = 0, failures = 0;

  task automatic chk(input string w, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h", w, got, exp); end
  endtask
  task automatic csr_write(input logic [11:0] a, input csr_op_e op, input logic [31:0] v);
    @(negedge clk); wr_valid = 1; wr_addr = a; wr_op = op; wr_src = v;
    @(negedge clk); wr_valid = 0;
  endtask
  task automatic rchk(input string w, input logic [11:0] a, input logic [31:0] exp, input logic [31:0] mask = 32'hFFFF_FFFF);
    rd_addr = a; #1;
    chk(w, rd_data & mask, exp);
  endtask

  initial begin
    wr_valid = 0; trap_valid = 0; trap_irq = 0; mret_valid = 0; wr_op = CSR_NONE;
    wr_addr = 0; wr_src = 0; trap_cause = 0; trap_epc = 0; trap_tval = 0; rd_addr = 0;
    mip = 32'h80; kb_valid = 1; kb_data = 8'h41;
    for (int i = 0; i < NUM_PERF; i++) perf[i] = 64'h1_0000_0000 * i + 100 + i;
    time_val = 64'h0000_0005_0000_0007; timecmp_val = 64'h1234_5678_9ABC_DEF0;
    repeat (2) @(posedge clk); rst = 0;
    csr_write(CSR_MTVEC, CSR_RW, 32'h0000_0123);
    chk("mtvec aligned", mtvec, 32'h120);
    csr_write(CSR_MSCRATCH, CSR_RW, 32'hF0F0_0000);
    csr_write(CSR_MSCRATCH, CSR_RS, 32'h0000_000F);
    csr_write(CSR_MSCRATCH, CSR_RC, 32'h00F0_0000);
    rchk("mscratch", CSR_MSCRATCH, 32'hF000_000F);
    csr_write(CSR_MIE, CSR_RW, 32'hFFFF_FFFF);
    chk("mie mask", mie, 32'h880);
    csr_write(CSR_MSTATUS, CSR_RS, 32'h8);
    chk("mstatus MIE", {31'd0, mstatus_mie}, 1);
    rchk("mip", CSR_MIP, 32'h80);
    rchk("misa", CSR_MISA, 32'h4000_0101);
    rchk("minstret", 12'hB02, 32'd102);
    rchk("mhpmcounter14h", 12'hB8E, 32'd14);
    rchk("time", CSR_TIME, 7);
    rchk("timeh", CSR_TIMEH, 5);
    rchk("mtimecmp", CSR_MTIMECMP, 32'h9ABC_DEF0);
    rchk("kbdata", CSR_KBDATA, 32'h141);
    // trap entry
    @(negedge clk); trap_valid = 1; trap_irq = 1; trap_cause = 7; trap_epc = 32'h400; trap_tval = 0;
    @(negedge clk); trap_valid = 0;
    chk("mepc", mepc, 32'h400);
    rchk("mcause", CSR_MCAUSE, 32'h8000_0007);
    chk("MIE cleared", {31'd0, mstatus_mie}, 0);
    rchk("MPIE set", CSR_MSTATUS, 32'h80, 32'h88);
    @(negedge clk); mret_valid = 1; @(negedge clk); mret_valid = 0;
    chk("MIE restored", {31'd0, mstatus_mie}, 1);
    // timer compare and keyboard side effects (combinational on the write port)
    @(negedge clk); wr_valid = 1; wr_addr = CSR_MTIMECMPH; wr_op = CSR_RW; wr_src = 32'hAB; #1;
    chk("tcmp_we", {29'd0, tcmp_we, tcmp_hi, kb_ack}, 3'b110);
    chk("tcmp_wdata", tcmp_wdata, 32'hAB);
    wr_addr = CSR_KBDATA; wr_op = CSR_RS; wr_src = 0; #1;
    chk("kb_ack", {29'd0, tcmp_we, tcmp_hi, kb_ack}, 3'b001);
    @(negedge clk); wr_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
