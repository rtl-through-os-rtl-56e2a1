// fwd_regfile: the 32 x 32-bit integer register file with operand forwarding
// into the decode stage.
//
// ID reads rs1 and rs2. Each of the five later stages (EX1, EX2, MEM1, MEM2,
// WB, in that order of age, youngest first) offers a forwarding candidate:
// whether it writes a register, which one, whether its result is already
// computed this cycle, and the value. For each source the youngest matching
// stage wins; if that stage's result is not yet computed (a load before the
// end of MEM2, for example) the source is not resolvable and `hazard` is
// raised so that ID requests a stall. With no match the register array is
// read; the WB candidate is also the write port, so a register written this
// cycle is seen by a read in the same cycle. x0 always reads zero.
// Forwarding from the ends of EX1, EX2, MEM1, MEM2 and WB follows the
// document; the interface is this design's own.
module fwd_regfile (
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  rs1,
  input  logic [4:0]  rs2,
  input  logic        use_rs1,
  input  logic        use_rs2,
  // candidates, index 0 = EX1 ... 4 = WB
  input  logic [4:0]  fw_wen,
  input  logic [4:0]  fw_rd   [5],
  input  logic [4:0]  fw_ready,
  input  logic [31:0] fw_val  [5],
  output logic [31:0] rs1_val,
  output logic [31:0] rs2_val,
  output logic        hazard
);
  logic [31:0] regs [32];

  // register write at WB
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (fw_wen[4] && fw_ready[4] && fw_rd[4] != 5'd0) begin
      regs[fw_rd[4]] <= fw_val[4];
    end
  end

  function automatic logic [32:0] pick(input logic [4:0] r,
                                       input logic [4:0] wen,
                                       input logic [4:0] rd0, input logic [4:0] rd1,
                                       input logic [4:0] rd2, input logic [4:0] rd3,
                                       input logic [4:0] rd4,
                                       input logic [4:0] rdy,
                                       input logic [31:0] v0, input logic [31:0] v1,
                                       input logic [31:0] v2, input logic [31:0] v3,
                                       input logic [31:0] v4,
                                       input logic [31:0] arr);
    // returns {unresolved, value}
    if (r == 5'd0)                   return {1'b0, 32'd0};
    else if (wen[0] && rd0 == r)     return {!rdy[0], v0};
    else if (wen[1] && rd1 == r)     return {!rdy[1], v1};
    else if (wen[2] && rd2 == r)     return {!rdy[2], v2};
    else if (wen[3] && rd3 == r)     return {!rdy[3], v3};
    else if (wen[4] && rd4 == r)     return {!rdy[4], v4};
    else                             return {1'b0, arr};
  endfunction

  logic [32:0] p1, p2;
  always_comb begin
    p1 = pick(rs1, fw_wen, fw_rd[0], fw_rd[1], fw_rd[2], fw_rd[3], fw_rd[4], fw_ready,
              fw_val[0], fw_val[1], fw_val[2], fw_val[3], fw_val[4], regs[rs1]);
    p2 = pick(rs2, fw_wen, fw_rd[0], fw_rd[1], fw_rd[2], fw_rd[3], fw_rd[4], fw_ready,
              fw_val[0], fw_val[1], fw_val[2], fw_val[3], fw_val[4], regs[rs2]);
    rs1_val = p1[31:0];
    rs2_val = p2[31:0];
    hazard  = (use_rs1 && p1[32]) || (use_rs2 && p2[32]);
  end
endmodule
