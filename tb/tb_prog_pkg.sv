// tb_prog_pkg: RV32 instruction encoders and the self-checking test program
// used by the core and chip testbenches.
//
// The program exercises forwarding, a load-use stall, a counted backward
// loop (predicted-taken redirects and mispredictions), a forward branch,
// call and return through JAL/JALR, byte and halfword stores and loads,
// AMOADD/AMOSWAP, LR/SC success and failure, CSR writes, an ECALL trap,
// a timer interrupt, a keyboard interrupt, a video memory store and load,
// a cache-line conflict that forces a dirty write-back, and the retired
// instruction counter. Results land at RES = 0x2000; word 15 = 1 marks the
// end. The expected values below were worked out by hand from the program.
package tb_prog_pkg;
  typedef logic [31:0] wq_t[$];

  function automatic logic [31:0] r_t(input int f7, input int rs2, input int rs1, input int f3, input int rd, input int op);
    return {7'(f7), 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), 7'(op)};
  endfunction
  function automatic logic [31:0] i_t(input int imm, input int rs1, input int f3, input int rd, input int op);
    return {12'(imm), 5'(rs1), 3'(f3), 5'(rd), 7'(op)};
  endfunction
  function automatic logic [31:0] s_t(input int imm, input int rs2, input int rs1, input int f3);
    logic [11:0] m; m = 12'(imm);
    return {m[11:5], 5'(rs2), 5'(rs1), 3'(f3), m[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] b_t(input int imm, input int rs2, input int rs1, input int f3);
    logic [12:0] m; m = 13'(imm);
    return {m[12], m[10:5], 5'(rs2), 5'(rs1), 3'(f3), m[4:1], m[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] u_t(input int imm20, input int rd, input int op);
    return {20'(imm20), 5'(rd), 7'(op)};
  endfunction
  function automatic logic [31:0] j_t(input int imm, input int rd);
    logic [20:0] m; m = 21'(imm);
    return {m[20], m[10:1], m[11], m[19:12], 5'(rd), 7'b1101111};
  endfunction

  function automatic logic [31:0] addi(input int rd, input int rs1, input int imm); return i_t(imm, rs1, 0, rd, 7'h13); endfunction
  function automatic logic [31:0] andi(input int rd, input int rs1, input int imm); return i_t(imm, rs1, 7, rd, 7'h13); endfunction
  function automatic logic [31:0] add (input int rd, input int rs1, input int rs2); return r_t(0, rs2, rs1, 0, rd, 7'h33); endfunction
  function automatic logic [31:0] sub (input int rd, input int rs1, input int rs2); return r_t(32, rs2, rs1, 0, rd, 7'h33); endfunction
  function automatic logic [31:0] lui (input int rd, input int imm20); return u_t(imm20, rd, 7'h37); endfunction
  function automatic logic [31:0] auipc(input int rd, input int imm20); return u_t(imm20, rd, 7'h17); endfunction
  function automatic logic [31:0] lw  (input int rd, input int rs1, input int imm); return i_t(imm, rs1, 2, rd, 7'h03); endfunction
  function automatic logic [31:0] lb  (input int rd, input int rs1, input int imm); return i_t(imm, rs1, 0, rd, 7'h03); endfunction
  function automatic logic [31:0] lbu (input int rd, input int rs1, input int imm); return i_t(imm, rs1, 4, rd, 7'h03); endfunction
  function automatic logic [31:0] lh  (input int rd, input int rs1, input int imm); return i_t(imm, rs1, 1, rd, 7'h03); endfunction
  function automatic logic [31:0] lhu (input int rd, input int rs1, input int imm); return i_t(imm, rs1, 5, rd, 7'h03); endfunction
  function automatic logic [31:0] sw  (input int rs2, input int rs1, input int imm); return s_t(imm, rs2, rs1, 2); endfunction
  function automatic logic [31:0] sh  (input int rs2, input int rs1, input int imm); return s_t(imm, rs2, rs1, 1); endfunction
  function automatic logic [31:0] sb  (input int rs2, input int rs1, input int imm); return s_t(imm, rs2, rs1, 0); endfunction
  function automatic logic [31:0] beq (input int rs1, input int rs2, input int off); return b_t(off, rs2, rs1, 0); endfunction
  function automatic logic [31:0] bne (input int rs1, input int rs2, input int off); return b_t(off, rs2, rs1, 1); endfunction
  function automatic logic [31:0] bge (input int rs1, input int rs2, input int off); return b_t(off, rs2, rs1, 5); endfunction
  function automatic logic [31:0] jal (input int rd, input int off); return j_t(off, rd); endfunction
  function automatic logic [31:0] jalr(input int rd, input int rs1, input int imm); return i_t(imm, rs1, 0, rd, 7'h67); endfunction
  function automatic logic [31:0] amo (input int f5, input int rd, input int rs1, input int rs2);
    return {5'(f5), 2'b00, 5'(rs2), 5'(rs1), 3'b010, 5'(rd), 7'b0101111};
  endfunction
  function automatic logic [31:0] csrrw(input int rd, input int csr, input int rs1); return i_t(csr, rs1, 1, rd, 7'h73); endfunction
  function automatic logic [31:0] csrrs(input int rd, input int csr, input int rs1); return i_t(csr, rs1, 2, rd, 7'h73); endfunction
  function automatic logic [31:0] csrrsi(input int rd, input int csr, input int zimm); return i_t(csr, zimm, 6, rd, 7'h73); endfunction
  localparam logic [31:0] ECALL = 32'h0000_0073;
  localparam logic [31:0] MRET  = 32'h3020_0073;

  localparam int RES = 32'h2000;   // result area (byte address)
  localparam int RES_WORDS = 16;

  function automatic wq_t test_program();
    wq_t p;
    p.push_back(lui(1, 1));              // 0  x1 = 0x1000 data area
    p.push_back(lui(2, 2));              // 1  x2 = 0x2000 result area
    p.push_back(addi(3, 0, 5));          // 2
    p.push_back(addi(4, 3, 7));          // 3  forwarded: 12
    p.push_back(add(5, 4, 3));           // 4  17
    p.push_back(sub(6, 5, 4));           // 5  5
    p.push_back(sw(5, 2, 0));            // 6  RES[0] = 17
    p.push_back(lw(7, 2, 0));            // 7
    p.push_back(addi(8, 7, 1));          // 8  load-use: 18
    p.push_back(sw(8, 2, 4));            // 9  RES[1] = 18
    p.push_back(addi(9, 0, 0));          // 10
    p.push_back(addi(10, 0, 10));        // 11
    p.push_back(add(9, 9, 10));          // 12 loop
    p.push_back(addi(10, 10, -1));       // 13
    p.push_back(bne(10, 0, -8));         // 14
    p.push_back(sw(9, 2, 8));            // 15 RES[2] = 55
    p.push_back(beq(0, 0, 8));           // 16 forward branch to 18
    p.push_back(addi(9, 0, 99));         // 17 skipped
    p.push_back(sw(9, 2, 12));           // 18 RES[3] = 55
    p.push_back(addi(11, 0, -2));        // 19
    p.push_back(sb(11, 2, 16));          // 20 RES[4] = 0x000000FE
    p.push_back(sh(11, 2, 22));          // 21 RES[5] = 0xFFFE0000
    p.push_back(lb(12, 2, 16));          // 22 -2
    p.push_back(lbu(13, 2, 16));         // 23 254
    p.push_back(lh(14, 2, 22));          // 24 -2
    p.push_back(lhu(15, 2, 22));         // 25 65534
    p.push_back(add(16, 12, 13));        // 26
    p.push_back(add(16, 16, 14));        // 27
    p.push_back(add(16, 16, 15));        // 28 65784
    p.push_back(sw(16, 2, 24));          // 29 RES[6]
    p.push_back(jal(20, 12));            // 30 call 33
    p.push_back(sw(21, 2, 28));          // 31 RES[7] = 42
    p.push_back(jal(0, 16));             // 32 to 36
    p.push_back(addi(21, 0, 42));        // 33 function
    p.push_back(jalr(0, 20, 0));         // 34 return
    p.push_back(addi(21, 0, 0));         // 35 never
    p.push_back(addi(22, 0, 100));       // 36
    p.push_back(sw(22, 1, 0));           // 37 DATA[0] = 100
    p.push_back(addi(23, 0, 11));        // 38
    p.push_back(amo(5'b00000, 24, 1, 23)); // 39 amoadd: x24 = 100, mem 111
    p.push_back(amo(5'b00001, 25, 1, 22)); // 40 amoswap: x25 = 111, mem 100
    p.push_back(amo(5'b00010, 26, 1, 0));  // 41 lr: 100
    p.push_back(addi(26, 26, 1));        // 42
    p.push_back(amo(5'b00011, 27, 1, 26)); // 43 sc ok: 0, mem 101
    p.push_back(amo(5'b00011, 28, 1, 26)); // 44 sc fail: 1
    p.push_back(lw(29, 1, 0));           // 45 101
    p.push_back(add(29, 29, 24));        // 46
    p.push_back(add(29, 29, 25));        // 47
    p.push_back(add(29, 29, 27));        // 48
    p.push_back(add(29, 29, 28));        // 49 313
    p.push_back(sw(29, 2, 32));          // 50 RES[8]
    p.push_back(auipc(30, 0));           // 51 x30 = 204
    p.push_back(addi(30, 30, 156));      // 52 handler at 360 (word 90)
    p.push_back(csrrw(0, 12'h305, 30));  // 53 mtvec
    p.push_back(addi(31, 0, 0));         // 54 trap count
    p.push_back(ECALL);                  // 55
    p.push_back(sw(31, 2, 36));          // 56 RES[9] = 1
    p.push_back(csrrs(17, 12'hC01, 0));  // 57 time
    p.push_back(addi(17, 17, 64));       // 58
    p.push_back(csrrw(0, 12'h7C1, 0));   // 59 timecmp high = 0
    p.push_back(csrrw(0, 12'h7C0, 17));  // 60 timecmp low = time + 64
    p.push_back(addi(18, 0, 128));       // 61 MTIE
    p.push_back(csrrs(0, 12'h304, 18));  // 62
    p.push_back(csrrsi(0, 12'h300, 8));  // 63 MIE
    p.push_back(addi(19, 0, 2));         // 64
    p.push_back(bne(31, 19, 0));         // 65 wait for the timer interrupt
    p.push_back(csrrs(18, 12'h342, 0));  // 66 mcause
    p.push_back(sw(18, 2, 44));          // 67 RES[11] = 0x80000007
    p.push_back(lui(18, 1));             // 68
    p.push_back(addi(18, 18, -2048));    // 69 0x800 MEIE
    p.push_back(csrrs(0, 12'h304, 18));  // 70
    p.push_back(addi(19, 0, 3));         // 71
    p.push_back(bne(31, 19, 0));         // 72 wait for the keyboard interrupt
    p.push_back(lui(5, 32'h80000));      // 73 VRAM
    p.push_back(addi(6, 0, 12'h741));    // 74
    p.push_back(sw(6, 5, 0));            // 75
    p.push_back(lw(7, 5, 0));            // 76
    p.push_back(sw(7, 2, 48));           // 77 RES[12] = 0x741
    p.push_back(lui(8, 3));              // 78 0x3000: same cache index as 0x1000
    p.push_back(addi(9, 0, 77));         // 79
    p.push_back(sw(9, 8, 0));            // 80
    p.push_back(lw(10, 1, 0));           // 81 101
    p.push_back(lw(11, 8, 0));           // 82 77
    p.push_back(add(10, 10, 11));        // 83
    p.push_back(sw(10, 2, 52));          // 84 RES[13] = 178
    p.push_back(csrrs(18, 12'hB02, 0));  // 85 minstret
    p.push_back(sw(18, 2, 40));          // 86 RES[10]
    p.push_back(addi(12, 0, 1));         // 87
    p.push_back(sw(12, 2, 60));          // 88 RES[15] = 1
    p.push_back(jal(0, 0));              // 89 halt
    // trap handler, word 90
    p.push_back(addi(31, 31, 1));        // H+0
    p.push_back(csrrs(13, 12'h342, 0));  // H+1 mcause
    p.push_back(bge(13, 0, 40));         // H+2 exception -> H+12
    p.push_back(andi(13, 13, 15));       // H+3
    p.push_back(addi(14, 0, 7));         // H+4
    p.push_back(bne(13, 14, 16));        // H+5 external -> H+9
    p.push_back(addi(14, 0, -1));        // H+6 timer: push compare out
    p.push_back(csrrw(0, 12'h7C1, 14));  // H+7
    p.push_back(MRET);                   // H+8
    p.push_back(csrrs(15, 12'hFC0, 0));  // H+9 keyboard character (acknowledges)
    p.push_back(sw(15, 2, 56));          // H+10 RES[14]
    p.push_back(MRET);                   // H+11
    p.push_back(csrrs(14, 12'h341, 0));  // H+12 mepc += 4
    p.push_back(addi(14, 14, 4));        // H+13
    p.push_back(csrrw(0, 12'h341, 14));  // H+14
    p.push_back(MRET);                   // H+15
    return p;
  endfunction

  // expected result words; RES[10] (instructions retired) is checked apart
  function automatic logic [31:0] expected(input int i);
    unique case (i)
      0: return 17;          1: return 18;          2: return 55;          3: return 55;
      4: return 32'h0000_00FE; 5: return 32'hFFFE_0000; 6: return 65784; 7: return 42;
      8: return 313;         9: return 1;           11: return 32'h8000_0007;
      12: return 32'h741;    13: return 178;        14: return 32'h161;    15: return 1;
      default: return 0;
    endcase
  endfunction
endpackage
