// rv_asm_pkg: instruction encoders for building test programs in testbenches.
//
// Each function returns the 32-bit encoding of one RV64I or PIMP instruction
// (PIMP encodings as defined in pimp_pkg). Branch and jump offsets are byte
// offsets relative to the instruction itself. Register numbers follow the
// RISC-V ABI names given as constants below.
package rv_asm_pkg;
  localparam logic [4:0] ZERO = 5'd0, RA = 5'd1, SP = 5'd2, T0 = 5'd5, T1 = 5'd6, T2 = 5'd7,
                         S0 = 5'd8, S1 = 5'd9, A0 = 5'd10, A1 = 5'd11, A2 = 5'd12, A3 = 5'd13,
                         A4 = 5'd14, A5 = 5'd15, T3 = 5'd28, T4 = 5'd29;

  function automatic logic [31:0] r_type(logic [6:0] f7, logic [4:0] rs2, logic [4:0] rs1,
                                         logic [2:0] f3, logic [4:0] rd, logic [6:0] opc);
    return {f7, rs2, rs1, f3, rd, opc};
  endfunction
  function automatic logic [31:0] i_type(int imm, logic [4:0] rs1, logic [2:0] f3, logic [4:0] rd,
                                         logic [6:0] opc);
    logic [11:0] i = 12'(imm);
    return {i, rs1, f3, rd, opc};
  endfunction
  function automatic logic [31:0] s_type(int imm, logic [4:0] rs2, logic [4:0] rs1, logic [2:0] f3);
    logic [11:0] i = 12'(imm);
    return {i[11:5], rs2, rs1, f3, i[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] b_type(int off, logic [4:0] rs2, logic [4:0] rs1, logic [2:0] f3,
                                         logic [6:0] opc);
    logic [12:0] o = 13'(off);
    return {o[12], o[10:5], rs2, rs1, f3, o[4:1], o[11], opc};
  endfunction

  function automatic logic [31:0] addi(logic [4:0] rd, logic [4:0] rs1, int imm);
    return i_type(imm, rs1, 3'b000, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] li(logic [4:0] rd, int imm);   // |imm| < 2048
    return addi(rd, ZERO, imm);
  endfunction
  function automatic logic [31:0] nop();
    return addi(ZERO, ZERO, 0);
  endfunction
  function automatic logic [31:0] lui(logic [4:0] rd, int imm20);
    logic [19:0] i = 20'(imm20);
    return {i, rd, 7'b0110111};
  endfunction
  function automatic logic [31:0] slli(logic [4:0] rd, logic [4:0] rs1, int sh);
    return i_type(sh, rs1, 3'b001, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] srai(logic [4:0] rd, logic [4:0] rs1, int sh);
    return i_type(sh | 'h400, rs1, 3'b101, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] addiw(logic [4:0] rd, logic [4:0] rs1, int imm);
    return i_type(imm, rs1, 3'b000, rd, 7'b0011011);
  endfunction
  function automatic logic [31:0] add(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return r_type(7'b0, rs2, rs1, 3'b000, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] sub(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return r_type(7'b0100000, rs2, rs1, 3'b000, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] xor_(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return r_type(7'b0, rs2, rs1, 3'b100, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] or_(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return r_type(7'b0, rs2, rs1, 3'b110, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] and_(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return r_type(7'b0, rs2, rs1, 3'b111, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] sltu(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return r_type(7'b0, rs2, rs1, 3'b011, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] subw(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return r_type(7'b0100000, rs2, rs1, 3'b000, rd, 7'b0111011);
  endfunction
  function automatic logic [31:0] ld(logic [4:0] rd, logic [4:0] rs1, int imm);
    return i_type(imm, rs1, 3'b011, rd, 7'b0000011);
  endfunction
  function automatic logic [31:0] lb(logic [4:0] rd, logic [4:0] rs1, int imm);
    return i_type(imm, rs1, 3'b000, rd, 7'b0000011);
  endfunction
  function automatic logic [31:0] lbu(logic [4:0] rd, logic [4:0] rs1, int imm);
    return i_type(imm, rs1, 3'b100, rd, 7'b0000011);
  endfunction
  function automatic logic [31:0] lw(logic [4:0] rd, logic [4:0] rs1, int imm);
    return i_type(imm, rs1, 3'b010, rd, 7'b0000011);
  endfunction
  function automatic logic [31:0] sd(logic [4:0] rs2, logic [4:0] rs1, int imm);
    return s_type(imm, rs2, rs1, 3'b011);
  endfunction
  function automatic logic [31:0] sb(logic [4:0] rs2, logic [4:0] rs1, int imm);
    return s_type(imm, rs2, rs1, 3'b000);
  endfunction
  function automatic logic [31:0] sw(logic [4:0] rs2, logic [4:0] rs1, int imm);
    return s_type(imm, rs2, rs1, 3'b010);
  endfunction
  function automatic logic [31:0] beq(logic [4:0] rs1, logic [4:0] rs2, int off);
    return b_type(off, rs2, rs1, 3'b000, 7'b1100011);
  endfunction
  function automatic logic [31:0] bne(logic [4:0] rs1, logic [4:0] rs2, int off);
    return b_type(off, rs2, rs1, 3'b001, 7'b1100011);
  endfunction
  function automatic logic [31:0] blt(logic [4:0] rs1, logic [4:0] rs2, int off);
    return b_type(off, rs2, rs1, 3'b100, 7'b1100011);
  endfunction
  function automatic logic [31:0] jal(logic [4:0] rd, int off);
    logic [20:0] o = 21'(off);
    return {o[20], o[10:1], o[11], o[19:12], rd, 7'b1101111};
  endfunction
  function automatic logic [31:0] jalr(logic [4:0] rd, logic [4:0] rs1, int imm);
    return i_type(imm, rs1, 3'b000, rd, 7'b1100111);
  endfunction
  function automatic logic [31:0] ecall();
    return 32'h0000_0073;
  endfunction

  // PIMP
  function automatic logic [31:0] send(logic [4:0] node, logic [4:0] msg);
    return r_type(7'b0, msg, node, 3'b000, 5'd0, 7'b0001011);
  endfunction
  function automatic logic [31:0] src(logic [4:0] rd);
    return r_type(7'b0, 5'd0, 5'd0, 3'b001, rd, 7'b0001011);
  endfunction
  function automatic logic [31:0] recv(logic [4:0] rd);
    return r_type(7'b0, 5'd0, 5'd0, 3'b010, rd, 7'b0001011);
  endfunction
  function automatic logic [31:0] brs(int off); return b_type(off, 5'd0, 5'd0, 3'b000, 7'b0101011); endfunction
  function automatic logic [31:0] bns(int off); return b_type(off, 5'd0, 5'd0, 3'b001, 7'b0101011); endfunction
  function automatic logic [31:0] bar(int off); return b_type(off, 5'd0, 5'd0, 3'b010, 7'b0101011); endfunction
  function automatic logic [31:0] bnr(int off); return b_type(off, 5'd0, 5'd0, 3'b011, 7'b0101011); endfunction
endpackage
