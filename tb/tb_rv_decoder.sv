// tb_rv_decoder: self-checking test of the decode stage.
//
// Decodes the seven PIMP instructions and a set of RV64I instructions built
// with rv_asm_pkg, and compares the control fields that matter for each with
// hand-written expectations: register fields, the selBranch/selResult
// multiplexer selects, the FIFO operation, immediates (including negative
// branch offsets), memory size and the illegal/halt flags.
module tb_rv_decoder;
  import pimp_pkg::*;
  import rv_asm_pkg::*;

  logic [31:0] instr;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  rv_decoder dut (.instr, .ctrl);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (instr %h)", what, instr); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // send a0, t2 : rs1 = node, rs2 = message, no write-back
    instr = send(A0, T2); #1;
    check(ctrl.pimp_op == PIMP_SEND && ctrl.rs1 == A0 && ctrl.rs2 == T2, "send operands");
    check(!ctrl.reg_write && ctrl.use_rs1 && ctrl.use_rs2 && !ctrl.illegal, "send control");
    instr = src(T0); #1;
    check(ctrl.pimp_op == PIMP_SRC && ctrl.sel_result == SELR_NODE && ctrl.reg_write && ctrl.rd == T0, "src");
    instr = recv(T1); #1;
    check(ctrl.pimp_op == PIMP_RECV && ctrl.sel_result == SELR_DATA && ctrl.reg_write && ctrl.rd == T1, "recv");
    instr = recv(ZERO); #1;
    check(ctrl.pimp_op == PIMP_RECV && !ctrl.reg_write, "recv x0 still dequeues");
    instr = brs(-8); #1;
    check(ctrl.is_branch && ctrl.sel_branch == SELB_FULL && ctrl.br_negate && ctrl.imm == -64'sd8, "brs");
    instr = bns(0); #1;
    check(ctrl.is_branch && ctrl.sel_branch == SELB_FULL && !ctrl.br_negate && ctrl.imm == 64'd0, "bns self");
    instr = bar(16); #1;
    check(ctrl.is_branch && ctrl.sel_branch == SELB_EMPTY && ctrl.br_negate && ctrl.imm == 64'd16, "bar");
    instr = bnr(0); #1;
    check(ctrl.is_branch && ctrl.sel_branch == SELB_EMPTY && !ctrl.br_negate && ctrl.pimp_op == PIMP_NONE, "bnr");
    // ordinary instructions keep the ALU result and the branch unit
    instr = add(A0, A1, A2); #1;
    check(ctrl.alu_op == ALU_ADD && ctrl.sel_result == SELR_ALU && ctrl.reg_write && ctrl.rs1 == A1 && ctrl.rs2 == A2, "add");
    instr = sub(A0, A1, A2); #1;
    check(ctrl.alu_op == ALU_SUB, "sub");
    instr = subw(A0, A1, A2); #1;
    check(ctrl.alu_op == ALU_SUB && ctrl.alu_word, "subw");
    instr = srai(A0, A1, 63); #1;
    check(ctrl.alu_op == ALU_SRA && ctrl.src_b_imm && ctrl.imm[5:0] == 6'd63 && !ctrl.illegal, "srai 63");
    instr = addi(A0, A1, -5); #1;
    check(ctrl.alu_op == ALU_ADD && ctrl.imm == -64'sd5 && ctrl.src_b_imm, "addi");
    instr = bne(T0, A0, -12); #1;
    check(ctrl.is_branch && ctrl.sel_branch == SELB_UNIT && ctrl.cmp_op == CMP_NE && ctrl.imm == -64'sd12, "bne");
    instr = blt(T0, A0, 2044); #1;
    check(ctrl.cmp_op == CMP_LT && ctrl.imm == 64'd2044, "blt");
    instr = ld(T0, A2, 8); #1;
    check(ctrl.mem_op == MEM_LOAD && ctrl.mem_size == 2'd3 && ctrl.imm == 64'd8 && ctrl.reg_write, "ld");
    instr = lbu(T0, A2, -1); #1;
    check(ctrl.mem_op == MEM_LOAD && ctrl.mem_size == 2'd0 && ctrl.mem_unsigned && ctrl.imm == -64'sd1, "lbu");
    instr = sb(T2, T0, 100); #1;
    check(ctrl.mem_op == MEM_STORE && ctrl.mem_size == 2'd0 && ctrl.imm == 64'd100 && !ctrl.reg_write, "sb");
    instr = jal(RA, -2048); #1;
    check(ctrl.is_jal && ctrl.link && ctrl.imm == -64'sd2048, "jal");
    instr = jalr(ZERO, RA, 0); #1;
    check(ctrl.is_jalr && !ctrl.reg_write, "ret");
    instr = lui(A0, 20'hFFFFF); #1;
    check(ctrl.alu_op == ALU_PASSB && ctrl.imm == 64'hFFFF_FFFF_FFFF_F000, "lui");
    instr = ecall(); #1;
    check(ctrl.halt && !ctrl.illegal, "ecall");
    instr = 32'hFFFF_FFFF; #1;
    check(ctrl.illegal && !ctrl.reg_write && ctrl.pimp_op == PIMP_NONE, "illegal");
    instr = {17'd0, 3'b111, 5'd1, 7'b0001011}; #1;
    check(ctrl.illegal, "unused PIMP funct3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
