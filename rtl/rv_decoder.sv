// rv_decoder: decode stage of the five-stage core, RV64I plus PIMP.
//
// Purely combinational: one 32-bit instruction in, one control word (ctrl_t,
// see pimp_pkg) out. Besides the usual RV64I fields it sets the two select
// signals that PIMP adds to the execute stage:
//   * sel_branch picks what decides a branch: the branch unit (ordinary
//     branches), the send FIFO's full flag (brs/bns) or the receive FIFO's
//     empty flag (bar/bnr); br_negate inverts the flag for brs and bar.
//   * sel_result picks the value written back: the ALU result, the sender id
//     at the head of the receive FIFO (src) or its payload (recv).
// pimp_op tells the execute stage which FIFO strobe to raise (send enqueues,
// recv dequeues). This split of the PIMP support into a decode-stage part and
// a few multiplexers in execute follows the description; the opcodes are this
// design's own (see pimp_pkg). Implemented RV64I: all integer computational,
// load/store, jump and branch instructions; fence decodes as a no-op; ecall and
// ebreak set halt; anything else sets illegal. CSRs are not implemented.
module rv_decoder
  import pimp_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       ctrl
);
  logic [6:0] opc;
  logic [2:0] f3;
  logic [6:0] f7;
  logic [63:0] imm_i, imm_s, imm_b, imm_u, imm_j;

  assign opc = instr[6:0];
  assign f3  = instr[14:12];
  assign f7  = instr[31:25];

  assign imm_i = {{52{instr[31]}}, instr[31:20]};
  assign imm_s = {{52{instr[31]}}, instr[31:25], instr[11:7]};
  assign imm_b = {{51{instr[31]}}, instr[31], instr[7], instr[30:25], instr[11:8], 1'b0};
  assign imm_u = {{32{instr[31]}}, instr[31:12], 12'b0};
  assign imm_j = {{43{instr[31]}}, instr[31], instr[19:12], instr[20], instr[30:21], 1'b0};

  // ALU operation of OP / OP-IMM style instructions.
  function automatic alu_op_e alu_from_f3(input logic [2:0] fn3, input logic alt, input logic is_reg);
    case (fn3)
      3'b000:  return (is_reg && alt) ? ALU_SUB : ALU_ADD;
      3'b001:  return ALU_SLL;
      3'b010:  return ALU_SLT;
      3'b011:  return ALU_SLTU;
      3'b100:  return ALU_XOR;
      3'b101:  return alt ? ALU_SRA : ALU_SRL;
      3'b110:  return ALU_OR;
      default: return ALU_AND;
    endcase
  endfunction

  always_comb begin
    ctrl            = '0;
    ctrl.valid      = 1'b1;
    ctrl.rd         = instr[11:7];
    ctrl.rs1        = instr[19:15];
    ctrl.rs2        = instr[24:20];
    ctrl.alu_op     = ALU_ADD;
    ctrl.cmp_op     = CMP_EQ;
    ctrl.sel_branch = SELB_UNIT;
    ctrl.sel_result = SELR_ALU;
    ctrl.pimp_op    = PIMP_NONE;
    ctrl.mem_op     = MEM_NONE;

    unique case (opc)
      OPC_LUI: begin
        ctrl.reg_write = 1'b1; ctrl.src_b_imm = 1'b1; ctrl.alu_op = ALU_PASSB; ctrl.imm = imm_u;
      end
      OPC_AUIPC: begin
        ctrl.reg_write = 1'b1; ctrl.src_a_pc = 1'b1; ctrl.src_b_imm = 1'b1; ctrl.imm = imm_u;
      end
      OPC_JAL: begin
        ctrl.reg_write = 1'b1; ctrl.is_jal = 1'b1; ctrl.link = 1'b1; ctrl.imm = imm_j;
      end
      OPC_JALR: begin
        ctrl.reg_write = 1'b1; ctrl.is_jalr = 1'b1; ctrl.link = 1'b1; ctrl.use_rs1 = 1'b1;
        ctrl.imm = imm_i;
        ctrl.illegal = (f3 != 3'b000);
      end
      OPC_BRANCH: begin
        ctrl.is_branch = 1'b1; ctrl.use_rs1 = 1'b1; ctrl.use_rs2 = 1'b1; ctrl.imm = imm_b;
        case (f3)
          3'b000:  ctrl.cmp_op = CMP_EQ;
          3'b001:  ctrl.cmp_op = CMP_NE;
          3'b100:  ctrl.cmp_op = CMP_LT;
          3'b101:  ctrl.cmp_op = CMP_GE;
          3'b110:  ctrl.cmp_op = CMP_LTU;
          3'b111:  ctrl.cmp_op = CMP_GEU;
          default: ctrl.illegal = 1'b1;
        endcase
      end
      OPC_LOAD: begin
        ctrl.reg_write = 1'b1; ctrl.use_rs1 = 1'b1; ctrl.src_b_imm = 1'b1; ctrl.imm = imm_i;
        ctrl.mem_op = MEM_LOAD; ctrl.mem_size = f3[1:0]; ctrl.mem_unsigned = f3[2];
        ctrl.illegal = (f3 == 3'b111);
      end
      OPC_STORE: begin
        ctrl.use_rs1 = 1'b1; ctrl.use_rs2 = 1'b1; ctrl.src_b_imm = 1'b1; ctrl.imm = imm_s;
        ctrl.mem_op = MEM_STORE; ctrl.mem_size = f3[1:0];
        ctrl.illegal = f3[2];
      end
      OPC_OPIMM: begin
        ctrl.reg_write = 1'b1; ctrl.use_rs1 = 1'b1; ctrl.src_b_imm = 1'b1; ctrl.imm = imm_i;
        ctrl.alu_op = alu_from_f3(f3, instr[30], 1'b0);
        if (f3 == 3'b001) ctrl.illegal = (instr[31:26] != 6'b0);
        if (f3 == 3'b101) ctrl.illegal = (instr[31:26] != 6'b0 && instr[31:26] != 6'b010000);
      end
      OPC_OPIMM32: begin
        ctrl.reg_write = 1'b1; ctrl.use_rs1 = 1'b1; ctrl.src_b_imm = 1'b1; ctrl.imm = imm_i;
        ctrl.alu_word = 1'b1;
        ctrl.alu_op = alu_from_f3(f3, instr[30], 1'b0);
        case (f3)
          3'b000:  ;
          3'b001:  ctrl.illegal = (f7 != 7'b0);
          3'b101:  ctrl.illegal = (f7 != 7'b0 && f7 != 7'b0100000);
          default: ctrl.illegal = 1'b1;
        endcase
      end
      OPC_OP: begin
        ctrl.reg_write = 1'b1; ctrl.use_rs1 = 1'b1; ctrl.use_rs2 = 1'b1;
        ctrl.alu_op = alu_from_f3(f3, instr[30], 1'b1);
        ctrl.illegal = !(f7 == 7'b0 || (f7 == 7'b0100000 && (f3 == 3'b000 || f3 == 3'b101)));
      end
      OPC_OP32: begin
        ctrl.reg_write = 1'b1; ctrl.use_rs1 = 1'b1; ctrl.use_rs2 = 1'b1; ctrl.alu_word = 1'b1;
        ctrl.alu_op = alu_from_f3(f3, instr[30], 1'b1);
        ctrl.illegal = !((f7 == 7'b0 && (f3 == 3'b000 || f3 == 3'b001 || f3 == 3'b101)) ||
                         (f7 == 7'b0100000 && (f3 == 3'b000 || f3 == 3'b101)));
      end
      OPC_FENCE: ;
      OPC_SYSTEM: begin
        if (f3 == 3'b000 && instr[19:7] == '0 && (instr[31:20] == 12'd0 || instr[31:20] == 12'd1))
          ctrl.halt = 1'b1;
        else
          ctrl.illegal = 1'b1;
      end
      OPC_PIMP: begin
        case (f3)
          F3_SEND: begin
            ctrl.pimp_op = PIMP_SEND; ctrl.use_rs1 = 1'b1; ctrl.use_rs2 = 1'b1;
          end
          F3_SRC: begin
            ctrl.pimp_op = PIMP_SRC; ctrl.reg_write = 1'b1; ctrl.sel_result = SELR_NODE;
          end
          F3_RECV: begin
            ctrl.pimp_op = PIMP_RECV; ctrl.reg_write = 1'b1; ctrl.sel_result = SELR_DATA;
          end
          default: ctrl.illegal = 1'b1;
        endcase
      end
      OPC_PIMP_BR: begin
        ctrl.is_branch = 1'b1; ctrl.imm = imm_b;
        case (f3)
          F3_BRS:  begin ctrl.sel_branch = SELB_FULL;  ctrl.br_negate = 1'b1; end
          F3_BNS:  begin ctrl.sel_branch = SELB_FULL;  ctrl.br_negate = 1'b0; end
          F3_BAR:  begin ctrl.sel_branch = SELB_EMPTY; ctrl.br_negate = 1'b1; end
          F3_BNR:  begin ctrl.sel_branch = SELB_EMPTY; ctrl.br_negate = 1'b0; end
          default: ctrl.illegal = 1'b1;
        endcase
      end
      default: ctrl.illegal = 1'b1;
    endcase

    if (ctrl.rd == 5'd0) ctrl.reg_write = 1'b0;
    if (ctrl.illegal) begin
      ctrl.reg_write = 1'b0;
      ctrl.mem_op    = MEM_NONE;
      ctrl.pimp_op   = PIMP_NONE;
      ctrl.is_branch = 1'b0;
      ctrl.is_jal    = 1'b0;
      ctrl.is_jalr   = 1'b0;
    end
  end
endmodule
