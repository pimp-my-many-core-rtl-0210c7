// pimp_pkg: types and constants shared by the PIMP many-core.
//
// The many-core runs RV64I cores, so every register, message payload and
// NoC word is XLEN = 64 bits wide. The PIMP (pipeline-integrated message
// passing) extension adds seven instructions: src, recv and send move single
// words between registers and the two message FIFOs, and brs, bns, bar and bnr
// branch on the FIFO state. Which instructions exist and which operands they
// take follows the design description. The binary encoding is this design's
// own choice, since none is published: the three data instructions use the
// RISC-V custom-0 major opcode in R format, and the four branches use custom-1
// in B format, so their offsets are encoded like the ordinary conditional
// branches.
//
//   custom-0 (0001011), R format: funct3 000 send rs1=node, rs2=msg
//                                 funct3 001 src  rd
//                                 funct3 010 recv rd
//   custom-1 (0101011), B format: funct3 000 brs, 001 bns, 010 bar, 011 bnr
package pimp_pkg;

  localparam int unsigned XLEN = 64;

  // Major opcodes of RV64I plus the two custom opcodes used by PIMP.
  localparam logic [6:0] OPC_LUI     = 7'b0110111;
  localparam logic [6:0] OPC_AUIPC   = 7'b0010111;
  localparam logic [6:0] OPC_JAL     = 7'b1101111;
  localparam logic [6:0] OPC_JALR    = 7'b1100111;
  localparam logic [6:0] OPC_BRANCH  = 7'b1100011;
  localparam logic [6:0] OPC_LOAD    = 7'b0000011;
  localparam logic [6:0] OPC_STORE   = 7'b0100011;
  localparam logic [6:0] OPC_OPIMM   = 7'b0010011;
  localparam logic [6:0] OPC_OP      = 7'b0110011;
  localparam logic [6:0] OPC_OPIMM32 = 7'b0011011;
  localparam logic [6:0] OPC_OP32    = 7'b0111011;
  localparam logic [6:0] OPC_FENCE   = 7'b0001111;
  localparam logic [6:0] OPC_SYSTEM  = 7'b1110011;
  localparam logic [6:0] OPC_PIMP    = 7'b0001011;  // custom-0
  localparam logic [6:0] OPC_PIMP_BR = 7'b0101011;  // custom-1

  localparam logic [2:0] F3_SEND = 3'b000;
  localparam logic [2:0] F3_SRC  = 3'b001;
  localparam logic [2:0] F3_RECV = 3'b010;

  localparam logic [2:0] F3_BRS = 3'b000;
  localparam logic [2:0] F3_BNS = 3'b001;
  localparam logic [2:0] F3_BAR = 3'b010;
  localparam logic [2:0] F3_BNR = 3'b011;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR,
    ALU_SRL, ALU_SRA, ALU_OR, ALU_AND, ALU_PASSB
  } alu_op_e;

  // Condition evaluated by the branch unit for the ordinary branches.
  typedef enum logic [2:0] {
    CMP_EQ, CMP_NE, CMP_LT, CMP_GE, CMP_LTU, CMP_GEU
  } cmp_op_e;

  // Select of the multiplexer behind the branch unit (Fig. "selBranch").
  typedef enum logic [1:0] {
    SELB_UNIT,   // branch unit outcome (ordinary branches)
    SELB_FULL,   // send FIFO full  (bns; brs takes it inverted)
    SELB_EMPTY   // receive FIFO empty (bnr; bar takes it inverted)
  } sel_branch_e;

  // Select of the multiplexer behind the ALU (Fig. "selResult").
  typedef enum logic [1:0] {
    SELR_ALU,    // ALU result
    SELR_NODE,   // sender id at the head of the receive FIFO (src)
    SELR_DATA    // payload at the head of the receive FIFO (recv)
  } sel_result_e;

  typedef enum logic [1:0] {
    PIMP_NONE, PIMP_SEND, PIMP_SRC, PIMP_RECV
  } pimp_op_e;

  typedef enum logic [1:0] {
    MEM_NONE, MEM_LOAD, MEM_STORE
  } mem_op_e;

  // Control word produced by the decode stage and carried to execute.
  typedef struct packed {
    logic        valid;      // a real instruction (not a bubble)
    logic [4:0]  rd;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic        use_rs1;
    logic        use_rs2;
    logic        reg_write;
    alu_op_e     alu_op;
    logic        alu_word;   // *W instruction: 32-bit operation, sign-extended
    logic        src_a_pc;   // ALU operand A is the pc (auipc, jal, jalr link)
    logic        src_b_imm;  // ALU operand B is the immediate
    logic        is_branch;  // conditional branch (ordinary or PIMP)
    cmp_op_e     cmp_op;
    sel_branch_e sel_branch;
    logic        br_negate;  // brs and bar: take the FIFO flag inverted
    logic        is_jal;
    logic        is_jalr;
    logic        link;       // rd gets pc + 4
    sel_result_e sel_result;
    pimp_op_e    pimp_op;
    mem_op_e     mem_op;
    logic [1:0]  mem_size;   // 0 byte, 1 half, 2 word, 3 double
    logic        mem_unsigned;
    logic        halt;       // ecall / ebreak
    logic        illegal;
    logic [63:0] imm;
  } ctrl_t;

endpackage
