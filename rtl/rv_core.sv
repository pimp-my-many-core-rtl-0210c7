// rv_core: classical five-stage in-order RV64I pipeline with PIMP.
//
// Stages IF, ID, EX, MEM, WB, one instruction per cycle, memories answering in
// the same cycle (the scratchpad has no wait states). The PIMP extension sits
// entirely in decode (rv_decoder) and in execute (pimp_ex_unit): the two FIFO
// flags enter the branch multiplexer, the head of the receive FIFO enters the
// result multiplexer, send enqueues {rs1, rs2} into the send FIFO and recv
// dequeues, all in EX. Because every instruction reads and changes the FIFO
// state in EX, in program order, a bnr/bns test stays valid for the src, recv
// or send that follows it.
//
// Timing: branches and jumps are resolved in EX, the two younger instructions
// are squashed and fetch restarts at the target in the next cycle. A taken
// branch therefore costs three cycles, and a self-referential bnr/bns polls
// the FIFO once every three cycles, so waiting for a message takes a multiple
// of three cycles. Results are forwarded from MEM and WB to EX; a load
// followed by a dependent instruction stalls one cycle. src and recv results
// are forwarded like ALU results.
//
// Stopping: ecall or ebreak, an illegal instruction, or a PIMP exception (send
// with the send FIFO full, src/recv with the receive FIFO empty) reaching EX
// stops the core: that instruction has no effect, younger ones are squashed,
// older ones complete, fetch stops and halted rises; pimp_exc or illegal tells
// why. There are no CSRs and no trap handler; stopping on these events is this
// design's own choice. Loads and stores must be naturally aligned.
//
// Sleep on bnr (SLEEP_ON_BNR = 1): a bnr that branches to itself and is taken
// in EX (receive FIFO empty) does not redirect; instead IF, ID and EX hold
// their contents and a bubble enters MEM, so nothing in the front of the
// pipeline changes. sleeping is high in exactly those cycles and can gate the
// core's clock. In the cycle after a word arrives the held bnr falls through,
// so the src/recv behind it reach EX one and two cycles later. Results are
// the same as with polling; only the wait time can be up to two cycles
// shorter. The original design names this as an option of an energy-optimised
// implementation; how it is detected and held is this design's own. The
// default is 0, the plain polling core whose timing is given above.
//
// Reset: synchronous, active low; pc starts at RESET_PC, registers at zero.
module rv_core
  import pimp_pkg::*;
#(
  parameter int unsigned NODE_W   = 4,
  parameter logic [63:0] RESET_PC = 64'h0,
  parameter bit          SLEEP_ON_BNR = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  // instruction memory
  output logic [31:0]       imem_addr,
  input  logic [31:0]       imem_rdata,
  // data memory
  output logic [31:0]       dmem_addr,
  output logic              dmem_we,
  output logic [7:0]        dmem_be,
  output logic [63:0]       dmem_wdata,
  input  logic [63:0]       dmem_rdata,
  // send FIFO
  input  logic              send_full,
  output logic              send_enq,
  output logic [NODE_W-1:0] send_node,
  output logic [63:0]       send_data,
  // receive FIFO
  input  logic              recv_empty,
  input  logic [NODE_W-1:0] recv_node,
  input  logic [63:0]       recv_data,
  output logic              recv_deq,
  // status
  output logic              halted,
  output logic              sleeping,
  output logic              pimp_exc,
  output logic              illegal
);
  // ---------------------------------------------------------------- state
  logic [63:0] pc;

  logic        ifid_valid;
  logic [31:0] ifid_instr;
  logic [63:0] ifid_pc;

  ctrl_t       idex_ctrl;
  logic [63:0] idex_pc, idex_rs1, idex_rs2;

  typedef struct packed {
    logic        valid;
    logic        reg_write;
    logic [4:0]  rd;
    logic [63:0] result;
    mem_op_e     mem_op;
    logic [1:0]  mem_size;
    logic        mem_unsigned;
    logic [63:0] store_data;
  } exmem_t;

  typedef struct packed {
    logic        valid;
    logic        reg_write;
    logic [4:0]  rd;
    logic [63:0] value;
  } memwb_t;

  exmem_t exmem;
  memwb_t memwb;

  // ---------------------------------------------------------------- ID
  ctrl_t       id_ctrl;
  logic [63:0] id_rs1, id_rs2;
  logic        stall;

  rv_decoder u_dec (.instr(ifid_instr), .ctrl(id_ctrl));

  rv_regfile u_rf (
    .clk, .rst_n,
    .ra1(id_ctrl.rs1), .ra2(id_ctrl.rs2), .rd1(id_rs1), .rd2(id_rs2),
    .we(memwb.valid && memwb.reg_write), .wa(memwb.rd), .wd(memwb.value)
  );

  // load-use hazard: the loaded value is only there at the end of MEM
  assign stall = ifid_valid && idex_ctrl.valid && idex_ctrl.mem_op == MEM_LOAD &&
                 idex_ctrl.reg_write &&
                 ((id_ctrl.use_rs1 && id_ctrl.rs1 == idex_ctrl.rd) ||
                  (id_ctrl.use_rs2 && id_ctrl.rs2 == idex_ctrl.rd));

  // ---------------------------------------------------------------- EX
  logic [63:0] fwd_rs1, fwd_rs2, alu_a, alu_b, alu_y, pimp_y, ex_result;
  logic        unit_taken, br_taken, pimp_exception, redirect, stop_now;
  logic [63:0] target;

  function automatic logic [63:0] forward(input logic [4:0] r, input logic [63:0] v);
    if (r == 5'd0)                                                         return 64'd0;
    if (exmem.valid && exmem.reg_write && exmem.rd == r && exmem.mem_op != MEM_LOAD)
                                                                           return exmem.result;
    if (memwb.valid && memwb.reg_write && memwb.rd == r)                   return memwb.value;
    return v;
  endfunction

  assign fwd_rs1 = forward(idex_ctrl.rs1, idex_rs1);
  assign fwd_rs2 = forward(idex_ctrl.rs2, idex_rs2);
  assign alu_a   = idex_ctrl.src_a_pc  ? idex_pc       : fwd_rs1;
  assign alu_b   = idex_ctrl.src_b_imm ? idex_ctrl.imm : fwd_rs2;

  rv_alu u_alu (.op(idex_ctrl.alu_op), .word(idex_ctrl.alu_word), .a(alu_a), .b(alu_b), .y(alu_y));

  rv_branch_unit u_bru (.op(idex_ctrl.cmp_op), .a(fwd_rs1), .b(fwd_rs2), .taken(unit_taken));

  pimp_ex_unit #(.NODE_W(NODE_W), .DATA_W(64)) u_pimp (
    .valid       (idex_ctrl.valid),
    .pimp_op     (idex_ctrl.pimp_op),
    .sel_branch  (idex_ctrl.sel_branch),
    .br_negate   (idex_ctrl.br_negate),
    .sel_result  (idex_ctrl.sel_result),
    .is_branch   (idex_ctrl.is_branch),
    .src1        (fwd_rs1),
    .src2        (fwd_rs2),
    .alu_result  (alu_y),
    .unit_taken  (unit_taken),
    .send_full   (send_full),
    .enqueue     (send_enq),
    .send_node   (send_node),
    .send_data   (send_data),
    .recv_empty  (recv_empty),
    .recv_node   (recv_node),
    .recv_data   (recv_data),
    .dequeue     (recv_deq),
    .result      (pimp_y),
    .branch_taken(br_taken),
    .exception   (pimp_exception)
  );

  assign ex_result = idex_ctrl.link ? idex_pc + 64'd4 : pimp_y;
  assign stop_now  = idex_ctrl.valid && (idex_ctrl.halt || idex_ctrl.illegal || pimp_exception);
  // a taken bnr to itself: only bnr is taken on an empty receive FIFO
  assign sleeping  = SLEEP_ON_BNR && idex_ctrl.valid && idex_ctrl.is_branch &&
                     idex_ctrl.sel_branch == SELB_EMPTY && recv_empty && br_taken &&
                     idex_ctrl.imm == 64'd0;
  assign redirect  = idex_ctrl.valid && !stop_now && !sleeping &&
                     (br_taken || idex_ctrl.is_jal || idex_ctrl.is_jalr);
  assign target    = idex_ctrl.is_jalr ? ((fwd_rs1 + idex_ctrl.imm) & ~64'd1)
                                       : idex_pc + idex_ctrl.imm;

  // ---------------------------------------------------------------- MEM
  logic [5:0]  byte_sh;
  logic [7:0]  size_mask;
  logic [63:0] ld_shifted, ld_value;

  assign byte_sh    = {exmem.result[2:0], 3'b000};
  assign dmem_addr  = exmem.result[31:0];
  assign dmem_we    = exmem.valid && exmem.mem_op == MEM_STORE;
  assign dmem_wdata = exmem.store_data << byte_sh;
  always_comb begin
    unique case (exmem.mem_size)
      2'd0:    size_mask = 8'h01;
      2'd1:    size_mask = 8'h03;
      2'd2:    size_mask = 8'h0f;
      default: size_mask = 8'hff;
    endcase
  end
  assign dmem_be    = size_mask << exmem.result[2:0];
  assign ld_shifted = dmem_rdata >> byte_sh;
  always_comb begin
    unique case (exmem.mem_size)
      2'd0:    ld_value = exmem.mem_unsigned ? {56'd0, ld_shifted[7:0]}  : {{56{ld_shifted[7]}},  ld_shifted[7:0]};
      2'd1:    ld_value = exmem.mem_unsigned ? {48'd0, ld_shifted[15:0]} : {{48{ld_shifted[15]}}, ld_shifted[15:0]};
      2'd2:    ld_value = exmem.mem_unsigned ? {32'd0, ld_shifted[31:0]} : {{32{ld_shifted[31]}}, ld_shifted[31:0]};
      default: ld_value = ld_shifted;
    endcase
  end

  // ---------------------------------------------------------------- IF
  assign imem_addr = pc[31:0];

  // ---------------------------------------------------------------- registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc         <= RESET_PC;
      ifid_valid <= 1'b0;
      ifid_instr <= 32'h0000_0013;  // nop
      ifid_pc    <= '0;
      idex_ctrl  <= '0;
      idex_pc    <= '0;
      idex_rs1   <= '0;
      idex_rs2   <= '0;
      exmem      <= '0;
      memwb      <= '0;
      halted     <= 1'b0;
      pimp_exc   <= 1'b0;
      illegal    <= 1'b0;
    end else begin
      // WB input
      memwb.valid     <= exmem.valid;
      memwb.reg_write <= exmem.reg_write;
      memwb.rd        <= exmem.rd;
      memwb.value     <= (exmem.mem_op == MEM_LOAD) ? ld_value : exmem.result;

      // MEM input
      exmem.valid        <= idex_ctrl.valid && !stop_now && !sleeping;
      exmem.reg_write    <= idex_ctrl.reg_write;
      exmem.rd           <= idex_ctrl.rd;
      exmem.result       <= ex_result;
      exmem.mem_op       <= idex_ctrl.mem_op;
      exmem.mem_size     <= idex_ctrl.mem_size;
      exmem.mem_unsigned <= idex_ctrl.mem_unsigned;
      exmem.store_data   <= fwd_rs2;

      if (stop_now) begin
        halted   <= 1'b1;
        pimp_exc <= pimp_exception;
        illegal  <= idex_ctrl.illegal;
      end

      // EX input, IF/ID and pc
      if (stop_now || halted) begin
        idex_ctrl  <= '0;
        ifid_valid <= 1'b0;
      end else if (sleeping) begin
        // hold IF, ID and EX until a word arrives
      end else if (redirect) begin
        idex_ctrl  <= '0;
        ifid_valid <= 1'b0;
        pc         <= target;
      end else if (stall) begin
        idex_ctrl  <= '0;
      end else begin
        idex_ctrl       <= id_ctrl;
        idex_ctrl.valid <= ifid_valid;
        idex_pc         <= ifid_pc;
        idex_rs1        <= id_rs1;
        idex_rs2        <= id_rs2;
        ifid_valid      <= 1'b1;
        ifid_instr      <= imem_rdata;
        ifid_pc         <= pc;
        pc              <= pc + 64'd4;
      end
    end
  end

  // A PIMP exception never touches a FIFO.
  assert property (@(posedge clk) disable iff (!rst_n) pimp_exception |-> !send_enq && !recv_deq);
  assert property (@(posedge clk) disable iff (!rst_n) send_enq |-> !send_full);
  assert property (@(posedge clk) disable iff (!rst_n) recv_deq |-> !recv_empty);
endmodule
