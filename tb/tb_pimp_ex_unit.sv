// tb_pimp_ex_unit: self-checking test of the PIMP execute-stage logic.
//
// Exhaustively walks every combination of FIFO flags (full, empty), PIMP
// operation, branch select and negation, and a few operand values, and
// compares result, branch decision, enqueue/dequeue strobes, the send FIFO
// inputs and the exception with a reference written from the instruction
// table: brs branches when not full, bns when full, bar when not empty, bnr
// when empty; send enqueues, recv dequeues, src does not; an operation on a
// full/empty FIFO raises the exception instead.
module tb_pimp_ex_unit;
  import pimp_pkg::*;

  logic valid, br_negate, is_branch, unit_taken, send_full, recv_empty;
  pimp_op_e pimp_op;
  sel_branch_e sel_branch;
  sel_result_e sel_result;
  logic [63:0] src1, src2, alu_result, recv_data, send_data, result;
  logic [3:0] recv_node, send_node;
  logic enqueue, dequeue, branch_taken, exception;
  int checks = 0, failures = 0;

  pimp_ex_unit #(.NODE_W(4), .DATA_W(64)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++)
    for (int f = 0; f < 2; f++)
    for (int e = 0; e < 2; e++)
    for (int op = 0; op < 4; op++)
    for (int sb = 0; sb < 3; sb++)
    for (int ng = 0; ng < 2; ng++)
    for (int ut = 0; ut < 2; ut++)
    for (int sr = 0; sr < 3; sr++) begin
      bit exp_exc, exp_br, flag;
      logic [63:0] exp_res;
      valid = 1'(v); send_full = 1'(f); recv_empty = 1'(e);
      pimp_op = pimp_op_e'(op); sel_branch = sel_branch_e'(sb); br_negate = 1'(ng);
      unit_taken = 1'(ut); sel_result = sel_result_e'(sr); is_branch = 1'b1;
      src1 = {$urandom, $urandom}; src2 = {$urandom, $urandom};
      alu_result = {$urandom, $urandom}; recv_data = {$urandom, $urandom};
      recv_node = 4'($urandom);
      #1;
      exp_exc = v && ((op == PIMP_SEND && f) || ((op == PIMP_SRC || op == PIMP_RECV) && e));
      case (sb)
        SELB_FULL:  flag = ng ? !f : f;
        SELB_EMPTY: flag = ng ? !e : e;
        default:    flag = ut;
      endcase
      exp_br = v && flag;
      exp_res = (sr == SELR_NODE) ? {60'd0, recv_node} : (sr == SELR_DATA) ? recv_data : alu_result;
      check(exception == exp_exc, "exception");
      check(branch_taken == exp_br, "branch mux");
      check(result == exp_res, "result mux");
      check(enqueue == (v && op == PIMP_SEND && !f), "enqueue");
      check(dequeue == (v && op == PIMP_RECV && !e), "dequeue");
      check(send_node == src1[3:0] && send_data == src2, "send FIFO inputs from operands");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
