// pimp_ex_unit: what PIMP adds to the execute stage of the pipeline.
//
// Two multiplexers and the FIFO strobes, as in the execute-stage diagram of
// the design:
//   * result mux (sel_result): ALU result, or the sender id (src) or payload
//     (recv) at the head of the receive FIFO. The sender id is zero-extended.
//   * branch mux (sel_branch): the branch unit's decision, or the send FIFO's
//     full flag (bns; brs inverted) or the receive FIFO's empty flag (bnr; bar
//     inverted).
//   * the send FIFO's node and data inputs are the two register operands
//     src1 and src2 unchanged; enqueue is raised by send, dequeue by recv only
//     (src only reads the head).
// A send while the send FIFO is full, or a src/recv while the receive FIFO is
// empty, raises exception and then neither strobe is given. The description
// calls the behaviour in these cases undefined and says an exception is
// raised; what the core does on it is the core's choice (it stops).
// Combinational; the strobes act at the next clock edge in the FIFOs.
module pimp_ex_unit
  import pimp_pkg::*;
#(
  parameter int unsigned NODE_W = 4,
  parameter int unsigned DATA_W = 64
) (
  input  logic              valid,        // a real instruction is in execute
  input  pimp_op_e          pimp_op,
  input  sel_branch_e       sel_branch,
  input  logic              br_negate,
  input  sel_result_e       sel_result,
  input  logic              is_branch,
  input  logic [DATA_W-1:0] src1,
  input  logic [DATA_W-1:0] src2,
  input  logic [DATA_W-1:0] alu_result,
  input  logic              unit_taken,   // branch unit decision
  // send FIFO
  input  logic              send_full,
  output logic              enqueue,
  output logic [NODE_W-1:0] send_node,
  output logic [DATA_W-1:0] send_data,
  // receive FIFO
  input  logic              recv_empty,
  input  logic [NODE_W-1:0] recv_node,
  input  logic [DATA_W-1:0] recv_data,
  output logic              dequeue,
  // outputs to the pipeline
  output logic [DATA_W-1:0] result,
  output logic              branch_taken,
  output logic              exception
);
  logic flag;

  assign send_node = src1[NODE_W-1:0];
  assign send_data = src2;

  always_comb begin
    unique case (sel_result)
      SELR_NODE: result = DATA_W'(recv_node);
      SELR_DATA: result = recv_data;
      default:   result = alu_result;
    endcase
  end

  always_comb begin
    unique case (sel_branch)
      SELB_FULL:  flag = send_full  ^ br_negate;
      SELB_EMPTY: flag = recv_empty ^ br_negate;
      default:    flag = unit_taken;
    endcase
    branch_taken = valid && is_branch && flag;
  end

  always_comb begin
    exception = 1'b0;
    if (valid) begin
      unique case (pimp_op)
        PIMP_SEND:           exception = send_full;
        PIMP_SRC, PIMP_RECV: exception = recv_empty;
        default:             exception = 1'b0;
      endcase
    end
    enqueue = valid && (pimp_op == PIMP_SEND) && !exception;
    dequeue = valid && (pimp_op == PIMP_RECV) && !exception;
  end
endmodule
