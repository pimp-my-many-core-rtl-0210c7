// pimp_tile: one node of the many-core.
//
// A five-stage RV64I core with PIMP, its private scratchpad, and the two
// ordinary FIFOs that form the whole network interface: the send FIFO (default
// 8 entries) buffers {target node, payload} from the core's execute stage to
// the router, the receive FIFO (default 16 entries) buffers {sender node,
// payload} from the router to the execute stage. The core sees full and empty,
// writes the send FIFO directly from its register operands and reads the
// receive FIFO's head through its result multiplexer; the router side is a
// valid/ready pair in each direction:
//   net_out_*: head of the send FIFO, taken when net_out_ready is high;
//   net_in_*:  a word for this node, accepted when net_in_ready is high.
// The host port writes and reads the scratchpad; hold keeps the core in
// reset (the FIFOs keep running) so a program can be loaded. One clock for the
// whole tile. With SLEEP_ON_BNR the core holds its pipeline while it waits
// on an empty receive FIFO with a bnr to itself, and sleeping says so (see
// rv_core); the FIFOs and the router keep running.
module pimp_tile #(
  parameter int unsigned NODE_W     = 4,
  parameter int unsigned SPM_BYTES  = 65536,
  parameter int unsigned SEND_DEPTH = 8,
  parameter int unsigned RECV_DEPTH = 16,
  parameter bit          SLEEP_ON_BNR = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              hold,
  // host access to the scratchpad
  input  logic              h_we,
  input  logic [31:0]       h_addr,
  input  logic [63:0]       h_wdata,
  output logic [63:0]       h_rdata,
  // towards the router
  output logic              net_out_valid,
  output logic [NODE_W-1:0] net_out_dest,
  output logic [63:0]       net_out_data,
  input  logic              net_out_ready,
  // from the router
  input  logic              net_in_valid,
  input  logic [NODE_W-1:0] net_in_src,
  input  logic [63:0]       net_in_data,
  output logic              net_in_ready,
  // status
  output logic              halted,
  output logic              sleeping,
  output logic              pimp_exc,
  output logic              illegal
);
  logic [31:0]       imem_addr, imem_rdata;
  logic [31:0]       dmem_addr;
  logic              dmem_we;
  logic [7:0]        dmem_be;
  logic [63:0]       dmem_wdata, dmem_rdata;
  logic              send_full, send_enq, send_empty;
  logic [NODE_W-1:0] send_node;
  logic [63:0]       send_data;
  logic              recv_full, recv_empty, recv_deq;
  logic [NODE_W-1:0] recv_node;
  logic [63:0]       recv_data;

  rv_core #(.NODE_W(NODE_W), .SLEEP_ON_BNR(SLEEP_ON_BNR)) u_core (
    .clk, .rst_n(rst_n && !hold),
    .imem_addr, .imem_rdata,
    .dmem_addr, .dmem_we, .dmem_be, .dmem_wdata, .dmem_rdata,
    .send_full, .send_enq, .send_node, .send_data,
    .recv_empty, .recv_node, .recv_data, .recv_deq,
    .halted, .sleeping, .pimp_exc, .illegal
  );

  scratchpad #(.BYTES(SPM_BYTES)) u_spm (
    .clk,
    .if_addr(imem_addr), .if_rdata(imem_rdata),
    .d_addr(dmem_addr), .d_we(dmem_we), .d_be(dmem_be), .d_wdata(dmem_wdata), .d_rdata(dmem_rdata),
    .h_we, .h_addr, .h_wdata, .h_rdata
  );

  msg_fifo #(.DEPTH(SEND_DEPTH), .NODE_W(NODE_W), .DATA_W(64)) u_send (
    .clk, .rst_n,
    .enqueue(send_enq), .wr_node(send_node), .wr_data(send_data), .full(send_full),
    .dequeue(net_out_valid && net_out_ready), .rd_node(net_out_dest), .rd_data(net_out_data),
    .empty(send_empty)
  );
  assign net_out_valid = !send_empty;

  msg_fifo #(.DEPTH(RECV_DEPTH), .NODE_W(NODE_W), .DATA_W(64)) u_recv (
    .clk, .rst_n,
    .enqueue(net_in_valid && net_in_ready), .wr_node(net_in_src), .wr_data(net_in_data),
    .full(recv_full),
    .dequeue(recv_deq), .rd_node(recv_node), .rd_data(recv_data), .empty(recv_empty)
  );
  assign net_in_ready = !recv_full;
endmodule
