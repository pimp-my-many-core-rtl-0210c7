// msg_fifo: the ordinary FIFO that decouples a core pipeline from the NoC.
//
// Each tile holds two of them. The send FIFO (8 entries in the prototype
// configuration) takes {target node, payload} from the execute stage and
// hands it to the router; the receive FIFO (16 entries) takes {sender node,
// payload} from the router and offers its head to the execute stage. An entry
// is NODE_W + DATA_W bits, 4 + 64 = 68 for 16 nodes.
//
// The head entry is visible combinationally on rd_node/rd_data (first-word
// fall-through), so the execute stage can read it in the same cycle as it
// dequeues, and full/empty come straight from registers, which keeps them
// early in the cycle. Pointers carry one wrap bit beyond the index so that all
// DEPTH entries are usable. A write while full and a read while empty are
// ignored; the pipeline and the NoC check full/empty first. Reset empties the
// FIFO; the storage array itself is not reset. One clock for both sides: a
// separate core and NoC clock is left out of this design.
module msg_fifo #(
  parameter int unsigned DEPTH  = 8,
  parameter int unsigned NODE_W = 4,
  parameter int unsigned DATA_W = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  // write side
  input  logic              enqueue,
  input  logic [NODE_W-1:0] wr_node,
  input  logic [DATA_W-1:0] wr_data,
  output logic              full,
  // read side
  input  logic              dequeue,
  output logic [NODE_W-1:0] rd_node,
  output logic [DATA_W-1:0] rd_data,
  output logic              empty
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  typedef struct packed {
    logic [NODE_W-1:0] node;
    logic [DATA_W-1:0] data;
  } entry_t;

  entry_t       mem [DEPTH];
  logic [AW:0]  wr_ptr, rd_ptr;
  logic         do_wr, do_rd;

  assign empty = (wr_ptr == rd_ptr);
  assign full  = (wr_ptr[AW] != rd_ptr[AW]) && (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]);
  assign do_wr = enqueue && !full;
  assign do_rd = dequeue && !empty;

  assign rd_node = mem[rd_ptr[AW-1:0]].node;
  assign rd_data = mem[rd_ptr[AW-1:0]].data;

  // Pointer increment that wraps the index at DEPTH, for any DEPTH.
  function automatic logic [AW:0] next_ptr(input logic [AW:0] p);
    if (p[AW-1:0] == AW'(DEPTH - 1)) return {~p[AW], {AW{1'b0}}};
    else                              return p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr[AW-1:0]] <= '{node: wr_node, data: wr_data};
  end

  initial begin
    assert (DEPTH >= 2) else $error("msg_fifo: DEPTH must be at least 2");
  end
endmodule
