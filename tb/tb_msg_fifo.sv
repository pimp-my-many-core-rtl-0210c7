// tb_msg_fifo: self-checking test of msg_fifo.
//
// Runs the FIFO with DEPTH = 8 (send FIFO size) against a queue model under
// random enqueue/dequeue traffic, including writes while full and reads while
// empty. Checks every cycle: full, empty and the head entry. Also checks that
// exactly DEPTH entries fit and that a written word is visible at the head in
// the cycle after the write.
module tb_msg_fifo;
  localparam int DEPTH = 8;
  localparam int NW = 4;

  logic clk = 0, rst_n = 0;
  logic enqueue = 0, dequeue = 0, full, empty;
  logic [NW-1:0] wr_node, rd_node;
  logic [63:0]   wr_data, rd_data;
  int checks = 0, failures = 0;

  typedef struct packed { logic [NW-1:0] node; logic [63:0] data; } ent_t;
  ent_t model [$];

  msg_fifo #(.DEPTH(DEPTH), .NODE_W(NW), .DATA_W(64)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic compare();
    check(empty == (model.size() == 0), "empty");
    check(full == (model.size() == DEPTH), "full");
    if (model.size() > 0) check(rd_node == model[0].node && rd_data == model[0].data, "head");
  endtask

  task automatic step(input bit e, input bit d, input logic [NW-1:0] n, input logic [63:0] v);
    enqueue = e; dequeue = d; wr_node = n; wr_data = v;
    @(posedge clk);
    #1;
    // model: read and write in the same cycle both happen if allowed
    begin
      bit can_w = e && (model.size() < DEPTH);
      bit can_r = d && (model.size() > 0);
      if (can_r) void'(model.pop_front());
      if (can_w) model.push_back('{node: n, data: v});
    end
    enqueue = 0; dequeue = 0;
    compare();
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_node = '0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 compare();
    // fill to full, one more write is ignored
    for (int i = 0; i < DEPTH + 1; i++) begin
      step(1, 0, NW'(i), 64'hA000_0000_0000_0000 + 64'(i));
      if (i == 0) check(rd_data == 64'hA000_0000_0000_0000, "fall-through after one cycle");
    end
    check(full && model.size() == DEPTH, "exactly DEPTH entries");
    // drain, one more read is ignored
    for (int i = 0; i < DEPTH + 1; i++) step(0, 1, '0, '0);
    check(empty, "empty after drain");
    // random traffic
    for (int i = 0; i < 1000; i++)
      step(1'($urandom_range(0, 99) < 55), 1'($urandom_range(0, 99) < 50),
           NW'($urandom), {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
