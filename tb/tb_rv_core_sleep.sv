// tb_rv_core_sleep: the core built with SLEEP_ON_BNR = 1.
//
// The core runs from a memory model with real send and receive FIFOs, as in
// tb_rv_core. Its program takes three words with the blocking loop
// "bnr to itself; src; recv", stores sender and payload, then stops with
// ecall. The testbench injects the first word after a long idle time, the
// second after another, and the third together with the second, so the third
// bnr finds a word waiting and must not sleep.
// Checks:
//   - sleeping rises while the receive FIFO is empty, and while it is high the
//     fetch address does not move (the front of the pipeline is frozen);
//   - sleeping falls in the very cycle after a word is written;
//   - the dequeue follows the enqueue edge at the third clock edge: one cycle
//     for the held bnr to fall through, then src and recv pass EX. A polling
//     core needs three to five edges, depending on where in its 3-cycle loop
//     the word lands;
//   - the stored senders and payloads, and a clean stop.
module tb_rv_core_sleep;
  import pimp_pkg::*;
  import rv_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [31:0] imem_addr, imem_rdata, dmem_addr;
  logic dmem_we;
  logic [7:0] dmem_be;
  logic [63:0] dmem_wdata, dmem_rdata;
  logic send_full, send_enq, recv_empty, recv_deq, halted, sleeping, pimp_exc, illegal;
  logic [3:0] send_node, recv_node;
  logic [63:0] send_data, recv_data;
  logic net_enq = 0, send_empty, recv_full;
  logic [3:0] net_node = 0, out_node;
  logic [63:0] net_data = 0, out_data;

  int checks = 0, failures = 0;
  logic [63:0] mem [512];
  logic [31:0] prog [$];

  rv_core #(.NODE_W(4), .SLEEP_ON_BNR(1'b1)) dut (.*);

  msg_fifo #(.DEPTH(8), .NODE_W(4), .DATA_W(64)) u_send (
    .clk, .rst_n, .enqueue(send_enq), .wr_node(send_node), .wr_data(send_data), .full(send_full),
    .dequeue(1'b0), .rd_node(out_node), .rd_data(out_data), .empty(send_empty));
  msg_fifo #(.DEPTH(16), .NODE_W(4), .DATA_W(64)) u_recv (
    .clk, .rst_n, .enqueue(net_enq), .wr_node(net_node), .wr_data(net_data), .full(recv_full),
    .dequeue(recv_deq), .rd_node(recv_node), .rd_data(recv_data), .empty(recv_empty));

  always #5 clk = ~clk;

  assign imem_rdata = imem_addr[2] ? mem[imem_addr[11:3]][63:32] : mem[imem_addr[11:3]][31:0];
  assign dmem_rdata = mem[dmem_addr[11:3]];
  always_ff @(posedge clk)
    if (dmem_we)
      for (int b = 0; b < 8; b++) if (dmem_be[b]) mem[dmem_addr[11:3]][8*b +: 8] <= dmem_wdata[8*b +: 8];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // sampled just before every edge
  int sleep_cycles = 0, frozen_moves = 0;
  logic [31:0] last_addr = '0;
  logic was_sleeping = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (sleeping) sleep_cycles++;
      if (sleeping && was_sleeping && imem_addr != last_addr) frozen_moves++;
      was_sleeping = sleeping;
      last_addr = imem_addr;
    end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // put one word into the receive FIFO at the next edge; return the number of
  // edges from that edge until recv_deq is seen high at an edge
  task automatic inject(input logic [3:0] node, input logic [63:0] data, input bit measure,
                        output int edges);
    net_enq = 1; net_node = node; net_data = data;
    @(posedge clk); #1;
    net_enq = 0;
    edges = 0;
    if (measure) begin
      check(!sleeping, "sleeping falls in the cycle after the word arrives");
      do begin
        edges++;
        @(posedge clk);
      end while (!recv_deq && edges < 20);
      #1;
    end
  endtask

  initial begin
    int e;
    prog = '{li(S0, 3), li(S1, 'h200), bnr(0), src(T0), recv(T1), sd(T0, S1, 0), sd(T1, S1, 8),
             addi(S1, S1, 16), addi(S0, S0, -1), bne(S0, ZERO, -28), ecall(), nop()};
    for (int i = 0; i < 512; i++) mem[i] = '0;
    foreach (prog[i]) begin
      if (i % 2 == 0) mem[i / 2][31:0] = prog[i];
      else            mem[i / 2][63:32] = prog[i];
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    repeat (30) @(posedge clk);
    #1;
    check(sleeping, "asleep while waiting for the first word");
    check(imem_addr == 32'd16, "fetch frozen behind bnr, src, recv");
    inject(4'd5, 64'h1111_2222_3333_4444, 1, e);
    check(e == 3, $sformatf("first word dequeued at the 3rd edge (got %0d)", e));

    repeat (40) @(posedge clk);
    #1;
    check(sleeping, "asleep again while waiting for the second word");
    inject(4'd9, 64'hdead_beef_0000_0001, 1, e);
    check(e == 3, $sformatf("second word dequeued at the 3rd edge (got %0d)", e));
    inject(4'd2, 64'hdead_beef_0000_0002, 0, e);

    wait (halted);
    repeat (3) @(posedge clk);
    #1;
    check(!pimp_exc && !illegal, "clean stop");
    check(!sleeping, "not asleep after the stop");
    check(mem['h200/8] == 5 && mem['h208/8] == 64'h1111_2222_3333_4444, "word 1 sender and payload");
    check(mem['h210/8] == 9 && mem['h218/8] == 64'hdead_beef_0000_0001, "word 2 sender and payload");
    check(mem['h220/8] == 2 && mem['h228/8] == 64'hdead_beef_0000_0002, "word 3 sender and payload");
    check(sleep_cycles >= 50, $sformatf("slept through the idle time (%0d cycles)", sleep_cycles));
    check(frozen_moves == 0, "fetch address never moved while asleep");
    $display("cycles asleep: %0d", sleep_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
