// tb_rv_core: self-checking test of the five-stage core with PIMP.
//
// The core runs from an 8 KiB memory model; its send and receive FIFOs are
// msg_fifo instances (8 and 16 entries) whose network sides the testbench
// drives. Two programs, each from reset:
//   A  integer code: forwarding, a load-use stall, byte loads, a counted loop,
//      jal, lui/addiw/sltu, and brs/bar on idle FIFOs (brs taken, bar not),
//      ending in ecall. Results stored to memory are compared with values
//      computed by hand.
//   B  message passing: a blocking receive loop (bnr to itself, src, recv)
//      takes four messages that the testbench injects after a delay, stores
//      sender and payload; then a blocking send loop (bns to itself, send)
//      sends ten words to node 3 while the testbench drains the send FIFO
//      slowly, so the FIFO fills and bns waits; finally a recv on an empty
//      FIFO must stop the core with a PIMP exception.
// Timing checks: while waiting, the self-referential bnr is re-fetched every
// three cycles (branch resolved in execute); an instruction after ecall or
// after the faulting recv has no effect.
module tb_rv_core;
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
  // network sides of the FIFOs
  logic net_enq = 0, net_deq = 0, send_empty, recv_full;
  logic [3:0] net_node = 0, out_node;
  logic [63:0] net_data = 0, out_data;

  int checks = 0, failures = 0;
  logic [63:0] mem [1024];
  logic [31:0] prog [$];

  rv_core #(.NODE_W(4)) dut (.*);

  msg_fifo #(.DEPTH(8), .NODE_W(4), .DATA_W(64)) u_send (
    .clk, .rst_n, .enqueue(send_enq), .wr_node(send_node), .wr_data(send_data), .full(send_full),
    .dequeue(net_deq), .rd_node(out_node), .rd_data(out_data), .empty(send_empty));
  msg_fifo #(.DEPTH(16), .NODE_W(4), .DATA_W(64)) u_recv (
    .clk, .rst_n, .enqueue(net_enq), .wr_node(net_node), .wr_data(net_data), .full(recv_full),
    .dequeue(recv_deq), .rd_node(recv_node), .rd_data(recv_data), .empty(recv_empty));

  always #5 clk = ~clk;

  // memory model, combinational read
  assign imem_rdata = imem_addr[2] ? mem[imem_addr[12:3]][63:32] : mem[imem_addr[12:3]][31:0];
  assign dmem_rdata = mem[dmem_addr[12:3]];
  always_ff @(posedge clk)
    if (dmem_we)
      for (int b = 0; b < 8; b++) if (dmem_be[b]) mem[dmem_addr[12:3]][8*b +: 8] <= dmem_wdata[8*b +: 8];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic load_and_reset();
    rst_n = 0;
    for (int i = 0; i < 1024; i++) mem[i] = '0;
    foreach (prog[i]) begin
      if (i % 2 == 0) mem[i / 2][31:0] = prog[i];
      else            mem[i / 2][63:32] = prog[i];
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
  endtask

  // Fetch monitor, ports only. In program B the bnr sits at address 8 and the
  // bns at address 52. While bnr waits, address 8 is fetched every three
  // cycles; re-fetches through the receive loop are at least eight apart.
  // More than ten fetches of the bns mean that it waited at least once.
  int cycle = 0, prog_b = 0;
  int bnr_last = -1, bnr_taken = 0, bnr_bad_period = 0, bns_fetches = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && prog_b && !halted) begin
      if (imem_addr == 32'd8) begin
        if (bnr_last >= 0 && cycle - bnr_last == 3) bnr_taken++;
        else if (bnr_last >= 0 && cycle - bnr_last < 8) bnr_bad_period++;
        bnr_last = cycle;
      end
      if (imem_addr == 32'd52) bns_fetches++;
    end
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ------------------------------------------------ program A
    prog = '{li(A0, 5), li(A1, 7), add(A2, A0, A1), sub(A3, A2, A0),
             sd(A2, ZERO, 'h100), sd(A3, ZERO, 'h108), ld(T0, ZERO, 'h100), addi(T1, T0, 1),
             sd(T1, ZERO, 'h110), li(T2, -1), sb(T2, ZERO, 'h118), lbu(T3, ZERO, 'h118),
             lb(T4, ZERO, 'h118), sd(T3, ZERO, 'h120), sd(T4, ZERO, 'h128), li(S0, 0),
             li(S1, 10), add(S0, S0, S1), addi(S1, S1, -1), blt(ZERO, S1, -8),
             sd(S0, ZERO, 'h130), jal(RA, 12), li(A4, 99), li(A4, 98),
             sd(RA, ZERO, 'h138), brs(8), li(A4, 99), bar(8),
             li(A5, 7), sd(A4, ZERO, 'h140), sd(A5, ZERO, 'h148), lui(A0, 'h12345),
             addiw(A0, A0, 'h678), sd(A0, ZERO, 'h150), li(A1, -3), sltu(A2, A0, A1),
             sd(A2, ZERO, 'h158), ecall(), li(A4, 1), sd(A4, ZERO, 'h140)};
    load_and_reset();
    wait (halted);
    repeat (3) @(posedge clk);
    check(!pimp_exc && !illegal, "A: clean halt");
    check(mem['h100/8] == 12, "A: forwarding add");
    check(mem['h108/8] == 7, "A: forwarding sub");
    check(mem['h110/8] == 13, "A: load-use");
    check(mem['h118/8] == 64'hff, "A: sb");
    check(mem['h120/8] == 255, "A: lbu");
    check(mem['h128/8] == 64'hffff_ffff_ffff_ffff, "A: lb");
    check(mem['h130/8] == 55, "A: loop");
    check(mem['h138/8] == 88, "A: jal link");
    check(mem['h140/8] == 0, "A: brs taken, nothing after ecall");
    check(mem['h148/8] == 7, "A: bar not taken");
    check(mem['h150/8] == 64'h1234_5678, "A: lui/addiw");
    check(mem['h158/8] == 1, "A: sltu");

    // ------------------------------------------------ program B
    prog = '{li(S0, 'h200), li(S1, 4),
             bnr(0), src(T0), recv(T1), sd(T0, S0, 0), sd(T1, S0, 8), addi(S0, S0, 16),
             addi(S1, S1, -1), bne(S1, ZERO, -28),
             li(A0, 3), li(T2, 100), li(S1, 10),
             bns(0), send(A0, T2), addi(T2, T2, 1), addi(S1, S1, -1), bne(S1, ZERO, -16),
             li(A5, 1), sd(A5, ZERO, 'h300), recv(T3), sd(A5, ZERO, 'h308)};
    prog_b = 1;
    load_and_reset();
    fork
      begin // network into the receive FIFO
        repeat (20) @(posedge clk);
        for (int i = 0; i < 4; i++) begin
          #1 net_enq = 1; net_node = 4'(i + 1); net_data = 64'hD000 + 64'(i);
          @(posedge clk);
          #1 net_enq = 0;
          repeat (7) @(posedge clk);
        end
      end
      begin // network out of the send FIFO: start late, then one word every other cycle
        int got = 0;
        wait (send_full);
        repeat (10) @(posedge clk);
        while (got < 10) begin
          #1;
          if (!send_empty) begin
            check(out_node == 4'd3 && out_data == 64'(100 + got), "B: send order and target");
            net_deq = 1;
            got++;
          end
          @(posedge clk);
          #1 net_deq = 0;
          @(posedge clk);
        end
      end
    join
    wait (halted);
    repeat (3) @(posedge clk);
    for (int i = 0; i < 4; i++) begin
      check(mem['h200/8 + 2*i] == 64'(i + 1), "B: src returns sender");
      check(mem['h200/8 + 2*i + 1] == 64'hD000 + 64'(i), "B: recv returns payload");
    end
    check(mem['h300/8] == 1, "B: reached final recv");
    check(halted && pimp_exc && !illegal, "B: recv on empty FIFO raises PIMP exception");
    check(mem['h308/8] == 0, "B: nothing after the exception");
    check(send_empty, "B: all ten words sent");
    check(bnr_taken >= 3, "B: bnr waited");
    check(bnr_bad_period == 0, "B: bnr polls every three cycles");
    check(bns_fetches > 10, "B: bns waited on a full send FIFO");
    $display("bnr_taken=%0d bns_fetches=%0d", bnr_taken, bns_fetches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
