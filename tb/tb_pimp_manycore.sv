// tb_pimp_manycore: end-to-end test of the many-core at its default size
// (16 nodes, 64 KiB scratchpads, 8-entry send and 16-entry receive FIFOs).
//
// All nodes run one program, loaded through the host port while hold is high.
// It uses the long-message scheme built on single-word PIMP messages: before
// a long transfer the receiver sends a "ready" word to the sender; the sender
// waits for it (or finds it already recorded in its ready array) and then
// streams the words; while receiving, words from any other node are taken as
// ready notifications and recorded in the ready array.
//   1. Ring: node 0 sends a message of MSG_WORDS words to node 1; every node k
//      receives it from k-1, stores it and sends it on to k+1; node 0 finally
//      receives it back from node 15. Early ready words from a node's
//      successor arrive while it is still receiving, so both the "other
//      sender" path and the skipped handshake occur, and node 0 does a real
//      handshake.
//   2. Gather: node 0 sends a "go" (ready) word to every node with blocking
//      sends; every node then streams the first G words of its copy to node 0,
//      testing the send FIFO with a non-blocking brs poll; node 0 takes the
//      interleaved streams polling with bar, adds up the payloads and counts
//      the words of each sender (one counter per node, as for a gather).
//   3. Node 0 executes one more recv on its empty receive FIFO, which must
//      raise the PIMP exception.
// Checked: every node's copy of the message, node 0's gathered total and per-sender counts, which
// nodes stopped and why. Each mechanism is counted and must occur at least
// once: send, src, recv, bnr/bns waiting (taken self-branches), brs taken
// and not taken, bar taken, send FIFO full, receive FIFO full with a word waiting
// in the network, two senders addressing one node in the same cycle, a
// load-use stall, the other-sender path, the skipped and the real handshake,
// and the PIMP exception.
module tb_pimp_manycore;
  import pimp_pkg::*;
  import rv_asm_pkg::*;

  localparam int N = 16, NW = 4, MSG_WORDS = 256, G = 16;
  localparam logic [4:0] GP = 5'd3, S2 = 5'd18, S3 = 5'd19, S4 = 5'd20, S5 = 5'd21,
                         S6 = 5'd22, S7 = 5'd23, S8 = 5'd24, T5 = 5'd30, T6 = 5'd31;

  logic clk = 0, rst_n = 0, hold = 1;
  logic load_we = 0;
  logic [NW-1:0] load_node = 0, rd_node = 0;
  logic [31:0] load_addr = 0, rd_addr = 0;
  logic [63:0] load_data = 0, rd_data;
  logic [N-1:0] halted, sleeping, pimp_exc, illegal;
  int checks = 0, failures = 0;

  pimp_manycore dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ------------------------------------------------------------ mechanism counters
  int n_send, n_src, n_recv, n_bnr_wait, n_bns_wait, n_brs_t, n_brs_n, n_bar_t, n_bar_n;
  int n_send_full, n_recv_full, n_contention, n_loaduse, n_exc;
  initial begin
    n_send = 0; n_src = 0; n_recv = 0; n_bnr_wait = 0; n_bns_wait = 0; n_brs_t = 0; n_brs_n = 0;
    n_bar_t = 0; n_bar_n = 0; n_send_full = 0; n_recv_full = 0; n_contention = 0; n_loaduse = 0;
    n_exc = 0;
  end

  for (genvar n = 0; n < N; n++) begin : g_mon
    always @(posedge clk) if (rst_n && !hold) begin
      automatic ctrl_t c = dut.g_tile[n].u_tile.u_core.idex_ctrl;
      automatic logic  t = dut.g_tile[n].u_tile.u_core.br_taken;
      if (dut.g_tile[n].u_tile.u_core.send_enq) n_send++;
      if (dut.g_tile[n].u_tile.u_core.recv_deq) n_recv++;
      if (c.valid && c.pimp_op == PIMP_SRC && !dut.g_tile[n].u_tile.u_core.pimp_exception) n_src++;
      if (c.valid && c.is_branch && c.sel_branch == SELB_EMPTY && !c.br_negate && t && c.imm == 0) n_bnr_wait++;
      if (c.valid && c.is_branch && c.sel_branch == SELB_FULL && !c.br_negate && t && c.imm == 0) n_bns_wait++;
      if (c.valid && c.is_branch && c.sel_branch == SELB_FULL && c.br_negate) begin
        if (t) n_brs_t++; else n_brs_n++;
      end
      if (c.valid && c.is_branch && c.sel_branch == SELB_EMPTY && c.br_negate) begin
        if (t) n_bar_t++; else n_bar_n++;
      end
      if (dut.g_tile[n].u_tile.send_full) n_send_full++;
      if (dut.ej_valid[n] && !dut.ej_ready[n]) n_recv_full++;
      if (dut.g_tile[n].u_tile.u_core.stall) n_loaduse++;
      if (dut.g_tile[n].u_tile.u_core.stop_now && dut.g_tile[n].u_tile.u_core.pimp_exception) n_exc++;
    end
  end
  always @(posedge clk) if (rst_n && !hold) begin
    automatic int cnt [N];
    for (int d = 0; d < N; d++) cnt[d] = 0;
    for (int s = 0; s < N; s++) if (dut.inj_valid[s]) cnt[dut.inj_dest[s]]++;
    for (int d = 0; d < N; d++) if (cnt[d] > 1) n_contention++;
  end

  // ------------------------------------------------------------ program
  // Memory map of every node (byte addresses), GP = 0x1000:
  //   GP+0x000 ready array, one byte per node
  //   GP+0x100 other-sender count   GP+0x108 skipped-handshake count
  //   GP+0x110 own id  +0x118 predecessor  +0x120 successor
  //   GP+0x128 message words  +0x130 gathered payload total (node 0)  +0x138 done mark
  //   GP+0x140 node count  GP+0x200 gather counters, one 64-bit word per node
  //   0x2000 received message, 0x3000 original message (node 0)
  logic [31:0] prog [$];
  function automatic int here(); return prog.size() * 4; endfunction
  function automatic void emit(logic [31:0] i); prog.push_back(i); endfunction

  task automatic build_program();
    int send_long, recv_long, node_k, call_s0, call_r0, call_rk, call_sk;
    int hs, begin_s, sl, rn, rl, other, skip_fix, other_fix, waitgo, sdone, okd;
    int go, gath, got, bar_fix, brs_fix, to_k;
    prog.delete();
    emit(lui(GP, 1));
    emit(ld(S2, GP, 'h110));
    emit(ld(S3, GP, 'h118));
    emit(ld(S4, GP, 'h120));
    emit(ld(S5, GP, 'h128));
    emit(lui(S6, 2));
    to_k = here(); emit(nop());                 // bne s2, zero, node_k
    // node 0: send the original, then receive it back
    emit(lui(A2, 3)); emit(addi(A0, S4, 0)); emit(addi(A1, S5, 0));
    call_s0 = here(); emit(nop());              // jal ra, send_long
    emit(addi(A0, S3, 0)); emit(addi(A1, S5, 0)); emit(addi(A2, S6, 0));
    call_r0 = here(); emit(nop());              // jal ra, recv_long
    // go words to nodes 1..N-1, blocking send
    emit(ld(S8, GP, 'h140)); emit(li(S7, 1));
    go = here();
    emit(bns(0)); emit(send(S7, S7)); emit(addi(S7, S7, 1)); emit(bne(S7, S8, go - (here())));
    // gather G words from each of the N-1 other nodes, polling with bar;
    // add up the payloads and count the words per sender at GP+0x200
    emit(li(S8, 0)); emit(ld(S7, GP, 'h140)); emit(addi(S7, S7, -1)); emit(slli(S7, S7, 4));
    gath = here();
    bar_fix = here(); emit(nop());              // bar got
    emit(jal(ZERO, gath - here()));
    got = here();
    emit(src(T0)); emit(recv(T1)); emit(add(S8, S8, T1));
    emit(slli(T5, T0, 3)); emit(add(T5, T5, GP)); emit(ld(T4, T5, 'h200)); emit(addi(T4, T4, 1));
    emit(sd(T4, T5, 'h200));
    emit(addi(S7, S7, -1));
    emit(bne(S7, ZERO, gath - here()));
    prog[bar_fix / 4] = bar(got - bar_fix);
    emit(sd(S8, GP, 'h130)); emit(li(T0, 1)); emit(sd(T0, GP, 'h138));
    emit(recv(T1));                             // empty: PIMP exception
    emit(sd(T1, GP, 'h138));
    emit(ecall());
    // node k: receive from predecessor, pass on, answer the go word
    node_k = here();
    prog[to_k / 4] = bne(S2, ZERO, node_k - to_k);
    emit(addi(A0, S3, 0)); emit(addi(A1, S5, 0)); emit(addi(A2, S6, 0));
    call_rk = here(); emit(nop());
    emit(addi(A0, S4, 0)); emit(addi(A1, S5, 0)); emit(addi(A2, S6, 0));
    call_sk = here(); emit(nop());
    waitgo = here();
    emit(bnr(0)); emit(src(T0)); emit(recv(T1));
    // stream the first G words of the copy to node 0, polling with brs
    emit(li(A1, G)); emit(addi(A2, S6, 0));
    sdone = here();
    brs_fix = here(); emit(nop());              // brs okd
    emit(jal(ZERO, sdone - here()));
    okd = here();
    prog[brs_fix / 4] = brs(okd - brs_fix);
    emit(ld(T0, A2, 0)); emit(send(ZERO, T0));  // node 0
    emit(addi(A2, A2, 8)); emit(addi(A1, A1, -1));
    emit(blt(ZERO, A1, sdone - here()));
    emit(ecall());
    // send_long: a0 target, a1 words, a2 source
    send_long = here();
    emit(add(T3, GP, A0)); emit(lb(T0, T3, 0));
    skip_fix = here(); emit(nop());             // bne t0, zero, skip
    hs = here();
    emit(bnr(0)); emit(src(T0)); emit(recv(T1));
    emit(add(T5, GP, T0)); emit(li(T6, 1)); emit(sb(T6, T5, 0));
    emit(bne(T0, A0, hs - here()));
    emit(jal(ZERO, 20));                        // over the skip count, to begin_s
    prog[skip_fix / 4] = bne(T0, ZERO, here() - skip_fix);
    emit(ld(T4, GP, 'h108)); emit(addi(T4, T4, 1)); emit(sd(T4, GP, 'h108));
    emit(nop());
    begin_s = here();
    emit(sb(ZERO, T3, 0));
    sl = here();
    emit(bns(0)); emit(ld(T0, A2, 0)); emit(send(A0, T0)); emit(addi(A2, A2, 8));
    emit(addi(A1, A1, -1)); emit(blt(ZERO, A1, sl - here()));
    emit(jalr(ZERO, RA, 0));
    // recv_long: a0 source, a1 words, a2 destination
    recv_long = here();
    rn = here();
    emit(bns(0)); emit(li(T2, 1)); emit(send(A0, T2));
    rl = here();
    emit(bnr(0)); emit(src(T0)); emit(recv(T1));
    other_fix = here(); emit(nop());            // bne t0, a0, other
    emit(sd(T1, A2, 0)); emit(addi(A2, A2, 8)); emit(addi(A1, A1, -1));
    emit(blt(ZERO, A1, rl - here()));
    emit(jalr(ZERO, RA, 0));
    other = here();
    prog[other_fix / 4] = bne(T0, A0, other - other_fix);
    emit(add(T5, GP, T0)); emit(sb(T2, T5, 0));
    emit(ld(T4, GP, 'h100)); emit(addi(T4, T4, 1)); emit(sd(T4, GP, 'h100));
    emit(jal(ZERO, rl - here()));
    // calls
    prog[call_s0 / 4] = jal(RA, send_long - call_s0);
    prog[call_r0 / 4] = jal(RA, recv_long - call_r0);
    prog[call_rk / 4] = jal(RA, recv_long - call_rk);
    prog[call_sk / 4] = jal(RA, send_long - call_sk);
    if (begin_s - (skip_fix + 4 + 7 * 4) != 20) $display("internal: jump over skip count is off");
    if (prog.size() % 2 == 1) emit(nop());
  endtask

  // ------------------------------------------------------------ host access
  task automatic host_write(int node, int addr, logic [63:0] v);
    load_we = 1; load_node = NW'(node); load_addr = 32'(addr); load_data = v;
    @(posedge clk); #1;
    load_we = 0;
  endtask
  task automatic host_read(input int node, input int addr, output logic [63:0] v);
    rd_node = NW'(node); rd_addr = 32'(addr);
    #1 v = rd_data;
  endtask

  function automatic logic [63:0] word_of(int j);
    return {32'hCAFE_0000 | 32'(j), 32'(j * 7919)};
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] csum, v;
    int start, other_total, skip_total, cycles;
    build_program();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < N; n++) begin
      for (int i = 0; i < prog.size(); i += 2) host_write(n, i * 4, {prog[i + 1], prog[i]});
      for (int i = 0; i < 16; i += 8) host_write(n, 'h1000 + i, 64'd0);   // ready array
      host_write(n, 'h1100, 0); host_write(n, 'h1108, 0);
      host_write(n, 'h1110, 64'(n));
      host_write(n, 'h1118, 64'((n + N - 1) % N));
      host_write(n, 'h1120, 64'((n + 1) % N));
      host_write(n, 'h1128, 64'(MSG_WORDS));
      host_write(n, 'h1130, 0); host_write(n, 'h1138, 0);
      host_write(n, 'h1140, 64'(N));
      for (int i = 0; i < N; i++) host_write(n, 'h1200 + 8 * i, 0);  // gather counters
    end
    csum = 0;
    for (int j = 0; j < MSG_WORDS; j++) begin
      host_write(0, 'h3000 + 8 * j, word_of(j));
      if (j < G) csum += word_of(j);
    end
    check(halted == '0, "cores held during loading");
    start = $time / 10;
    @(negedge clk) hold = 0;
    wait (&halted);
    cycles = $time / 10 - start;
    repeat (2) @(posedge clk);
    #1;
    // results
    for (int n = 0; n < N; n++) begin
      int bad = 0;
      for (int j = 0; j < MSG_WORDS; j++) begin
        host_read(n, 'h2000 + 8 * j, v);
        if (v != word_of(j)) bad++;
      end
      check(bad == 0, $sformatf("node %0d copy of the message", n));
    end
    host_read(0, 'h1130, v);
    check(v == 64'(N - 1) * csum, "gathered payload total");
    for (int n = 1; n < N; n++) begin
      host_read(0, 'h1200 + 8 * n, v);
      check(v == 64'(G), $sformatf("gathered word count from node %0d", n));
    end
    host_read(0, 'h1138, v);
    check(v == 64'd1, "node 0 reached the final recv and nothing after it");
    check(pimp_exc == 16'h0001, "only node 0 stopped on a PIMP exception");
    check(illegal == '0, "no illegal instruction");
    other_total = 0; skip_total = 0;
    for (int n = 0; n < N; n++) begin
      host_read(n, 'h1100, v); other_total += int'(v);
      host_read(n, 'h1108, v); skip_total  += int'(v);
    end
    host_read(0, 'h1108, v);
    check(v == 0, "node 0 did a real handshake");
    check(n_send == N * (MSG_WORDS + 1) + (N - 1) + G * (N - 1), "number of send instructions");
    // data words, one ready word per node, go words, gathered words
    check(n_recv == N * MSG_WORDS + N + (N - 1) + G * (N - 1), "number of recv instructions");
    check(other_total == skip_total, "every recorded ready word skipped a handshake");
    $display("cycles=%0d sends=%0d srcs=%0d recvs=%0d other=%0d skipped=%0d", cycles, n_send, n_src, n_recv, other_total, skip_total);
    $display("bnr_wait=%0d bns_wait=%0d brs=%0d/%0d bar=%0d/%0d send_full=%0d recv_full=%0d contention=%0d loaduse=%0d exc=%0d",
             n_bnr_wait, n_bns_wait, n_brs_t, n_brs_n, n_bar_t, n_bar_n, n_send_full, n_recv_full, n_contention, n_loaduse, n_exc);
    check(n_src == n_recv, "every src followed by one recv");
    check(n_bnr_wait > 0, "mechanism: bnr waiting");
    check(n_bns_wait > 0, "mechanism: bns waiting");
    check(n_brs_t > 0 && n_brs_n > 0, "mechanism: brs taken and not taken");
    check(n_bar_t > 0, "mechanism: bar taken");
    check(n_send_full > 0, "mechanism: send FIFO full");
    check(n_recv_full > 0, "mechanism: receive FIFO full, network held");
    check(n_contention > 0, "mechanism: two senders to one node");
    check(n_loaduse > 0, "mechanism: load-use stall");
    check(other_total > 0, "mechanism: word from another sender during a long receive");
    check(skip_total > 0, "mechanism: handshake skipped, ready already recorded");
    check(n_exc == 1, "mechanism: PIMP exception");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
