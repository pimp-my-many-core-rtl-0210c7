// tb_collectives: collective message-passing operations on the full many-core.
//
// One program on every node runs one of five collectives, chosen by the
// testbench through the node's parameter block, among the first P nodes
// (nodes P..15 stop at once). Every operation is built from single-word PIMP
// messages:
//   1 barrier    R rounds: every node sends one word to node 0 and waits for
//                a release word; node 0 collects P-1 arrivals, then releases.
//   2 broadcast  node 0 sends its M-word vector to every other node.
//   3 reduce     every other node sends its vector to node 0, which adds the
//                words element by element, keeping one word counter per
//                sender because the streams interleave.
//   4 allreduce  recursive doubling: in round k each node exchanges its
//                current sum with node id^k and adds the partner's words;
//                words from a later round's partner that arrive early are
//                kept in a per-sender buffer.
//   5 alltoall   every node sends M words to every other node; to avoid a
//                deadlock of full FIFOs it alternates non-blocking brs/send
//                and bar/recv steps.
// Node i's input vector is x_i[j] = (i+1)*1000 + j. The results are checked
// against values computed here. Sizes: barrier and alltoall at P = 2, 4, 8
// and 16 nodes; broadcast and reduce at P = 2 and 16 with M = 1, 4 and 13
// words (8 to 104 bytes); allreduce at P = 2 and 16 with M = 4 words
// (recursive doubling needs P to be a power of two). The barrier runs R = 8
// rounds. The cycles of every run are printed; the barrier and alltoall
// must get slower as P grows.
// Why allreduce stays at 4 words: it sends before it receives, so two
// partners each sending long messages could fill each other's FIFOs; 4 words
// always fit in the 8 + 16 entries between them. Alltoall interleaves
// sending and receiving and so has no such limit.
module tb_collectives;
  import rv_asm_pkg::*;

  localparam int N = 16, NW = 4, MMAX = 13, R = 8;
  localparam logic [4:0] GP = 5'd3, S2 = 5'd18, S3 = 5'd19, S4 = 5'd20, S5 = 5'd21,
                         S6 = 5'd22, S7 = 5'd23, S8 = 5'd24, S9 = 5'd25, S10 = 5'd26,
                         T5 = 5'd30, T6 = 5'd31;

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
  task automatic host_write(int node, int addr, logic [63:0] v);
    load_we = 1; load_node = NW'(node); load_addr = 32'(addr); load_data = v;
    @(posedge clk); #1;
    load_we = 0;
  endtask
  task automatic host_read(input int node, input int addr, output logic [63:0] v);
    rd_node = NW'(node); rd_addr = 32'(addr);
    #1 v = rd_data;
  endtask

  // ------------------------------------------------------------ assembler with labels
  typedef enum {K_BEQ, K_BNE, K_BLT, K_JAL, K_BAR, K_BRS, K_BNR, K_BNS} kind_e;
  typedef struct { int at; kind_e kind; logic [4:0] a; logic [4:0] b; string target; } fix_t;
  logic [31:0] prog [$];
  int labels [string];
  fix_t fixes [$];

  function automatic void emit(logic [31:0] i); prog.push_back(i); endfunction
  function automatic void lab(string name); labels[name] = prog.size() * 4; endfunction
  function automatic void br(kind_e k, logic [4:0] a, logic [4:0] b, string target);
    fixes.push_back('{prog.size() * 4, k, a, b, target});
    prog.push_back(nop());
  endfunction
  function automatic void resolve();
    foreach (fixes[i]) begin
      int off = labels[fixes[i].target] - fixes[i].at;
      logic [31:0] ins;
      case (fixes[i].kind)
        K_BEQ: ins = beq(fixes[i].a, fixes[i].b, off);
        K_BNE: ins = bne(fixes[i].a, fixes[i].b, off);
        K_BLT: ins = blt(fixes[i].a, fixes[i].b, off);
        K_JAL: ins = jal(ZERO, off);
        K_BAR: ins = bar(off);
        K_BRS: ins = brs(off);
        K_BNR: ins = bnr(off);
        default: ins = bns(off);
      endcase
      prog[fixes[i].at / 4] = ins;
    end
  endfunction

  // Parameter block at 0x1000 (GP): +0x110 id, +0x128 M, +0x140 P, +0x148 operation,
  // +0x150 barrier rounds, +0x200 word counters per sender.
  // 0x3000 input vector, 0x2000 result vector, 0x4000 + 0x100*sender receive buffers.
  task automatic build();
    prog.delete(); labels.delete(); fixes.delete();
    emit(lui(GP, 1));
    emit(ld(S2, GP, 'h110)); emit(ld(S4, GP, 'h128)); emit(ld(S3, GP, 'h140));
    emit(ld(S5, GP, 'h148)); emit(addi(S9, S3, -1)); emit(li(S10, 1));
    br(K_BLT, S2, S3, "active"); emit(ecall());
    lab("active");
    emit(li(T0, 1)); br(K_BEQ, S5, T0, "barrier");
    emit(li(T0, 2)); br(K_BEQ, S5, T0, "bcast");
    emit(li(T0, 3)); br(K_BEQ, S5, T0, "reduce");
    emit(li(T0, 4)); br(K_BEQ, S5, T0, "allred");
    br(K_JAL, 0, 0, "a2a");

    // ---------------- barrier
    lab("barrier");
    emit(ld(S6, GP, 'h150));
    lab("bar_round");
    br(K_BEQ, S2, ZERO, "bar_root");
    lab("bar_tx"); br(K_BNS, 0, 0, "bar_tx"); emit(send(ZERO, S10));
    lab("bar_rx"); br(K_BNR, 0, 0, "bar_rx"); emit(recv(T1));
    br(K_JAL, 0, 0, "bar_next");
    lab("bar_root");
    emit(addi(S7, S9, 0));
    br(K_BEQ, S7, ZERO, "bar_rel");
    lab("bar_in"); br(K_BNR, 0, 0, "bar_in"); emit(recv(T1)); emit(addi(S7, S7, -1));
    br(K_BNE, S7, ZERO, "bar_in");
    lab("bar_rel"); emit(li(S7, 1));
    lab("bar_out"); br(K_BEQ, S7, S3, "bar_next");
    lab("bar_out_w"); br(K_BNS, 0, 0, "bar_out_w"); emit(send(S7, S10)); emit(addi(S7, S7, 1));
    br(K_JAL, 0, 0, "bar_out");
    lab("bar_next"); emit(addi(S6, S6, -1)); br(K_BNE, S6, ZERO, "bar_round");
    emit(sd(S10, ZERO, 'h7f8)); emit(ecall());

    // ---------------- broadcast
    lab("bcast");
    emit(lui(A2, 2));
    br(K_BEQ, S2, ZERO, "bc_root");
    emit(addi(A1, S4, 0));
    lab("bc_rx"); br(K_BNR, 0, 0, "bc_rx"); emit(recv(T1)); emit(sd(T1, A2, 0));
    emit(addi(A2, A2, 8)); emit(addi(A1, A1, -1)); br(K_BNE, A1, ZERO, "bc_rx");
    emit(ecall());
    lab("bc_root"); emit(li(S7, 1));
    lab("bc_dst"); br(K_BEQ, S7, S3, "bc_done");
    emit(lui(A3, 3)); emit(addi(A1, S4, 0));
    lab("bc_tx"); br(K_BNS, 0, 0, "bc_tx"); emit(ld(T0, A3, 0)); emit(send(S7, T0));
    emit(addi(A3, A3, 8)); emit(addi(A1, A1, -1)); br(K_BNE, A1, ZERO, "bc_tx");
    emit(addi(S7, S7, 1)); br(K_JAL, 0, 0, "bc_dst");
    lab("bc_done");
    emit(lui(A3, 3)); emit(addi(A1, S4, 0));          // root keeps its own copy
    lab("bc_cp"); emit(ld(T0, A3, 0)); emit(sd(T0, A2, 0)); emit(addi(A3, A3, 8));
    emit(addi(A2, A2, 8)); emit(addi(A1, A1, -1)); br(K_BNE, A1, ZERO, "bc_cp");
    emit(ecall());

    // ---------------- reduce to node 0
    lab("reduce");
    br(K_BEQ, S2, ZERO, "rd_root");
    emit(lui(A3, 3)); emit(addi(A1, S4, 0));
    lab("rd_tx"); br(K_BNS, 0, 0, "rd_tx"); emit(ld(T0, A3, 0)); emit(send(ZERO, T0));
    emit(addi(A3, A3, 8)); emit(addi(A1, A1, -1)); br(K_BNE, A1, ZERO, "rd_tx");
    emit(ecall());
    lab("rd_root");
    emit(lui(A3, 3)); emit(lui(A2, 2)); emit(addi(A1, S4, 0));
    lab("rd_cp"); emit(ld(T0, A3, 0)); emit(sd(T0, A2, 0)); emit(addi(A3, A3, 8));
    emit(addi(A2, A2, 8)); emit(addi(A1, A1, -1)); br(K_BNE, A1, ZERO, "rd_cp");
    emit(addi(T0, S9, 0)); emit(addi(S7, ZERO, 0));
    lab("rd_cnt"); br(K_BEQ, T0, ZERO, "rd_go"); emit(add(S7, S7, S4)); emit(addi(T0, T0, -1));
    br(K_JAL, 0, 0, "rd_cnt");
    lab("rd_go"); br(K_BEQ, S7, ZERO, "rd_done");
    lab("rd_rx"); br(K_BNR, 0, 0, "rd_rx"); emit(src(T0)); emit(recv(T1));
    emit(slli(T5, T0, 3)); emit(add(T5, T5, GP)); emit(ld(T4, T5, 'h200));
    emit(slli(T6, T4, 3)); emit(lui(A2, 2)); emit(add(T6, T6, A2));
    emit(ld(T2, T6, 0)); emit(add(T2, T2, T1)); emit(sd(T2, T6, 0));
    emit(addi(T4, T4, 1)); emit(sd(T4, T5, 'h200));
    emit(addi(S7, S7, -1)); br(K_BNE, S7, ZERO, "rd_rx");
    lab("rd_done"); emit(ecall());

    // ---------------- allreduce, recursive doubling
    lab("allred");
    emit(lui(A3, 3)); emit(lui(A2, 2)); emit(addi(A1, S4, 0));
    lab("ar_cp"); emit(ld(T0, A3, 0)); emit(sd(T0, A2, 0)); emit(addi(A3, A3, 8));
    emit(addi(A2, A2, 8)); emit(addi(A1, A1, -1)); br(K_BNE, A1, ZERO, "ar_cp");
    emit(li(S6, 1));                                   // k
    lab("ar_round"); br(K_BEQ, S6, S3, "ar_done");
    emit(xor_(S7, S2, S6));                            // partner
    emit(lui(A2, 2)); emit(addi(A1, S4, 0));
    lab("ar_tx"); br(K_BNS, 0, 0, "ar_tx"); emit(ld(T0, A2, 0)); emit(send(S7, T0));
    emit(addi(A2, A2, 8)); emit(addi(A1, A1, -1)); br(K_BNE, A1, ZERO, "ar_tx");
    emit(slli(S8, S7, 3)); emit(add(S8, S8, GP));      // &count[partner] - 0x200
    lab("ar_wait"); emit(ld(T4, S8, 'h200)); br(K_BEQ, T4, S4, "ar_add");
    lab("ar_rx"); br(K_BNR, 0, 0, "ar_rx"); emit(src(T0)); emit(recv(T1));
    emit(slli(T5, T0, 3)); emit(add(T5, T5, GP)); emit(ld(T4, T5, 'h200));
    emit(slli(T6, T0, 8)); emit(slli(T2, T4, 3)); emit(add(T6, T6, T2));
    emit(lui(T2, 4)); emit(add(T6, T6, T2)); emit(sd(T1, T6, 0));
    emit(addi(T4, T4, 1)); emit(sd(T4, T5, 'h200));
    br(K_JAL, 0, 0, "ar_wait");
    lab("ar_add");
    emit(slli(A3, S7, 8)); emit(lui(T2, 4)); emit(add(A3, A3, T2));
    emit(lui(A2, 2)); emit(addi(A1, S4, 0));
    lab("ar_sum"); emit(ld(T0, A3, 0)); emit(ld(T1, A2, 0)); emit(add(T1, T1, T0));
    emit(sd(T1, A2, 0)); emit(addi(A3, A3, 8)); emit(addi(A2, A2, 8)); emit(addi(A1, A1, -1));
    br(K_BNE, A1, ZERO, "ar_sum");
    emit(slli(S6, S6, 1)); br(K_JAL, 0, 0, "ar_round");
    lab("ar_done"); emit(ecall());

    // ---------------- alltoall, interleaved non-blocking send and receive
    lab("a2a");
    emit(li(S6, 1)); emit(li(A1, 0));                  // offset to target, word index
    emit(addi(T0, S9, 0)); emit(li(S7, 0));
    lab("a2_cnt"); br(K_BEQ, T0, ZERO, "a2_cnt_done"); emit(add(S7, S7, S4)); emit(addi(T0, T0, -1));
    br(K_JAL, 0, 0, "a2_cnt");
    lab("a2_cnt_done"); emit(addi(S8, S7, 0));         // s7 words to send, s8 to receive
    lab("a2_loop");
    br(K_BEQ, S7, ZERO, "a2_rx");
    br(K_BRS, 0, 0, "a2_tx");
    lab("a2_rx");
    br(K_BAR, 0, 0, "a2_rcv");
    br(K_BNE, S8, ZERO, "a2_loop");
    br(K_BNE, S7, ZERO, "a2_loop");
    emit(ecall());
    lab("a2_tx");
    emit(add(T0, S2, S6)); emit(and_(T0, T0, S9));      // target = (id + offset) mod P
    emit(slli(T1, S2, 16)); emit(slli(T2, T0, 8)); emit(or_(T1, T1, T2)); emit(or_(T1, T1, A1));
    emit(send(T0, T1));
    emit(addi(S7, S7, -1)); emit(addi(A1, A1, 1));
    br(K_BNE, A1, S4, "a2_rx");
    emit(li(A1, 0)); emit(addi(S6, S6, 1));
    br(K_JAL, 0, 0, "a2_rx");
    lab("a2_rcv");
    emit(src(T0)); emit(recv(T1));
    emit(slli(T5, T0, 3)); emit(add(T5, T5, GP)); emit(ld(T4, T5, 'h200));
    emit(slli(T6, T0, 8)); emit(slli(T2, T4, 3)); emit(add(T6, T6, T2));
    emit(lui(T2, 4)); emit(add(T6, T6, T2)); emit(sd(T1, T6, 0));
    emit(addi(T4, T4, 1)); emit(sd(T4, T5, 'h200));
    emit(addi(S8, S8, -1));
    br(K_JAL, 0, 0, "a2_loop");

    resolve();
    if (prog.size() % 2 == 1) emit(nop());
  endtask

  function automatic logic [63:0] x(int node, int j);
    return (64'(node) + 64'd1) * 64'd1000 + 64'(j);
  endfunction

  task automatic run(int op, int P, int M, output int cycles);
    int start;
    for (int n = 0; n < N; n++) begin
      host_write(n, 'h1110, 64'(n)); host_write(n, 'h1128, 64'(M));
      host_write(n, 'h1140, 64'(P)); host_write(n, 'h1148, 64'(op));
      host_write(n, 'h1150, 64'(R)); host_write(n, 'h17f8, 0);
      for (int i = 0; i < N; i++) host_write(n, 'h1200 + 8 * i, 0);
      for (int j = 0; j < MMAX; j++) host_write(n, 'h2000 + 8 * j, 0);
    end
    @(negedge clk);
    start = int'($time / 10);
    hold = 0;
    wait (&halted);
    cycles = int'($time / 10) - start;
    #1;
    check(pimp_exc == '0 && illegal == '0, $sformatf("op %0d P=%0d clean stop", op, P));
    @(negedge clk) hold = 1;
    repeat (2) @(posedge clk);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, a2a_prev, bar_t [17];
    logic [63:0] v, want;
    automatic int sizes [2] = '{2, 16};
    automatic int lengths [3] = '{1, 4, 13};
    build();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < N; n++) begin
      for (int i = 0; i < prog.size(); i += 2) host_write(n, i * 4, {prog[i + 1], prog[i]});
      for (int j = 0; j < MMAX; j++) host_write(n, 'h3000 + 8 * j, x(n, j));
    end
    // barrier
    for (int P = 2; P <= 16; P *= 2) begin
      run(1, P, 1, bar_t[P]);
      for (int n = 0; n < P; n++) begin
        host_read(n, 'h7f8, v);
        check(v == 1, $sformatf("barrier P=%0d node %0d finished all rounds", P, n));
      end
      $display("barrier P=%0d: %0d cycles for %0d rounds", P, bar_t[P], R);
    end
    $display("barrier cost per added node per round: %0d cycles", (bar_t[16] - bar_t[8]) / (8 * R));
    check(bar_t[2] < bar_t[4] && bar_t[4] < bar_t[8] && bar_t[8] < bar_t[16], "barrier slows with P");
    foreach (sizes[s]) begin
      automatic int P = sizes[s];
      foreach (lengths[l]) begin
        automatic int M = lengths[l];
        run(2, P, M, cyc);
        $display("broadcast P=%0d M=%0d words: %0d cycles", P, M, cyc);
        for (int n = 0; n < P; n++)
          for (int j = 0; j < M; j++) begin
            host_read(n, 'h2000 + 8 * j, v);
            check(v == x(0, j), $sformatf("broadcast P=%0d M=%0d node %0d word %0d", P, M, n, j));
          end
        run(3, P, M, cyc);
        $display("reduce P=%0d M=%0d words: %0d cycles", P, M, cyc);
        for (int j = 0; j < M; j++) begin
          want = 0;
          for (int n = 0; n < P; n++) want += x(n, j);
          host_read(0, 'h2000 + 8 * j, v);
          check(v == want, $sformatf("reduce P=%0d M=%0d word %0d", P, M, j));
        end
      end
      run(4, P, 4, cyc);
      $display("allreduce (recursive doubling) P=%0d M=4 words: %0d cycles", P, cyc);
      for (int n = 0; n < P; n++)
        for (int j = 0; j < 4; j++) begin
          want = 0;
          for (int k = 0; k < P; k++) want += x(k, j);
          host_read(n, 'h2000 + 8 * j, v);
          check(v == want, $sformatf("allreduce P=%0d node %0d word %0d", P, n, j));
        end
    end
    for (int P = 2; P <= 16; P *= 2) begin
      run(5, P, 4, cyc);
      if (P > 2) check(cyc > a2a_prev, $sformatf("alltoall P=%0d slower than P=%0d", P, P / 2));
      a2a_prev = cyc;
      $display("alltoall P=%0d M=4 words: %0d cycles", P, cyc);
      for (int n = 0; n < P; n++)
        for (int sn = 0; sn < P; sn++)
          if (sn != n)
            for (int j = 0; j < 4; j++) begin
              host_read(n, 'h4000 + 'h100 * sn + 8 * j, v);
              check(v == ((64'(sn) << 16) | (64'(n) << 8) | 64'(j)),
                    $sformatf("alltoall P=%0d node %0d from %0d word %0d", P, n, sn, j));
            end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
