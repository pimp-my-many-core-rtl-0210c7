// tb_roundtrip: round-trip time against message length on the full many-core.
//
// Node 0 sends a message of L 64-bit words to node 1 (blocking sends: bns to
// itself, then send); node 1 receives all L words (bnr to itself, src, recv),
// stores them, and sends them back; node 0 receives them and stops. The other
// 14 nodes stop at once. For L = 1..MAX_L the testbench reloads the lengths,
// releases hold and counts cycles until node 0 stops. Checked: the returned
// words, and that the round trip grows by the same number of cycles for every
// additional word (a linear cost per word, no hidden per-message overhead that
// depends on length while the FIFOs do not fill). The measured base time and
// cost per word are printed; the cost per additional word must be the
// published 18 cycles (the published base time of 139 cycles includes the
// message-passing library's call overhead, which these bare loops do not
// have, so the base is not compared). No software handshake is needed here because the
// messages never exceed what the FIFOs and the receiver can take in order.
module tb_roundtrip;
  import rv_asm_pkg::*;

  localparam int N = 16, NW = 4, MAX_L = 8;
  localparam logic [4:0] GP = 5'd3, S5 = 5'd21, S6 = 5'd22;

  logic clk = 0, rst_n = 0, hold = 1;
  logic load_we = 0;
  logic [NW-1:0] load_node = 0, rd_node = 0;
  logic [31:0] load_addr = 0, rd_addr = 0;
  logic [63:0] load_data = 0, rd_data;
  logic [N-1:0] halted, sleeping, pimp_exc, illegal;
  int checks = 0, failures = 0;
  int t [MAX_L + 1];

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
  task automatic load_prog(int node, logic [31:0] p [$]);
    if (p.size() % 2 == 1) p.push_back(nop());
    for (int i = 0; i < p.size(); i += 2) host_write(node, i * 4, {p[i + 1], p[i]});
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] p0 [$], p1 [$], pn [$];
    logic [63:0] v;
    // node 0: send L words from 0x3000 to node 1, receive L words into 0x2000
    p0 = '{lui(GP, 1), ld(S5, GP, 'h128), lui(A2, 3), li(A0, 1), addi(A1, S5, 0),
           bns(0), ld(T0, A2, 0), send(A0, T0), addi(A2, A2, 8), addi(A1, A1, -1), blt(ZERO, A1, -20),
           lui(A2, 2), addi(A1, S5, 0),
           bnr(0), src(T0), recv(T1), sd(T1, A2, 0), addi(A2, A2, 8), addi(A1, A1, -1), blt(ZERO, A1, -24),
           ecall()};
    // node 1: receive L words into 0x2000, send them back to node 0
    p1 = '{lui(GP, 1), ld(S5, GP, 'h128), lui(A2, 2), addi(A1, S5, 0),
           bnr(0), src(T0), recv(T1), sd(T1, A2, 0), addi(A2, A2, 8), addi(A1, A1, -1), blt(ZERO, A1, -24),
           lui(A2, 2), addi(A1, S5, 0),
           bns(0), ld(T0, A2, 0), send(ZERO, T0), addi(A2, A2, 8), addi(A1, A1, -1), blt(ZERO, A1, -20),
           ecall()};
    pn = '{ecall()};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    load_prog(0, p0);
    load_prog(1, p1);
    for (int n = 2; n < N; n++) load_prog(n, pn);
    for (int j = 0; j < MAX_L; j++) host_write(0, 'h3000 + 8 * j, {32'hFEED_0000 | 32'(j), 32'(j * 31)});
    for (int L = 1; L <= MAX_L; L++) begin
      int start;
      host_write(0, 'h1128, 64'(L));
      host_write(1, 'h1128, 64'(L));
      for (int j = 0; j < MAX_L; j++) host_write(0, 'h2000 + 8 * j, 0);
      @(negedge clk);
      start = int'($time / 10);
      hold = 0;
      wait (halted[0] && halted[1]);
      t[L] = int'($time / 10) - start;
      #1;
      check(!pimp_exc[0] && !pimp_exc[1], "clean stop");
      for (int j = 0; j < MAX_L; j++) begin
        host_read(0, 'h2000 + 8 * j, v);
        check(v == ((j < L) ? {32'hFEED_0000 | 32'(j), 32'(j * 31)} : 64'd0), $sformatf("L=%0d word %0d returned", L, j));
      end
      @(negedge clk) hold = 1;
      repeat (2) @(posedge clk);
      $display("round trip L=%0d words: %0d cycles", L, t[L]);
    end
    for (int L = 3; L <= MAX_L; L++)
      check(t[L] - t[L - 1] == t[2] - t[1], $sformatf("constant cost per word at L=%0d", L));
    // The published per-word cost of a PIMP round trip is 18 cycles.
    check(t[2] - t[1] == 18, "18 cycles per additional word");
    $display("base %0d cycles for one word, %0d cycles per additional word", t[1], t[2] - t[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
