// tb_pimp_tile: self-checking test of one tile (core, scratchpad, FIFOs).
//
// The program is loaded through the host port while hold keeps the core in
// reset. It sends the words 1..20 to node 5 with blocking sends (bns, send),
// then receives 20 words with blocking receives (bnr, src, recv), sums the
// payloads and xors each sender id with 5, and stores both sums. The testbench
// plays the network: it accepts words from net_out with random gaps, checks
// their target and order, and returns each one plus 1000 as coming from node 5.
// It offers them on net_in as soon as it can, so the receive FIFO fills while
// the core is still sending and back-pressure on net_in must occur.
// Expected: sum = 210 + 20*1000 = 20210, sender check = 0, core halted cleanly.
module tb_pimp_tile;
  import rv_asm_pkg::*;

  logic clk = 0, rst_n = 0, hold = 1;
  logic h_we = 0;
  logic [31:0] h_addr = 0;
  logic [63:0] h_wdata = 0, h_rdata;
  logic net_out_valid, net_out_ready = 0, net_in_valid = 0, net_in_ready;
  logic [3:0] net_out_dest, net_in_src = 0;
  logic [63:0] net_out_data, net_in_data = 0;
  logic halted, sleeping, pimp_exc, illegal;
  int checks = 0, failures = 0, backpressure = 0, got = 0;
  logic [63:0] pending [$];

  pimp_tile #(.NODE_W(4), .SPM_BYTES(65536), .SEND_DEPTH(8), .RECV_DEPTH(16)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // network model
  always @(posedge clk) begin
    if (rst_n && !hold) begin
      if (net_out_valid && net_out_ready) begin
        check(net_out_dest == 4'd5, "target node");
        check(net_out_data == 64'(got + 1), "send order");
        got++;
        pending.push_back(net_out_data + 64'd1000);
      end
      if (net_in_valid && net_in_ready) void'(pending.pop_front());
      if (net_in_valid && !net_in_ready) backpressure++;
    end
  end
  always @(negedge clk) begin
    net_out_ready <= ($urandom_range(0, 2) != 0);
    net_in_valid  <= (pending.size() > 0);
    net_in_src    <= 4'd5;
    net_in_data   <= (pending.size() > 0) ? pending[0] : '0;
  end

  initial begin
    logic [31:0] prog [$];
    prog = '{li(A0, 5), li(T2, 1), li(S1, 20),
             bns(0), send(A0, T2), addi(T2, T2, 1), addi(S1, S1, -1), bne(S1, ZERO, -16),
             li(S0, 0), li(S1, 20), li(A3, 0),
             bnr(0), src(T0), recv(T1), add(S0, S0, T1), xor_(T0, T0, A0), add(A3, A3, T0),
             addi(S1, S1, -1), bne(S1, ZERO, -28),
             sd(S0, ZERO, 'h400), sd(A3, ZERO, 'h408), ecall(), nop()};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < prog.size(); i += 2) begin
      h_we = 1; h_addr = 32'(i * 4); h_wdata = {prog[i + 1], prog[i]};
      @(posedge clk); #1;
    end
    h_we = 1; h_addr = 32'h408; h_wdata = 64'hdead; @(posedge clk); #1;
    h_we = 0;
    check(!halted, "held core does not run");
    hold = 0;
    wait (halted);
    repeat (2) @(posedge clk); #1;
    h_addr = 32'h400; #1;
    check(h_rdata == 64'd20210, "sum of returned payloads");
    h_addr = 32'h408; #1;
    check(h_rdata == 64'd0, "sender ids");
    check(!pimp_exc && !illegal, "clean halt");
    check(got == 20, "twenty words sent");
    check(backpressure > 0, "receive FIFO back-pressure occurred");
    $display("backpressure=%0d", backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
