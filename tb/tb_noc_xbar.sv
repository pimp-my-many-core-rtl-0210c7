// tb_noc_xbar: self-checking test of the in-order crossbar network.
//
// N = 4 nodes. Each sender injects a stream of words to random destinations,
// tagged with sender and sequence number; receivers drain with random
// back-pressure. Checks: every word arrives exactly once, at the addressed
// node, with the right sender id, and words from one sender to one receiver
// arrive in injection order. Also checks the one-cycle latency of an
// uncontended word, and that contention (several senders to one node) and
// back-pressure both occurred.
module tb_noc_xbar;
  localparam int N = 4, NW = 2, PER = 200;

  logic clk = 0, rst_n = 0;
  logic in_valid [N], in_ready [N], out_valid [N], out_ready [N];
  logic [NW-1:0] in_dest [N], out_src [N];
  logic [63:0] in_data [N], out_data [N];
  int checks = 0, failures = 0, contention = 0, backpressure = 0;
  int sent [N], rcvd_total = 0;
  int next_seq [N][N];       // expected next sequence number per (src, dst)
  int seq_of   [N][N];       // next sequence number to send per (src, dst)

  noc_xbar #(.N(N), .NODE_W(NW), .DATA_W(64)) dut (.*);
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

  // data word: [63:48] magic, [47:40] src, [39:32] dst, [31:0] seq
  function automatic logic [63:0] mk(int s, int d, int q);
    return {16'hC0DE, 8'(s), 8'(d), 32'(q)};
  endfunction

  initial begin
    for (int i = 0; i < N; i++) begin
      in_valid[i] = 0; in_dest[i] = '0; in_data[i] = '0; out_ready[i] = 1; sent[i] = 0;
      for (int j = 0; j < N; j++) begin next_seq[i][j] = 0; seq_of[i][j] = 0; end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // latency: one word 0 -> 3, nothing else
    in_valid[0] = 1; in_dest[0] = 2'd3; in_data[0] = 64'h1234;
    @(posedge clk); #1;
    in_valid[0] = 0;
    check(out_valid[3] && out_data[3] == 64'h1234 && out_src[3] == 2'd0, "one-cycle latency");
    @(posedge clk); #1;
    check(!out_valid[3], "word delivered once");
    // random traffic
    for (int i = 0; i < N; i++) begin
      in_valid[i] = 1; in_dest[i] = NW'($urandom_range(0, N - 1));
      in_data[i] = mk(i, in_dest[i], seq_of[i][in_dest[i]]);
    end
    while (rcvd_total < N * PER) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) out_ready[i] = ($urandom_range(0, 3) != 0);
      #1;
      begin
        int cnt [N];
        for (int d = 0; d < N; d++) cnt[d] = 0;
        for (int s = 0; s < N; s++) if (in_valid[s]) cnt[in_dest[s]]++;
        for (int d = 0; d < N; d++) if (cnt[d] > 1) contention++;
        for (int d = 0; d < N; d++) if (out_valid[d] && !out_ready[d]) backpressure++;
      end
      // sample the handshakes before the clock edge
      begin
        bit fin [N], fout [N];
        logic [NW-1:0] osrc [N];
        logic [63:0] odat [N];
        for (int i = 0; i < N; i++) begin
          fin[i] = in_valid[i] && in_ready[i];
          fout[i] = out_valid[i] && out_ready[i];
          osrc[i] = out_src[i]; odat[i] = out_data[i];
        end
        @(posedge clk); #1;
        for (int d = 0; d < N; d++) if (fout[d]) begin
          automatic int s = int'(osrc[d]);
          check(odat[d][63:48] == 16'hC0DE && int'(odat[d][47:40]) == s &&
                int'(odat[d][39:32]) == d, "routing and sender id");
          check(int'(odat[d][31:0]) == next_seq[s][d], "in-order delivery");
          next_seq[s][d] = int'(odat[d][31:0]) + 1;
          rcvd_total++;
        end
        for (int s = 0; s < N; s++) if (fin[s]) begin
          seq_of[s][in_dest[s]]++;
          sent[s]++;
          if (sent[s] == PER) in_valid[s] = 0;
          else begin
            automatic logic [NW-1:0] d = NW'($urandom_range(0, N - 1));
            in_dest[s] = d;
            in_data[s] = mk(s, d, seq_of[s][d]);
          end
        end
      end
    end
    check(contention > 0, "contention occurred");
    check(backpressure > 0, "back-pressure occurred");
    $display("contention=%0d backpressure=%0d", contention, backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
