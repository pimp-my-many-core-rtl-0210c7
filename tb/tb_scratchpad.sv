// tb_scratchpad: self-checking test of scratchpad (64 KiB default size).
//
// Writes random words through the host port, then checks them through the
// host, fetch (both 32-bit halves) and data ports; does byte-enable writes on
// the data port and checks the merged words against a model; checks that a
// host write wins over a data write in the same cycle and that reads answer in
// the same cycle (combinational).
module tb_scratchpad;
  localparam int BYTES = 65536;

  logic clk = 0;
  logic [31:0] if_addr = 0, if_rdata, d_addr = 0, h_addr = 0;
  logic d_we = 0, h_we = 0;
  logic [7:0] d_be = 0;
  logic [63:0] d_wdata = 0, d_rdata, h_wdata = 0, h_rdata;
  int checks = 0, failures = 0;
  logic [63:0] model [int];

  scratchpad #(.BYTES(BYTES)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx [64];
    for (int i = 0; i < 64; i++) begin
      idx[i] = (i == 63) ? (BYTES / 8 - 1) : int'($urandom_range(0, BYTES / 8 - 1));
      h_we = 1; h_addr = 32'(idx[i] * 8); h_wdata = {$urandom, $urandom};
      model[idx[i]] = h_wdata;
      @(posedge clk); #1;
    end
    h_we = 0;
    for (int i = 0; i < 64; i++) begin
      h_addr = 32'(idx[i] * 8); d_addr = h_addr; if_addr = h_addr;
      #1;
      check(h_rdata == model[idx[i]], "host read");
      check(d_rdata == model[idx[i]], "data read");
      check(if_rdata == model[idx[i]][31:0], "fetch low half");
      if_addr = h_addr + 4; #1;
      check(if_rdata == model[idx[i]][63:32], "fetch high half");
    end
    // byte-enable writes
    for (int i = 0; i < 64; i++) begin
      automatic logic [7:0]  be = 8'($urandom);
      automatic logic [63:0] w  = {$urandom, $urandom};
      d_we = 1; d_addr = 32'(idx[i] * 8); d_be = be; d_wdata = w;
      for (int b = 0; b < 8; b++) if (be[b]) model[idx[i]][8*b +: 8] = w[8*b +: 8];
      @(posedge clk); #1;
      d_we = 0; #1;
      check(d_rdata == model[idx[i]], "byte-enable write");
    end
    // host has priority
    d_we = 1; d_be = 8'hff; d_addr = 32'd64; d_wdata = 64'h1111;
    h_we = 1; h_addr = 32'd64; h_wdata = 64'h2222;
    @(posedge clk); #1;
    d_we = 0; h_we = 0; #1;
    check(d_rdata == 64'h2222, "host write wins");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
