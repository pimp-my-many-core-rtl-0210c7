// rv_regfile: 32 x 64-bit integer register file, x0 reads as zero.
// Two combinational read ports used in decode, one write port written in
// write-back at the clock edge. A read of the register being written in the
// same cycle returns the new value (write-through), so decode needs no
// forwarding from write-back. Registers are reset to zero.
module rv_regfile (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  ra1,
  input  logic [4:0]  ra2,
  output logic [63:0] rd1,
  output logic [63:0] rd2,
  input  logic        we,
  input  logic [4:0]  wa,
  input  logic [63:0] wd
);
  logic [63:0] regs [32];

  always_comb begin
    rd1 = (ra1 == 5'd0) ? 64'd0 : (we && wa == ra1) ? wd : regs[ra1];
    rd2 = (ra2 == 5'd0) ? 64'd0 : (we && wa == ra2) ? wd : regs[ra2];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (we && wa != 5'd0) begin
      regs[wa] <= wd;
    end
  end
endmodule
