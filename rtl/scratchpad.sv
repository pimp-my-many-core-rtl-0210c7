// scratchpad: private memory of one tile, holding its program and its data.
//
// The prototype configuration gives every core 64 KiB that it reaches within
// one cycle; there is no cache. The array is organised as BYTES/8 words of 64
// bits. Three ports:
//   * fetch port: 32-bit instruction at byte address if_addr (bit 2 picks the
//     half of the 64-bit word); combinational read.
//   * data port:  64-bit word at d_addr with byte enables d_be; combinational
//     read, write at the clock edge when d_we.
//   * host port:  64-bit write (h_we) and combinational read, used to load
//     programs and inspect results while the core is held in reset.
// A host write takes precedence over a data write in the same cycle. The
// asynchronous reads model the one-cycle memory of the description; the port
// split and the host port are this design's own choices. Contents are not
// reset.
module scratchpad #(
  parameter int unsigned BYTES = 65536
) (
  input  logic        clk,
  // instruction fetch
  input  logic [31:0] if_addr,
  output logic [31:0] if_rdata,
  // data access
  input  logic [31:0] d_addr,
  input  logic        d_we,
  input  logic [7:0]  d_be,
  input  logic [63:0] d_wdata,
  output logic [63:0] d_rdata,
  // host access
  input  logic        h_we,
  input  logic [31:0] h_addr,
  input  logic [63:0] h_wdata,
  output logic [63:0] h_rdata
);
  localparam int unsigned WORDS = BYTES / 8;
  localparam int unsigned IW    = $clog2(WORDS);

  logic [63:0] mem [WORDS];

  logic [IW-1:0] if_idx, d_idx, h_idx;
  logic [63:0]   if_word;

  assign if_idx = if_addr[IW+2:3];
  assign d_idx  = d_addr[IW+2:3];
  assign h_idx  = h_addr[IW+2:3];

  assign if_word  = mem[if_idx];
  assign if_rdata = if_addr[2] ? if_word[63:32] : if_word[31:0];
  assign d_rdata  = mem[d_idx];
  assign h_rdata  = mem[h_idx];

  always_ff @(posedge clk) begin
    if (h_we) begin
      mem[h_idx] <= h_wdata;
    end else if (d_we) begin
      for (int b = 0; b < 8; b++)
        if (d_be[b]) mem[d_idx][8*b +: 8] <= d_wdata[8*b +: 8];
    end
  end

  initial begin
    assert (BYTES >= 16 && (BYTES & (BYTES - 1)) == 0)
      else $error("scratchpad: BYTES must be a power of two");
  end
endmodule
