// rr_arbiter: round-robin arbiter with N requesters.
//
// grant is one-hot (or zero when nothing requests). The requester after the
// last granted one has the highest priority, so every requester is served
// within N grants. The priority only advances when advance is high (the
// granted transfer actually happened). Combinational grant, one cycle to
// update the priority pointer.
module rr_arbiter #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last;   // index of the last granted requester

  always_comb begin
    int unsigned idx;
    grant = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      idx = (int'(last) + k) % N;
      if (req[idx] && grant == '0) grant[idx] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      last <= IW'(N - 1);
    end else if (advance && grant != '0) begin
      for (int unsigned i = 0; i < N; i++)
        if (grant[i]) last <= IW'(i);
    end
  end
endmodule
