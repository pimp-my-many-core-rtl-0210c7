// noc_xbar: word-size message network between the tiles.
//
// The PIMP interface needs a network that carries single-word messages
// between any two nodes and delivers the messages of one sender to one
// receiver in the order they were injected, so that long messages can be sent
// as sequences of words. This network is the simplest one with those
// properties: a full crossbar. Each sender (the head of a send FIFO) presents
// {valid, dest, data}; each destination port has a round-robin arbiter over
// all senders that address it and a one-entry output register that feeds the
// receive FIFO. A word granted in cycle t appears at out_* in cycle t+1.
// Because every (sender, receiver) pair has exactly one path with a single
// register on it, order between one sender and one receiver is kept. The
// output register takes a new word when it is empty or being drained
// (out_ready), so a full receive FIFO stalls only the senders addressing it,
// which then wait in their send FIFOs.
//
// The prototype uses a different, lightweight NoC (PaterNoster) whose inner
// structure is not part of this description; this crossbar is this design's
// stand-in with the same service at the tile boundary.
module noc_xbar #(
  parameter int unsigned N      = 16,
  parameter int unsigned NODE_W = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned DATA_W = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  // injection, one port per sender
  input  logic              in_valid [N],
  input  logic [NODE_W-1:0] in_dest  [N],
  input  logic [DATA_W-1:0] in_data  [N],
  output logic              in_ready [N],
  // ejection, one port per receiver
  output logic              out_valid [N],
  output logic [NODE_W-1:0] out_src   [N],
  output logic [DATA_W-1:0] out_data  [N],
  input  logic              out_ready [N]
);
  logic [N-1:0] req   [N];   // req[d][s]: sender s addresses d
  logic [N-1:0] grant [N];
  logic         accept [N];  // output register of d can take a word

  for (genvar d = 0; d < N; d++) begin : g_out
    always_comb begin
      for (int s = 0; s < N; s++)
        req[d][s] = in_valid[s] && (in_dest[s] == NODE_W'(d));
    end

    assign accept[d] = !out_valid[d] || out_ready[d];

    rr_arbiter #(.N(N)) u_arb (
      .clk, .rst_n,
      .req    (req[d]),
      .advance(accept[d]),
      .grant  (grant[d])
    );

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        out_valid[d] <= 1'b0;
      end else if (accept[d]) begin
        out_valid[d] <= (grant[d] != '0);
        for (int s = 0; s < N; s++)
          if (grant[d][s]) begin
            out_src[d]  <= NODE_W'(s);
            out_data[d] <= in_data[s];
          end
      end
    end
  end

  always_comb begin
    for (int s = 0; s < N; s++) begin
      in_ready[s] = 1'b0;
      for (int d = 0; d < N; d++)
        if (grant[d][s] && accept[d]) in_ready[s] = 1'b1;
    end
  end
endmodule
