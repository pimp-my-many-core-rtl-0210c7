// pimp_manycore: many-core with pipeline-integrated message passing (PIMP).
//
// NUM_NODES tiles (default 16, a 4x4 arrangement) exchange single 64-bit
// words. Each tile is an in-order RV64I core whose execute stage is wired
// straight to a send FIFO and a receive FIFO; a program sends a word with
// "send node, msg", reads the sender and the payload of the oldest received
// word with "src" and "recv", and tests the FIFOs with the branches brs, bns,
// bar and bnr. There is no DMA, no message buffer in shared memory and no
// notification protocol in hardware: the network delivers each word with its
// sender id, in order between any two nodes, and software builds long
// messages and handshakes out of single words.
//
// Interface:
//   hold              keeps all cores in reset (FIFOs and network run on);
//   load_* / rd_*     host write and combinational read of any scratchpad,
//                     byte address, 64-bit aligned;
//   halted, pimp_exc, illegal  per core status (see rv_core);
//   sleeping          per core: pipeline held on a bnr to itself, only with
//                     SLEEP_ON_BNR = 1 (an option for an energy-optimised
//                     build; the default 0 polls, as the measured system).
// After hold falls, every core starts at address 0 of its own scratchpad.
// The network is the in-order crossbar noc_xbar, one cycle per hop from the
// head of a send FIFO to the tail of a receive FIFO.
module pimp_manycore #(
  parameter int unsigned NUM_NODES  = 16,
  parameter int unsigned SPM_BYTES  = 65536,
  parameter int unsigned SEND_DEPTH = 8,
  parameter int unsigned RECV_DEPTH = 16,
  parameter bit          SLEEP_ON_BNR = 1'b0,
  parameter int unsigned NODE_W     = (NUM_NODES > 1) ? $clog2(NUM_NODES) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 hold,
  input  logic                 load_we,
  input  logic [NODE_W-1:0]    load_node,
  input  logic [31:0]          load_addr,
  input  logic [63:0]          load_data,
  input  logic [NODE_W-1:0]    rd_node,
  input  logic [31:0]          rd_addr,
  output logic [63:0]          rd_data,
  output logic [NUM_NODES-1:0] halted,
  output logic [NUM_NODES-1:0] sleeping,
  output logic [NUM_NODES-1:0] pimp_exc,
  output logic [NUM_NODES-1:0] illegal
);
  logic              inj_valid [NUM_NODES];
  logic [NODE_W-1:0] inj_dest  [NUM_NODES];
  logic [63:0]       inj_data  [NUM_NODES];
  logic              inj_ready [NUM_NODES];
  logic              ej_valid  [NUM_NODES];
  logic [NODE_W-1:0] ej_src    [NUM_NODES];
  logic [63:0]       ej_data   [NUM_NODES];
  logic              ej_ready  [NUM_NODES];
  logic [63:0]       h_rdata   [NUM_NODES];

  for (genvar n = 0; n < NUM_NODES; n++) begin : g_tile
    pimp_tile #(
      .NODE_W(NODE_W), .SPM_BYTES(SPM_BYTES),
      .SEND_DEPTH(SEND_DEPTH), .RECV_DEPTH(RECV_DEPTH), .SLEEP_ON_BNR(SLEEP_ON_BNR)
    ) u_tile (
      .clk, .rst_n, .hold,
      .h_we   (load_we && load_node == NODE_W'(n)),
      .h_addr (load_we ? load_addr : rd_addr),
      .h_wdata(load_data),
      .h_rdata(h_rdata[n]),
      .net_out_valid(inj_valid[n]), .net_out_dest(inj_dest[n]),
      .net_out_data (inj_data[n]),  .net_out_ready(inj_ready[n]),
      .net_in_valid (ej_valid[n]),  .net_in_src(ej_src[n]),
      .net_in_data  (ej_data[n]),   .net_in_ready(ej_ready[n]),
      .halted(halted[n]), .sleeping(sleeping[n]), .pimp_exc(pimp_exc[n]), .illegal(illegal[n])
    );
  end

  assign rd_data = h_rdata[rd_node];

  noc_xbar #(.N(NUM_NODES), .NODE_W(NODE_W), .DATA_W(64)) u_noc (
    .clk, .rst_n,
    .in_valid(inj_valid), .in_dest(inj_dest), .in_data(inj_data), .in_ready(inj_ready),
    .out_valid(ej_valid), .out_src(ej_src), .out_data(ej_data), .out_ready(ej_ready)
  );
endmodule
