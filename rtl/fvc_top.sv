// fvc_top: the network interfaces of all nodes of the 6x4 mesh, with
// frequent-value compression of data messages.
//
// The chip has 24 nodes: 8 cores on the two short sides and 16 shared L2
// banks in the middle, connected by a 6x4 mesh of routers. Every node gets a
// network interface (fvc_node_ni) that compresses the cache lines it sends and
// decompresses the ones it receives, with a pair of FV tables per peer node.
// The routers, cores and cache banks are not part of this RTL: each node's
// flit output (fo_*) and flit input (fi_*) are brought out where its router's
// local port connects, and each node's message ports (tx_*, rx_*) where its
// core or cache controller connects. Compression is transparent to both
// sides: a message leaves rx_* exactly as it entered tx_*.
//
// Node n is instantiated with NODE_ID = n; headers carry 8-bit node numbers.
// The network is expected to deliver the flits of one message to its
// destination contiguously and in order, and the messages between one pair of
// nodes in the order they were sent.
module fvc_top #(
  parameter int unsigned NODES = fvc_pkg::NODES
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic [NODES-1:0]                       tx_valid,
  output logic [NODES-1:0]                       tx_ready,
  input  logic [NODES-1:0][7:0]                  tx_dst,
  input  logic [NODES-1:0][fvc_pkg::WORD_W-1:0]  tx_tag,
  input  logic [NODES-1:0][fvc_pkg::WORD_W-1:0]  tx_value,
  input  logic [NODES-1:0]                       tx_last,
  output logic [NODES-1:0]                       fo_valid,
  input  logic [NODES-1:0]                       fo_ready,
  output fvc_pkg::flit_t [NODES-1:0]             fo_flit,
  input  logic [NODES-1:0]                       fi_valid,
  output logic [NODES-1:0]                       fi_ready,
  input  fvc_pkg::flit_t [NODES-1:0]             fi_flit,
  output logic [NODES-1:0]                       rx_valid,
  input  logic [NODES-1:0]                       rx_ready,
  output logic [NODES-1:0][7:0]                  rx_src,
  output logic [NODES-1:0][fvc_pkg::WORD_W-1:0]  rx_tag,
  output logic [NODES-1:0][fvc_pkg::WORD_W-1:0]  rx_value,
  output logic [NODES-1:0]                       rx_last,
  output logic [NODES-1:0]                       ev_hit,
  output logic [NODES-1:0]                       ev_miss,
  output logic [NODES-1:0][fvc_pkg::IDX_W:0]     ev_repl_tx,
  output logic [NODES-1:0][fvc_pkg::IDX_W:0]     ev_repl_rx
);

  for (genvar n = 0; n < NODES; n++) begin : g_node
    fvc_node_ni #(.NODES(NODES), .NODE_ID(n)) u_ni (
      .clk, .rst_n,
      .tx_valid (tx_valid[n]), .tx_ready (tx_ready[n]), .tx_dst (tx_dst[n]),
      .tx_tag (tx_tag[n]), .tx_value (tx_value[n]), .tx_last (tx_last[n]),
      .fo_valid (fo_valid[n]), .fo_ready (fo_ready[n]), .fo_flit (fo_flit[n]),
      .fi_valid (fi_valid[n]), .fi_ready (fi_ready[n]), .fi_flit (fi_flit[n]),
      .rx_valid (rx_valid[n]), .rx_ready (rx_ready[n]), .rx_src (rx_src[n]),
      .rx_tag (rx_tag[n]), .rx_value (rx_value[n]), .rx_last (rx_last[n]),
      .ev_hit (ev_hit[n]), .ev_miss (ev_miss[n]),
      .ev_repl_tx (ev_repl_tx[n]), .ev_repl_rx (ev_repl_rx[n])
    );
  end

endmodule
