// fvc_node_ni: network interface of one mesh node with frequent-value (FV)
// compression of data messages.
//
// The transmit half (fvc_ni_tx) compresses each outgoing cache line with the
// send table of its destination and packs it into flits; the receive half
// (fvc_ni_rx) unpacks incoming flits and decompresses them with the receive
// table of their source. The node therefore holds two FV tables for every
// other node: one for messages it sends to that node and one for messages it
// receives from it. The table for "A sends to B" in node A and the table for
// "B receives from A" in node B see the same messages in the same order and
// stay identical, whatever the order in which messages cross in the two
// directions. Only the table of the current channel is active. This
// structure follows the document; the port lists are this design's own.
//
// Timing: a line of 16 values enters in 16 cycles; its encoded values leave
// the compressor in cycles 3..18, and the flits follow as they fill. On the
// receive side each value appears two cycles after it is unpacked.
module fvc_node_ni #(
  parameter int unsigned NODES   = fvc_pkg::NODES,
  parameter int unsigned NODE_ID = 0
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // outgoing data messages
  input  logic                       tx_valid,
  output logic                       tx_ready,
  input  logic [7:0]                 tx_dst,
  input  logic [fvc_pkg::WORD_W-1:0] tx_tag,
  input  logic [fvc_pkg::WORD_W-1:0] tx_value,
  input  logic                       tx_last,
  // flits to the router
  output logic                       fo_valid,
  input  logic                       fo_ready,
  output fvc_pkg::flit_t             fo_flit,
  // flits from the router
  input  logic                       fi_valid,
  output logic                       fi_ready,
  input  fvc_pkg::flit_t             fi_flit,
  // incoming data messages
  output logic                       rx_valid,
  input  logic                       rx_ready,
  output logic [7:0]                 rx_src,
  output logic [fvc_pkg::WORD_W-1:0] rx_tag,
  output logic [fvc_pkg::WORD_W-1:0] rx_value,
  output logic                       rx_last,
  // observation
  output logic                       ev_hit,
  output logic                       ev_miss,
  output logic [fvc_pkg::IDX_W:0]    ev_repl_tx,
  output logic [fvc_pkg::IDX_W:0]    ev_repl_rx
);

  fvc_ni_tx #(.NODES(NODES), .NODE_ID(NODE_ID)) u_tx (
    .clk, .rst_n,
    .msg_valid (tx_valid), .msg_ready (tx_ready), .msg_dst (tx_dst),
    .msg_tag (tx_tag), .msg_value (tx_value), .msg_last (tx_last),
    .flit_valid (fo_valid), .flit_ready (fo_ready), .flit (fo_flit),
    .ev_hit, .ev_miss, .ev_repl (ev_repl_tx)
  );

  fvc_ni_rx #(.NODES(NODES), .NODE_ID(NODE_ID)) u_rx (
    .clk, .rst_n,
    .flit_valid (fi_valid), .flit_ready (fi_ready), .flit (fi_flit),
    .msg_valid (rx_valid), .msg_ready (rx_ready), .msg_src (rx_src),
    .msg_tag (rx_tag), .msg_value (rx_value), .msg_last (rx_last),
    .ev_repl (ev_repl_rx)
  );

endmodule
