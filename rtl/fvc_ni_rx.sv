// fvc_ni_rx: receive half of a network interface with frequent-value
// decompression.
//
// Flits arrive on flit_valid/flit_ready, one message at a time (head flit,
// data flits, tail flit). The unpackaging stage splits the data flits into
// encoded values as soon as the first data flit is in, and the decompressor
// decodes them with the receive table kept for the message's source node,
// one value per cycle, two cycles after the value is unpacked. Decoded values
// leave on msg_valid/msg_ready with msg_last on the last value of the line
// and the source and tag from the header. There is one receive table for
// every other node (NODES-1 channels).
//
// The per-source tables and the overlap of decompression with unpackaging
// follow the document; the interfaces are this design's own choices.
module fvc_ni_rx #(
  parameter int unsigned NODES   = fvc_pkg::NODES,
  parameter int unsigned NODE_ID = 0,
  localparam int unsigned CHANNELS = NODES - 1,
  localparam int unsigned CH_W     = (CHANNELS > 1) ? $clog2(CHANNELS) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       flit_valid,
  output logic                       flit_ready,
  input  fvc_pkg::flit_t             flit,
  output logic                       msg_valid,
  input  logic                       msg_ready,
  output logic [7:0]                 msg_src,
  output logic [fvc_pkg::WORD_W-1:0] msg_tag,
  output logic [fvc_pkg::WORD_W-1:0] msg_value,
  output logic                       msg_last,
  // observation
  output logic [fvc_pkg::IDX_W:0]    ev_repl
);
  import fvc_pkg::*;

  logic            enc_valid, enc_ready;
  enc_t            enc;
  logic [FLIT_W-1:0] hdr_raw;
  header_t         hdr;
  typedef struct packed {
    logic [7:0]        src;
    logic [WORD_W-1:0] tag;
  } side_t;
  side_t           side1_q, side2_q;
  logic [CH_W-1:0] chan;

  assign hdr  = header_t'(hdr_raw);
  // source node -> receive-table channel (the node's own id is skipped)
  assign chan = (hdr.src > 8'(NODE_ID)) ? CH_W'(hdr.src - 8'd1) : CH_W'(hdr.src);

  fv_unpacker u_unpack (
    .clk, .rst_n,
    .in_valid  (flit_valid),
    .in_ready  (flit_ready),
    .in_flit   (flit),
    .out_valid (enc_valid),
    .out_ready (enc_ready),
    .out_enc   (enc),
    .out_hdr   (hdr_raw)
  );

  fv_decompressor #(.CHANNELS(CHANNELS)) u_decomp (
    .clk, .rst_n,
    .in_valid  (enc_valid),
    .in_ready  (enc_ready),
    .in_enc    (enc),
    .in_chan   (chan),
    .out_valid (msg_valid),
    .out_ready (msg_ready),
    .out_value (msg_value),
    .out_last  (msg_last),
    .ev_repl
  );

  // header fields travel alongside the two decompressor stages
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      side1_q <= '0;
      side2_q <= '0;
    end else if (enc_ready) begin
      side1_q <= '{src: hdr.src, tag: hdr.tag};
      side2_q <= side1_q;
    end
  end
  assign msg_src = side2_q.src;
  assign msg_tag = side2_q.tag;

  // a message must be addressed to this node and come from another one
  a_dst_is_self: assert property (@(posedge clk) disable iff (!rst_n)
    enc_valid |-> hdr.dst == 8'(NODE_ID));
  a_src_not_self: assert property (@(posedge clk) disable iff (!rst_n)
    enc_valid |-> hdr.src != 8'(NODE_ID) && hdr.src < 8'(NODES));

endmodule
