// fvc_ni_tx: transmit half of a network interface with frequent-value
// compression.
//
// A data message is a cache line of LINE_WORDS 32-bit values offered one per
// cycle (msg_valid/msg_ready, msg_last on the final value) with its
// destination node and an opaque 32-bit tag held for the whole message. With
// the first value the header flit {tag, src = NODE_ID, dst} is handed to the
// packaging stage while the value enters the compressor, so compression
// overlaps with packaging and adds two cycles of latency. The compressor uses
// the send table kept for the destination: there is one table for every other
// node (NODES-1 channels), so each node pair has its own synchronised table
// per direction. The flits leave on flit_valid/flit_ready.
//
// The per-destination tables and the overlap with packaging follow the
// document; the message interface and the header contents are this design's
// own choices.
module fvc_ni_tx #(
  parameter int unsigned NODES   = fvc_pkg::NODES,
  parameter int unsigned NODE_ID = 0,
  localparam int unsigned CHANNELS = NODES - 1,
  localparam int unsigned CH_W     = (CHANNELS > 1) ? $clog2(CHANNELS) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       msg_valid,
  output logic                       msg_ready,
  input  logic [7:0]                 msg_dst,
  input  logic [fvc_pkg::WORD_W-1:0] msg_tag,
  input  logic [fvc_pkg::WORD_W-1:0] msg_value,
  input  logic                       msg_last,
  output logic                       flit_valid,
  input  logic                       flit_ready,
  output fvc_pkg::flit_t             flit,
  // observation
  output logic                       ev_hit,
  output logic                       ev_miss,
  output logic [fvc_pkg::IDX_W:0]    ev_repl
);
  import fvc_pkg::*;

  logic          body_q;         // header of the current message already sent
  logic          hdr_valid, hdr_ready;
  logic          c_in_valid, c_in_ready;
  logic          enc_valid, enc_ready;
  enc_t          enc;
  header_t       hdr;
  logic [CH_W-1:0] chan;

  // destination node -> send-table channel (the node's own id is skipped)
  assign chan = (msg_dst > 8'(NODE_ID)) ? CH_W'(msg_dst - 8'd1) : CH_W'(msg_dst);

  assign hdr       = '{rsvd: '0, tag: msg_tag, src: 8'(NODE_ID), dst: msg_dst};
  assign hdr_valid = msg_valid && !body_q && c_in_ready;
  assign c_in_valid = msg_valid && (body_q || hdr_ready);
  assign msg_ready = c_in_ready && (body_q || hdr_ready);

  always_ff @(posedge clk) begin
    if (!rst_n) body_q <= 1'b0;
    else if (msg_valid && msg_ready) body_q <= !msg_last;
  end

  fv_compressor #(.CHANNELS(CHANNELS)) u_comp (
    .clk, .rst_n,
    .in_valid  (c_in_valid),
    .in_ready  (c_in_ready),
    .in_value  (msg_value),
    .in_last   (msg_last),
    .in_chan   (chan),
    .out_valid (enc_valid),
    .out_ready (enc_ready),
    .out_enc   (enc),
    .ev_hit, .ev_miss, .ev_repl
  );

  fv_packer u_pack (
    .clk, .rst_n,
    .hdr_valid (hdr_valid),
    .hdr_ready (hdr_ready),
    .hdr_data  (hdr),
    .in_valid  (enc_valid),
    .in_ready  (enc_ready),
    .in_enc    (enc),
    .out_valid (flit_valid),
    .out_ready (flit_ready),
    .out_flit  (flit)
  );

  a_dst_not_self: assert property (@(posedge clk) disable iff (!rst_n)
    msg_valid |-> msg_dst != 8'(NODE_ID) && msg_dst < 8'(NODES));

endmodule
