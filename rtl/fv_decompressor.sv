// fv_decompressor: pipelined frequent-value decompressor of one message stream.
//
// Encoded values of a data message enter one per cycle (in_valid/in_ready)
// with the channel, i.e. the source's receive table. The pipeline mirrors the
// compressor so that a value leaves two cycles after it enters:
//   cycle t   : the encoded value is registered;
//   cycle t+1 : a hit reads the table at its index, a miss takes the value
//               carried in the code; the result is recorded in the table
//               exactly as the sender recorded it, and registered;
//   cycle t+2 : the decoded 32-bit value is presented on the output.
// Because the receive table records the same values in the same order as the
// sender's table, including the end-of-message counter update and
// replacement, both tables stay identical and every index decodes to the
// value the sender matched. The two-cycle latency matches the document's
// example of overlapped decompression; back-pressure handling is this
// design's own choice.
module fv_decompressor #(
  parameter int unsigned CHANNELS = 1,
  localparam int unsigned CH_W    = (CHANNELS > 1) ? $clog2(CHANNELS) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  fvc_pkg::enc_t              in_enc,
  input  logic [CH_W-1:0]            in_chan,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [fvc_pkg::WORD_W-1:0] out_value,
  output logic                       out_last,
  // observation
  output logic [fvc_pkg::IDX_W:0]    ev_repl
);
  import fvc_pkg::*;

  typedef struct packed {
    logic            vld;
    enc_t            enc;
    logic [CH_W-1:0] chan;
  } s1_t;

  s1_t  s1_q;
  logic s2_vld_q;
  logic [WORD_W-1:0] s2_value_q;
  logic s2_last_q;
  logic adv;
  logic [WORD_W-1:0] rd_value, dec_value;
  logic lk_unused;
  logic [IDX_W-1:0] lki_unused;
  logic [FV_ENTRIES-1:0] ev_unused;
  logic [FV_ENTRIES-1:0][WORD_W-1:0] evv_unused;
  logic [FV_ENTRIES-1:0][CNT_W-1:0] evc_unused;

  assign adv       = !s2_vld_q || out_ready;
  assign in_ready  = adv;
  assign out_valid = s2_vld_q;
  assign out_value = s2_value_q;
  assign out_last  = s2_last_q;
  assign dec_value = s1_q.enc.hit ? rd_value : s1_q.enc.value;

  fv_table #(.CHANNELS(CHANNELS)) u_table (
    .clk, .rst_n,
    .chan      (s1_q.chan),
    .lk_value  ('0),
    .lk_hit    (lk_unused),
    .lk_idx    (lki_unused),
    .rd_idx    (s1_q.enc.idx),
    .rd_value  (rd_value),
    .rec_valid (s1_q.vld && adv),
    .rec_hit   (s1_q.enc.hit),
    .rec_idx   (s1_q.enc.idx),
    .rec_value (dec_value),
    .rec_last  (s1_q.enc.last),
    .ent_valid (ev_unused),
    .ent_value (evv_unused),
    .ent_cnt   (evc_unused),
    .repl_n    (ev_repl)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_q       <= '0;
      s2_vld_q   <= 1'b0;
      s2_value_q <= '0;
      s2_last_q  <= 1'b0;
    end else if (adv) begin
      s1_q       <= '{vld: in_valid, enc: in_enc, chan: in_chan};
      s2_vld_q   <= s1_q.vld;
      s2_value_q <= dec_value;
      s2_last_q  <= s1_q.enc.last;
    end
  end

endmodule
