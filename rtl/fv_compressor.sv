// fv_compressor: pipelined frequent-value compressor of one message stream.
//
// Values of a data message enter one per cycle (in_valid/in_ready, in_last on
// the final value) together with the channel, i.e. the destination's send
// table. The controller works as a three-step pipeline, as in the document's
// pipelined CAM operation:
//   cycle t   : the value is registered at the CAM input ("word to CAM");
//   cycle t+1 : the CAM compares it with all entries ("match"); at the end of
//               the cycle the result is recorded in the table and registered;
//   cycle t+2 : the encoded value is presented on the output ("out word").
// A message of N values thus leaves in N+2 cycles. Each output value is
// either a hit (hit=1, idx) or a miss (hit=0, value); the packer turns that
// into the 4-bit or 33-bit code. The table itself (fv_table) holds the
// counters and performs the counter-based replacement at the message end.
//
// Back-pressure (out_ready low) stalls the whole pipeline; nothing is
// recorded in a stalled cycle, so the table sees each value exactly once.
// The stall handling is this design's own choice.
module fv_compressor #(
  parameter int unsigned CHANNELS = 1,
  localparam int unsigned CH_W    = (CHANNELS > 1) ? $clog2(CHANNELS) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic [fvc_pkg::WORD_W-1:0] in_value,
  input  logic                      in_last,
  input  logic [CH_W-1:0]           in_chan,
  output logic                      out_valid,
  input  logic                      out_ready,
  output fvc_pkg::enc_t             out_enc,
  // observation
  output logic                      ev_hit,     // a value hit this cycle
  output logic                      ev_miss,    // a value missed this cycle
  output logic [fvc_pkg::IDX_W:0]   ev_repl     // entries replaced this cycle
);
  import fvc_pkg::*;

  typedef struct packed {
    logic              vld;
    logic [WORD_W-1:0] value;
    logic              last;
    logic [CH_W-1:0]   chan;
  } s1_t;

  s1_t  s1_q;
  enc_t s2_q;
  logic s2_vld_q;
  logic adv;
  logic lk_hit;
  logic [IDX_W-1:0] lk_idx;
  logic [WORD_W-1:0] rd_unused;
  logic [FV_ENTRIES-1:0] ev_unused;
  logic [FV_ENTRIES-1:0][WORD_W-1:0] evv_unused;
  logic [FV_ENTRIES-1:0][CNT_W-1:0] evc_unused;

  assign adv       = !s2_vld_q || out_ready;
  assign in_ready  = adv;
  assign out_valid = s2_vld_q;
  assign out_enc   = s2_q;

  fv_table #(.CHANNELS(CHANNELS)) u_table (
    .clk, .rst_n,
    .chan      (s1_q.chan),
    .lk_value  (s1_q.value),
    .lk_hit    (lk_hit),
    .lk_idx    (lk_idx),
    .rd_idx    ('0),
    .rd_value  (rd_unused),
    .rec_valid (s1_q.vld && adv),
    .rec_hit   (lk_hit),
    .rec_idx   (lk_idx),
    .rec_value (s1_q.value),
    .rec_last  (s1_q.last),
    .ent_valid (ev_unused),
    .ent_value (evv_unused),
    .ent_cnt   (evc_unused),
    .repl_n    (ev_repl)
  );

  assign ev_hit  = s1_q.vld && adv && lk_hit;
  assign ev_miss = s1_q.vld && adv && !lk_hit;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_q     <= '0;
      s2_q     <= '0;
      s2_vld_q <= 1'b0;
    end else if (adv) begin
      s1_q     <= '{vld: in_valid, value: in_value, last: in_last, chan: in_chan};
      s2_vld_q <= s1_q.vld;
      s2_q     <= '{hit: lk_hit, idx: lk_idx, value: s1_q.value, last: s1_q.last};
    end
  end

endmodule
