// fv_table: frequent-value table with counter-based replacement.
//
// The table is a small content-addressable memory (CAM) of FV_ENTRIES 32-bit
// values, each with an 8-bit saturating counter. A value presented on the
// lookup port is compared with every valid entry in parallel; the match lines
// are OR-ed into `lk_hit` and encoded into the 3-bit `lk_idx` (Fig. 2 of the
// scheme). The read port returns the value stored at an index, which is what
// the receiving side uses.
//
// Every value of a message is recorded once (rec_valid) with its lookup
// result:
//   * a hit adds 2 to the counter of the hit entry (saturating at 255);
//   * a miss value is remembered, once per distinct value, in a short list.
// With the last value (rec_last) the message ends, in the same clock edge:
//   * every entry that was not hit by the message is decremented (not below 0);
//   * the remembered miss values, in order of first appearance, replace the
//     entries whose counter is now zero, lowest index first, until either
//     runs out.
// Both ends of a channel record the same sequence and therefore hold identical
// tables. The counter rules and the replacement rule follow the document.
// This design's own choices: a valid bit per entry (reset empties the table;
// an empty entry never matches and counts as a zero-counter entry), the
// counter of a newly written entry starts at INIT_CNT = 2 (as for one hit),
// and the whole end-of-message update happens in the one clock edge that
// records the last value, so the next message can look up in the next cycle.
//
// CHANNELS independent tables share one datapath: `chan` selects the table
// for lookup, read and record. It must not change within a message.
//
// Timing: lookup and read are combinational; records take effect at the
// clock edge.
module fv_table #(
  parameter int unsigned CHANNELS = 1,
  parameter int unsigned ENTRIES  = fvc_pkg::FV_ENTRIES,
  parameter int unsigned WORD_W   = fvc_pkg::WORD_W,
  parameter int unsigned CNT_W    = fvc_pkg::CNT_W,
  parameter int unsigned HIT_INC  = 2,
  parameter int unsigned INIT_CNT = 2,
  localparam int unsigned IDX_W   = $clog2(ENTRIES),
  localparam int unsigned CH_W    = (CHANNELS > 1) ? $clog2(CHANNELS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CH_W-1:0]   chan,
  // CAM lookup
  input  logic [WORD_W-1:0] lk_value,
  output logic              lk_hit,
  output logic [IDX_W-1:0]  lk_idx,
  // indexed read
  input  logic [IDX_W-1:0]  rd_idx,
  output logic [WORD_W-1:0] rd_value,
  // record one value of the current message
  input  logic              rec_valid,
  input  logic              rec_hit,
  input  logic [IDX_W-1:0]  rec_idx,
  input  logic [WORD_W-1:0] rec_value,
  input  logic              rec_last,
  // observation of the selected table and of replacements
  output logic [ENTRIES-1:0]             ent_valid,
  output logic [ENTRIES-1:0][WORD_W-1:0] ent_value,
  output logic [ENTRIES-1:0][CNT_W-1:0]  ent_cnt,
  output logic [IDX_W:0]                 repl_n      // entries replaced this edge
);

  typedef struct packed {
    logic              vld;
    logic [CNT_W-1:0]  cnt;
    logic [WORD_W-1:0] val;
  } entry_t;

  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  entry_t [ENTRIES-1:0] tbl_q [CHANNELS];
  // per-message scratch state
  logic [ENTRIES-1:0]             hitf_q;
  logic [ENTRIES-1:0][WORD_W-1:0] miss_q;
  logic [IDX_W:0]                 miss_n_q;

  entry_t [ENTRIES-1:0]           cur, nxt;
  logic [ENTRIES-1:0]             hitf_d;
  logic [ENTRIES-1:0][WORD_W-1:0] miss_d;
  logic [IDX_W:0]                 miss_n_d;
  logic [IDX_W:0]                 k;
  logic [ENTRIES-1:0]             match;
  logic                           seen;

  assign cur = tbl_q[chan];

  // CAM match, hit OR and index encoder
  always_comb begin
    lk_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      match[i] = cur[i].vld && (cur[i].val == lk_value);
      if (match[i]) lk_idx = IDX_W'(i);
    end
    lk_hit = |match;
  end

  assign rd_value = cur[rd_idx].val;

  always_comb begin
    for (int i = 0; i < ENTRIES; i++) begin
      ent_valid[i] = cur[i].vld;
      ent_value[i] = cur[i].val;
      ent_cnt[i]   = cur[i].cnt;
    end
  end

  // counter update, miss list and end-of-message replacement
  always_comb begin
    nxt      = cur;
    hitf_d   = hitf_q;
    miss_d   = miss_q;
    miss_n_d = miss_n_q;
    repl_n   = '0;
    k        = '0;
    seen     = 1'b0;
    if (rec_valid) begin
      if (rec_hit) begin
        hitf_d[rec_idx] = 1'b1;
        if (cur[rec_idx].cnt > CNT_MAX - CNT_W'(HIT_INC)) nxt[rec_idx].cnt = CNT_MAX;
        else nxt[rec_idx].cnt = cur[rec_idx].cnt + CNT_W'(HIT_INC);
      end else begin
        for (int m = 0; m < ENTRIES; m++)
          if ((IDX_W+1)'(m) < miss_n_q && miss_q[m] == rec_value) seen = 1'b1;
        if (!seen && miss_n_q < (IDX_W+1)'(ENTRIES)) begin
          miss_d[miss_n_q[IDX_W-1:0]] = rec_value;
          miss_n_d = miss_n_q + 1'b1;
        end
      end
      if (rec_last) begin
        for (int i = 0; i < ENTRIES; i++)
          if (!hitf_d[i] && nxt[i].cnt != '0) nxt[i].cnt = nxt[i].cnt - 1'b1;
        for (int i = 0; i < ENTRIES; i++) begin
          if (nxt[i].cnt == '0 && k < miss_n_d) begin
            nxt[i].val = miss_d[k[IDX_W-1:0]];
            nxt[i].vld = 1'b1;
            nxt[i].cnt = CNT_W'(INIT_CNT);
            k = k + 1'b1;
          end
        end
        repl_n   = k;
        hitf_d   = '0;
        miss_n_d = '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int c = 0; c < CHANNELS; c++) tbl_q[c] <= '0;
      hitf_q   <= '0;
      miss_q   <= '0;
      miss_n_q <= '0;
    end else if (rec_valid) begin
      tbl_q[chan] <= nxt;
      hitf_q      <= hitf_d;
      miss_q      <= miss_d;
      miss_n_q    <= miss_n_d;
    end
  end

  // A hit must name a valid entry, and the channel must stay put within a message.
  logic              in_msg_q;
  logic [CH_W-1:0]   msg_chan_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_msg_q   <= 1'b0;
      msg_chan_q <= '0;
    end else if (rec_valid) begin
      in_msg_q   <= !rec_last;
      msg_chan_q <= chan;
    end
  end

  a_hit_valid: assert property (@(posedge clk) disable iff (!rst_n)
    rec_valid && rec_hit |-> cur[rec_idx].vld);
  a_chan_stable: assert property (@(posedge clk) disable iff (!rst_n)
    rec_valid && in_msg_q |-> chan == msg_chan_q);

endmodule
