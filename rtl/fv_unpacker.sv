// fv_unpacker: unpackaging stage that turns received flits into encoded values.
//
// The head flit of a message is captured (its payload is returned with every
// value of the message on out_hdr). Data flits are appended to a bit
// accumulator, least significant bit first. Whenever the accumulator holds a
// complete code - 4 bits if its flag bit is 1, 33 bits if it is 0 - the code
// is offered as one encoded value (out_valid/out_ready), one per cycle, so
// decompression of a message starts as soon as its first data flit is in.
// After LINE_WORDS values the message is complete: the padding of the tail
// flit is dropped and the next head flit is expected. A new flit is accepted
// only while at most 64 bits are waiting. The code follows the document;
// framing, padding and flow control are this design's own choices and match
// fv_packer.
module fv_unpacker (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  fvc_pkg::flit_t             in_flit,
  output logic                       out_valid,
  input  logic                       out_ready,
  output fvc_pkg::enc_t              out_enc,
  output logic [fvc_pkg::FLIT_W-1:0] out_hdr
);
  import fvc_pkg::*;

  localparam int unsigned ACC_W = 2 * FLIT_W;
  localparam int unsigned CW    = $clog2(ACC_W + 1);
  localparam int unsigned VW    = $clog2(LINE_WORDS);

  logic              data_phase_q;
  logic              tail_q;
  logic [FLIT_W-1:0] hdr_q;
  logic [ACC_W-1:0]  acc_q, acc_b;
  logic [CW-1:0]     cnt_q, cnt_b;
  logic [VW-1:0]     nval_q;
  logic              pop, take, last_val;
  logic [CW-1:0]     need;

  assign need      = acc_q[0] ? CW'(HIT_LEN) : CW'(MISS_LEN);
  assign out_valid = data_phase_q && cnt_q != '0 && cnt_q >= need;
  assign last_val  = nval_q == VW'(LINE_WORDS - 1);
  assign out_hdr   = hdr_q;
  assign pop       = out_valid && out_ready;

  always_comb begin
    out_enc.hit   = acc_q[0];
    out_enc.idx   = acc_q[0] ? acc_q[IDX_W:1] : '0;
    out_enc.value = acc_q[0] ? '0 : acc_q[WORD_W:1];
    out_enc.last  = last_val;
  end

  always_comb begin
    acc_b = pop ? acc_q >> need : acc_q;
    cnt_b = pop ? cnt_q - need : cnt_q;
    if (!data_phase_q) in_ready = 1'b1;
    else in_ready = !tail_q && !(pop && last_val) && cnt_b <= CW'(ACC_W - FLIT_W);
    take = in_valid && in_ready;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      data_phase_q <= 1'b0;
      tail_q       <= 1'b0;
      hdr_q        <= '0;
      acc_q        <= '0;
      cnt_q        <= '0;
      nval_q       <= '0;
    end else if (!data_phase_q) begin
      if (take && in_flit.head) begin
        hdr_q        <= in_flit.data;
        data_phase_q <= 1'b1;
      end
    end else if (pop && last_val) begin
      data_phase_q <= 1'b0;
      tail_q       <= 1'b0;
      acc_q        <= '0;
      cnt_q        <= '0;
      nval_q       <= '0;
    end else begin
      if (pop) nval_q <= nval_q + 1'b1;
      acc_q <= take ? (acc_b | (ACC_W'(in_flit.data) << cnt_b)) : acc_b;
      cnt_q <= take ? cnt_b + CW'(FLIT_W) : cnt_b;
      if (take) tail_q <= in_flit.tail;
    end
  end

  // Framing rules: a message opens with a head flit, and its last value lies
  // in its tail flit.
  a_head_first: assert property (@(posedge clk) disable iff (!rst_n)
    take && !data_phase_q |-> in_flit.head);
  a_no_head_inside: assert property (@(posedge clk) disable iff (!rst_n)
    take && data_phase_q |-> !in_flit.head);
  a_tail_before_last: assert property (@(posedge clk) disable iff (!rst_n)
    pop && last_val |-> tail_q);

endmodule
