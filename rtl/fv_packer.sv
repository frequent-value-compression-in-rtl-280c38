// fv_packer: packaging stage that turns a stream of encoded values into flits.
//
// A message starts with one header flit (hdr_valid/hdr_ready, 64-bit payload
// given by the caller), followed by data flits. Each encoded value is turned
// into its code, least significant bit first:
//   hit  : {idx[2:0], 1'b1}    4 bits
//   miss : {value[31:0], 1'b0} 33 bits
// and appended to a bit accumulator. Whenever 64 bits are collected a data
// flit is sent; after the value marked `last` the remaining bits are sent,
// zero-padded, in the tail flit. A line of 16 values therefore takes between
// 1 and 9 data flits. One value is accepted per cycle; a flit is sent per
// cycle at most. The output is registered (valid/ready). The code lengths
// follow the document; bit order, padding and the flit framing are this
// design's own choices.
module fv_packer (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       hdr_valid,
  output logic                       hdr_ready,
  input  logic [fvc_pkg::FLIT_W-1:0] hdr_data,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  fvc_pkg::enc_t              in_enc,
  output logic                       out_valid,
  input  logic                       out_ready,
  output fvc_pkg::flit_t             out_flit
);
  import fvc_pkg::*;

  localparam int unsigned ACC_W = 2 * FLIT_W;
  localparam int unsigned CW    = $clog2(ACC_W + 1);

  logic              data_phase_q;   // header sent, collecting values
  logic              last_q;         // last value of the message collected
  logic [ACC_W-1:0]  acc_q, acc_d, acc_b;
  logic [CW-1:0]     cnt_q, cnt_d, cnt_b;
  flit_t             out_q;
  logic              out_vld_q;
  logic              can_load, emit, take, is_tail;
  logic [ACC_W-1:0]  code;
  logic [CW-1:0]     len;

  assign can_load  = !out_vld_q || out_ready;
  assign out_valid = out_vld_q;
  assign out_flit  = out_q;
  assign hdr_ready = !data_phase_q && can_load;

  always_comb begin
    if (in_enc.hit) begin
      code = ACC_W'({in_enc.idx, 1'b1});
      len  = CW'(HIT_LEN);
    end else begin
      code = ACC_W'({in_enc.value, 1'b0});
      len  = CW'(MISS_LEN);
    end
  end

  always_comb begin
    emit    = data_phase_q && can_load &&
              (cnt_q >= CW'(FLIT_W) || (last_q && cnt_q != '0));
    is_tail = last_q && cnt_q <= CW'(FLIT_W);
    acc_b   = acc_q;
    cnt_b   = cnt_q;
    if (emit) begin
      acc_b = acc_q >> FLIT_W;
      cnt_b = (cnt_q >= CW'(FLIT_W)) ? cnt_q - CW'(FLIT_W) : '0;
    end
    in_ready = data_phase_q && !last_q && (cnt_b <= CW'(ACC_W - MISS_LEN));
    take     = in_valid && in_ready;
    acc_d    = take ? (acc_b | (code << cnt_b)) : acc_b;
    cnt_d    = take ? cnt_b + len : cnt_b;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      data_phase_q <= 1'b0;
      last_q       <= 1'b0;
      acc_q        <= '0;
      cnt_q        <= '0;
      out_q        <= '0;
      out_vld_q    <= 1'b0;
    end else begin
      if (can_load) out_vld_q <= 1'b0;
      if (hdr_valid && hdr_ready) begin
        out_q        <= '{head: 1'b1, tail: 1'b0, data: hdr_data};
        out_vld_q    <= 1'b1;
        data_phase_q <= 1'b1;
      end
      acc_q <= acc_d;
      cnt_q <= cnt_d;
      if (take && in_enc.last) last_q <= 1'b1;
      if (emit) begin
        out_q     <= '{head: 1'b0, tail: is_tail, data: acc_q[FLIT_W-1:0]};
        out_vld_q <= 1'b1;
        if (is_tail) begin
          data_phase_q <= 1'b0;
          last_q       <= 1'b0;
        end
      end
    end
  end

endmodule
