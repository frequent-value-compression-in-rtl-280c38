// tb_fv_unpacker: self-checking test of the unpackaging stage.
//
// Messages built by fv_model_pkg::pack (a head flit with a random header and
// 1 to 9 data flits) are offered with random gaps, and the value output sees
// random back-pressure. Every encoded value (hit flag, index or value, last
// flag) and the header returned with it are compared with what was packed.
// A first message without gaps checks that the first value is offered in the
// cycle after the first data flit is taken.
module tb_fv_unpacker;
  import fvc_pkg::*;
  import fv_model_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid, out_ready;
  flit_t in_flit;
  enc_t out_enc;
  logic [63:0] out_hdr;
  int checks = 0, failures = 0, cycles = 0;
  int n_stall = 0, n_vals = 0, n_max_len = 0, n_min_len = 0;
  int t_first_data = -1, t_first_out = -1;
  bit stalls_on = 0;
  enc_t expq [$];
  longint unsigned exph [$];

  fv_unpacker dut (.*);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycles);
    end
  endtask

  always @(posedge clk) begin
    cycles <= cycles + 1;
    out_ready <= stalls_on ? ($urandom_range(3) != 0) : 1'b1;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready && !in_flit.head && t_first_data < 0) t_first_data = cycles;
      if (out_valid && !out_ready) n_stall++;
      if (out_valid && out_ready) begin
        enc_t e;
        if (t_first_out < 0) t_first_out = cycles;
        n_vals++;
        if (expq.size() == 0) check(0, "unexpected value");
        else begin
          e = expq.pop_front();
          check(out_enc.hit == e.hit && out_enc.last == e.last, "hit/last flags");
          if (e.hit) check(out_enc.idx == e.idx, "index");
          else check(out_enc.value == e.value, "missed value");
          check(out_hdr == exph.pop_front(), "header");
        end
      end
    end
  end

  task automatic send_flit(flit_t f, bit gaps);
    @(negedge clk);
    if (gaps) while ($urandom_range(3) == 0) begin
      in_valid = 1'b0;
      @(negedge clk);
    end
    in_valid = 1'b1; in_flit = f;
    #1;
    while (!in_ready) @(negedge clk);
  endtask

  task automatic send_msg(int pct_hit, bit gaps);
    int unsigned words[]; bit hits[]; int idxs[];
    longint unsigned flits[];
    longint unsigned hdr;
    words = new[LINE_WORDS]; hits = new[LINE_WORDS]; idxs = new[LINE_WORDS];
    hdr = {$urandom(), $urandom()};
    foreach (words[w]) begin
      enc_t e;
      words[w] = $urandom();
      hits[w] = int'($urandom_range(99)) < pct_hit;
      idxs[w] = $urandom_range(7);
      e.hit = hits[w]; e.idx = 3'(idxs[w]); e.value = words[w]; e.last = (w == LINE_WORDS - 1);
      expq.push_back(e);
      exph.push_back(hdr);
    end
    pack(words, hits, idxs, flits);
    if (flits.size() == MAX_DATA_FLITS) n_max_len++;
    if (flits.size() == 1) n_min_len++;
    send_flit('{head: 1'b1, tail: 1'b0, data: hdr}, gaps);
    foreach (flits[f]) send_flit('{head: 1'b0, tail: f == flits.size() - 1, data: flits[f]}, gaps);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    in_valid = 0; in_flit = '0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    send_msg(50, 0);
    check(t_first_out == t_first_data + 1, "first value one cycle after first data flit");
    stalls_on = 1;
    send_msg(0, 1);
    send_msg(100, 1);
    for (int m = 0; m < 400; m++) send_msg($urandom_range(100), 1);
    repeat (80) @(posedge clk);
    check(expq.size() == 0, "all values seen");
    check(n_max_len > 0 && n_min_len > 0, "longest and shortest messages happened");
    check(n_stall > 0, "back-pressure happened");
    $display("values=%0d nine-flit=%0d one-flit=%0d stalls=%0d", n_vals, n_max_len, n_min_len, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
