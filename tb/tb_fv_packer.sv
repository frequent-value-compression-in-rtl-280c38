// tb_fv_packer: self-checking test of the packaging stage.
//
// Each message is a header plus 16 encoded values with a per-message hit
// probability from 0% (9 data flits) to 100% (1 data flit). Values and the
// header are offered with random gaps, and the flit output sees random
// back-pressure. Every flit (head and tail bits, payload) is compared with
// the flits built by fv_model_pkg::pack, and the flit count per message with
// ceil(total code bits / 64).
module tb_fv_packer;
  import fvc_pkg::*;
  import fv_model_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic hdr_valid, hdr_ready, in_valid, in_ready, out_valid, out_ready;
  logic [63:0] hdr_data;
  enc_t in_enc;
  flit_t out_flit;
  int checks = 0, failures = 0, cycles = 0;
  int n_stall = 0, n_flits = 0, n_max_len = 0, n_min_len = 0;
  bit stalls_on = 1;
  flit_t expq [$];

  fv_packer dut (.*);

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
      if (out_valid && !out_ready) n_stall++;
      if (out_valid && out_ready) begin
        n_flits++;
        if (expq.size() == 0) check(0, "unexpected flit");
        else check(out_flit == expq.pop_front(), "flit");
      end
    end
  end

  task automatic send_msg(int pct_hit);
    int unsigned words[]; bit hits[]; int idxs[];
    longint unsigned flits[];
    longint unsigned hdr;
    words = new[LINE_WORDS]; hits = new[LINE_WORDS]; idxs = new[LINE_WORDS];
    foreach (words[w]) begin
      words[w] = $urandom();
      hits[w] = int'($urandom_range(99)) < pct_hit;
      idxs[w] = $urandom_range(7);
    end
    pack(words, hits, idxs, flits);
    if (flits.size() == MAX_DATA_FLITS) n_max_len++;
    if (flits.size() == 1) n_min_len++;
    hdr = {$urandom(), $urandom()};
    expq.push_back('{head: 1'b1, tail: 1'b0, data: hdr});
    foreach (flits[f]) expq.push_back('{head: 1'b0, tail: f == flits.size() - 1, data: flits[f]});
    @(negedge clk);
    while ($urandom_range(2) == 0) @(negedge clk);
    hdr_valid = 1'b1; hdr_data = hdr;
    #1;
    while (!hdr_ready) @(negedge clk);
    foreach (words[w]) begin
      @(negedge clk);
      hdr_valid = 1'b0;
      while ($urandom_range(3) == 0) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_enc.hit = hits[w]; in_enc.idx = 3'(idxs[w]); in_enc.value = words[w];
      in_enc.last = (w == LINE_WORDS - 1);
      #1;
      while (!in_ready) @(negedge clk);
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    hdr_valid = 0; hdr_data = 0; in_valid = 0; in_enc = '0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    send_msg(0);
    send_msg(100);
    for (int m = 0; m < 400; m++) send_msg($urandom_range(100));
    repeat (80) @(posedge clk);
    check(expq.size() == 0, "all flits seen");
    check(n_max_len > 0 && n_min_len > 0, "longest and shortest messages happened");
    check(n_stall > 0, "back-pressure happened");
    $display("flits=%0d nine-flit=%0d one-flit=%0d stalls=%0d", n_flits, n_max_len, n_min_len, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
