// tb_fv_compressor: self-checking test of the pipelined FV compressor.
//
// A first message is sent with no gaps and no back-pressure to check the
// pipeline timing: N values in, N encoded values out, N+2 cycles in all.
// Then 400 messages on two channels are sent with random input gaps and
// random output back-pressure; every encoded value (hit flag, index or
// value, last flag) is compared with fv_model, as are the hit, miss and
// replacement counts.
module tb_fv_compressor;
  import fvc_pkg::*;
  import fv_model_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, in_last, out_valid, out_ready;
  logic [31:0] in_value;
  logic [0:0] in_chan;
  enc_t out_enc;
  logic ev_hit, ev_miss;
  logic [3:0] ev_repl;
  int checks = 0, failures = 0, cycles = 0;
  int n_hit = 0, n_miss = 0, n_repl = 0, n_stall = 0;
  int exp_hit = 0, exp_miss = 0;
  int t_first_in = -1, t_last_out = -1, n_out = 0;
  bit stalls_on = 0;
  fv_model mdl [2];
  enc_t expq [$];

  fv_compressor #(.CHANNELS(2)) dut (.*);

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

  // output side: random back-pressure, compare with expected queue
  always @(posedge clk) begin
    cycles <= cycles + 1;
    out_ready <= stalls_on ? ($urandom_range(3) != 0) : 1'b1;
  end

  // all handshakes are sampled at the falling edge, where inputs are settled
  always @(negedge clk) begin
    if (rst_n) begin
      if (ev_hit) n_hit++;
      if (ev_miss) n_miss++;
      n_repl += int'(ev_repl);
      if (out_valid && !out_ready) n_stall++;
      if (out_valid && out_ready) begin
        enc_t e;
        n_out++;
        t_last_out = cycles;
        if (expq.size() == 0) check(0, "unexpected output");
        else begin
          e = expq.pop_front();
          check(out_enc.hit == e.hit && out_enc.last == e.last, "hit/last flags");
          if (e.hit) check(out_enc.idx == e.idx, "index");
          else check(out_enc.value == e.value, "missed value");
        end
      end
      if (in_valid && in_ready && t_first_in < 0) t_first_in = cycles;
    end
  end

  task automatic send_msg(int c, int unsigned words[], bit gaps);
    bit hits[]; int idxs[];
    mdl[c].compress(words, hits, idxs);
    foreach (words[w]) begin
      enc_t e;
      e.hit = hits[w]; e.idx = 3'(idxs[w]); e.value = words[w];
      e.last = (w == words.size() - 1);
      expq.push_back(e);
      if (hits[w]) exp_hit++; else exp_miss++;
    end
    foreach (words[w]) begin
      @(negedge clk);
      if (gaps) while ($urandom_range(3) == 0) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      in_valid = 1'b1; in_value = words[w]; in_chan = 1'(c);
      in_last = (w == words.size() - 1);
      #1;
      while (!in_ready) @(negedge clk);
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    int unsigned words[];
    int c;
    mdl[0] = new(); mdl[1] = new();
    in_valid = 0; in_value = 0; in_chan = 0; in_last = 0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    words = new[LINE_WORDS];
    foreach (words[w]) words[w] = 32'(w % 3);
    send_msg(0, words, 0);
    repeat (5) @(posedge clk);
    check(n_out == LINE_WORDS, "first message complete");
    check(t_last_out - t_first_in + 1 == LINE_WORDS + 2, "N+2 cycles for N values");
    $display("first message: %0d values in %0d cycles", n_out, t_last_out - t_first_in + 1);
    stalls_on = 1;
    for (int m = 0; m < 400; m++) begin
      c = $urandom_range(1);
      foreach (words[w]) words[w] = pick_value(c + m / 150, 65);
      send_msg(c, words, 1);
    end
    repeat (50) @(posedge clk);
    check(expq.size() == 0, "all outputs seen");
    check(n_hit == exp_hit && n_miss == exp_miss, "hit and miss events");
    check(n_repl == mdl[0].total_repl + mdl[1].total_repl, "replacement events");
    check(n_stall > 0, "back-pressure happened");
    $display("hits=%0d misses=%0d replacements=%0d stalls=%0d", n_hit, n_miss, n_repl, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
