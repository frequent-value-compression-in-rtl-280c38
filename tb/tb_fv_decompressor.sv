// tb_fv_decompressor: self-checking test of the pipelined FV decompressor.
//
// Messages are compressed by fv_model (the sender's table) and the encoded
// values are fed to the decompressor with random gaps and random output
// back-pressure on two channels. Every decoded value must equal the value
// originally sent, which holds only if the decompressor's tables follow the
// sender's exactly. The first message is sent without gaps or back-pressure
// and must leave with a latency of two cycles per value (N+2 cycles in all).
module tb_fv_decompressor;
  import fvc_pkg::*;
  import fv_model_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid, out_ready, out_last;
  enc_t in_enc;
  logic [0:0] in_chan;
  logic [31:0] out_value;
  logic [3:0] ev_repl;
  int checks = 0, failures = 0, cycles = 0;
  int n_repl = 0, n_stall = 0, n_hits = 0, n_out = 0;
  int t_first_in = -1, t_last_out = -1;
  bit stalls_on = 0;
  fv_model mdl [2];
  int unsigned expv [$];
  bit expl [$];

  fv_decompressor #(.CHANNELS(2)) dut (.*);

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
      n_repl += int'(ev_repl);
      if (out_valid && !out_ready) n_stall++;
      if (in_valid && in_ready && t_first_in < 0) t_first_in = cycles;
      if (out_valid && out_ready) begin
        n_out++;
        t_last_out = cycles;
        if (expv.size() == 0) check(0, "unexpected output");
        else begin
          check(out_value == expv.pop_front(), "decoded value");
          check(out_last == expl.pop_front(), "last flag");
        end
      end
    end
  end

  task automatic send_msg(int c, int unsigned words[], bit gaps);
    bit hits[]; int idxs[];
    mdl[c].compress(words, hits, idxs);
    foreach (words[w]) begin
      expv.push_back(words[w]);
      expl.push_back(w == words.size() - 1);
    end
    foreach (words[w]) begin
      @(negedge clk);
      if (gaps) while ($urandom_range(3) == 0) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      in_valid = 1'b1; in_chan = 1'(c);
      in_enc.hit = hits[w];
      in_enc.idx = hits[w] ? 3'(idxs[w]) : 3'($urandom());
      in_enc.value = hits[w] ? $urandom() : words[w];
      in_enc.last = (w == words.size() - 1);
      if (hits[w]) n_hits++;
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
    in_valid = 0; in_enc = '0; in_chan = 0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    words = new[LINE_WORDS];
    foreach (words[w]) words[w] = 32'(w % 4);
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
    check(expv.size() == 0, "all outputs seen");
    check(n_repl == mdl[0].total_repl + mdl[1].total_repl, "replacement events");
    check(n_stall > 0 && n_hits > 0, "back-pressure and hits happened");
    $display("hits=%0d replacements=%0d stalls=%0d", n_hits, n_repl, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
