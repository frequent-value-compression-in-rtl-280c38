// tb_fv_table: self-checking test of the FV table (CAM, counters, replacement).
//
// Messages of 16 values from a skewed alphabet (some values frequent, some
// random) are looked up and recorded one per cycle. Every lookup result and,
// after every message, every entry's valid bit, value and counter and the
// number of replacements are compared with fv_model. Directed phases drive a
// counter to saturation (one value repeated over many messages), let
// counters of unused entries fall to zero and use two channels to show that
// channels hold separate tables.
module tb_fv_table;
  import fv_model_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [0:0] chan;
  logic [31:0] lk_value, rd_value, rec_value;
  logic lk_hit, rec_valid, rec_hit, rec_last;
  logic [2:0] lk_idx, rd_idx, rec_idx;
  logic [7:0] ent_valid;
  logic [7:0][31:0] ent_value;
  logic [7:0][7:0] ent_cnt;
  logic [3:0] repl_n;
  int checks = 0, failures = 0, cycles = 0;
  int n_hit = 0, n_miss = 0, n_repl = 0, n_sat = 0;
  fv_model mdl [2];

  fv_table #(.CHANNELS(2)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    #2000000;
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

  task automatic run_msg(int c, int unsigned words[]);
    foreach (words[w]) begin
      bit h; int ix; int r;
      @(negedge clk);
      chan = 1'(c);
      lk_value = words[w];
      #1;
      mdl[c].lookup(words[w], h, ix);
      check(lk_hit == h, "hit flag");
      if (h) check(int'(lk_idx) == ix, "hit index");
      rd_idx = lk_idx;
      #1;
      if (h) check(rd_value == words[w], "indexed read");
      rec_valid = 1'b1; rec_hit = lk_hit; rec_idx = lk_idx; rec_value = words[w];
      rec_last = (w == words.size() - 1);
      r = mdl[c].record(h, ix, words[w], w == words.size() - 1);
      if (h) n_hit++; else n_miss++;
      #1;
      check(int'(repl_n) == r, "replacement count");
      n_repl += r;
    end
    @(negedge clk);
    rec_valid = 1'b0;
    #1;
    for (int i = 0; i < 8; i++) begin
      check(ent_valid[i] == mdl[c].vld[i], "entry valid");
      if (mdl[c].vld[i]) check(ent_value[i] == mdl[c].val[i], "entry value");
      check(int'(ent_cnt[i]) == mdl[c].cnt[i], "entry counter");
      if (ent_cnt[i] == 8'hff) n_sat++;
    end
  endtask

  initial begin
    int unsigned words[];
    mdl[0] = new(); mdl[1] = new();
    chan = 0; lk_value = 0; rd_idx = 0;
    rec_valid = 0; rec_hit = 0; rec_idx = 0; rec_value = 0; rec_last = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    words = new[16];
    // random messages on both channels
    for (int m = 0; m < 300; m++) begin
      int c;
      c = $urandom_range(1);
      foreach (words[w]) words[w] = pick_value(c + (m / 100), 70);
      run_msg(c, words);
    end
    // saturation: a value already in the table, over and over
    begin
      int best;
      best = 0;
      for (int i = 0; i < 8; i++) if (mdl[0].cnt[i] > mdl[0].cnt[best]) best = i;
      for (int m = 0; m < 12; m++) begin
        foreach (words[w]) words[w] = (w < 12) ? mdl[0].val[best] : $urandom();
        run_msg(0, words);
      end
    end
    // decay: values never seen again until counters reach zero
    for (int m = 0; m < 20; m++) begin
      foreach (words[w]) words[w] = $urandom();
      run_msg(1, words);
    end
    check(n_hit > 0 && n_miss > 0, "hits and misses both happened");
    check(n_repl > 0, "replacements happened");
    check(n_sat > 0, "a counter saturated");
    $display("hits=%0d misses=%0d replacements=%0d saturated=%0d", n_hit, n_miss, n_repl, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
