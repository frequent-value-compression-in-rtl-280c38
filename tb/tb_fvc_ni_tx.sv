// tb_fvc_ni_tx: self-checking test of the transmit half of the interface.
//
// Node 2 of a 4-node system sends 400 cache lines to random destinations
// (0, 1, 3) with random gaps and random flit back-pressure. For each
// destination fv_model keeps the send table, so every flit (header with tag,
// source and destination, then the packed codes) is predicted independently.
// A line of zeros sent twice without gaps or back-pressure checks the
// timing of the second, all-hit one: header flit in the cycle after the first value is taken, and the
// tail flit N+2+1 cycles after it (N values, two cycles of compression, one
// flit register).
module tb_fvc_ni_tx;
  import fvc_pkg::*;
  import fv_model_pkg::*;

  localparam int N = 4, ME = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic msg_valid, msg_ready, msg_last, flit_valid, flit_ready, ev_hit, ev_miss;
  logic [7:0] msg_dst;
  logic [31:0] msg_tag, msg_value;
  flit_t flit;
  logic [3:0] ev_repl;
  int checks = 0, failures = 0, cycles = 0;
  int n_stall = 0, n_hit = 0, n_repl = 0, exp_hit = 0;
  int t_first_in = -1, t_head = -1, t_tail = -1, n_data = 0;
  bit stalls_on = 0;
  fv_model mdl [N];
  flit_t expq [$];

  fvc_ni_tx #(.NODES(N), .NODE_ID(ME)) dut (.*);

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
    flit_ready <= stalls_on ? ($urandom_range(3) != 0) : 1'b1;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (ev_hit) n_hit++;
      n_repl += int'(ev_repl);
      if (msg_valid && msg_ready && t_first_in < 0) t_first_in = cycles;
      if (flit_valid && !flit_ready) n_stall++;
      if (flit_valid && flit_ready) begin
        if (flit.head && t_head < 0) t_head = cycles;
        if (!flit.head) n_data++;
        if (flit.tail && t_tail < 0) t_tail = cycles;
        if (expq.size() == 0) check(0, "unexpected flit");
        else check(flit == expq.pop_front(), "flit");
      end
    end
  end

  task automatic send_msg(int dst, int unsigned words[], bit gaps);
    bit hits[]; int idxs[]; longint unsigned flits[];
    int unsigned tag = $urandom();
    mdl[dst].compress(words, hits, idxs);
    foreach (hits[w]) if (hits[w]) exp_hit++;
    pack(words, hits, idxs, flits);
    expq.push_back('{head: 1'b1, tail: 1'b0, data: {16'h0, tag, 8'(ME), 8'(dst)}});
    foreach (flits[f]) expq.push_back('{head: 1'b0, tail: f == flits.size() - 1, data: flits[f]});
    foreach (words[w]) begin
      @(negedge clk);
      if (gaps) while ($urandom_range(3) == 0) begin
        msg_valid = 1'b0;
        @(negedge clk);
      end
      msg_valid = 1'b1; msg_dst = 8'(dst); msg_tag = tag; msg_value = words[w];
      msg_last = (w == words.size() - 1);
      #1;
      while (!msg_ready) @(negedge clk);
    end
    @(negedge clk);
    msg_valid = 1'b0;
  endtask

  initial begin
    int unsigned words[];
    int d;
    foreach (mdl[i]) mdl[i] = new();
    msg_valid = 0; msg_dst = 0; msg_tag = 0; msg_value = 0; msg_last = 0; flit_ready = 1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    words = new[LINE_WORDS];
    // an all-zero line misses 16 times (the table changes only at the end of
    // a message) and fills 9 data flits; the zero is then in the table, so a
    // second all-zero line hits 16 times: 64 bits, one data flit
    foreach (words[w]) words[w] = 0;
    send_msg(1, words, 0);
    repeat (30) @(posedge clk);
    t_first_in = -1; t_head = -1; t_tail = -1; n_data = 0;
    send_msg(1, words, 0);
    repeat (30) @(posedge clk);
    check(n_data == 1, "all-hit line in one data flit");
    check(t_head == t_first_in + 1, "header flit one cycle after first value");
    check(t_tail == t_first_in + LINE_WORDS + 2 + 1, "tail flit after N+2+1 cycles");
    $display("first message: header at +%0d, tail at +%0d cycles", t_head - t_first_in, t_tail - t_first_in);
    stalls_on = 1;
    for (int m = 0; m < 400; m++) begin
      d = $urandom_range(2);
      if (d >= ME) d++;
      foreach (words[w]) words[w] = pick_value(d + m / 150, 65);
      send_msg(d, words, 1);
    end
    repeat (80) @(posedge clk);
    check(expq.size() == 0, "all flits seen");
    check(n_hit == exp_hit, "hit events");
    check(n_repl == mdl[0].total_repl + mdl[1].total_repl + mdl[3].total_repl, "replacement events");
    check(n_stall > 0, "back-pressure happened");
    $display("hits=%0d replacements=%0d stalls=%0d", n_hit, n_repl, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
