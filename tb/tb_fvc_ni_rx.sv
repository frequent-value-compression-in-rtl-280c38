// tb_fvc_ni_rx: self-checking test of the receive half of the interface.
//
// Node 1 of a 4-node system receives 400 messages from random sources
// (0, 2, 3). For each source fv_model plays the sender's table: it compresses
// the line and fv_model_pkg::pack builds the flits, which are offered with
// random gaps while the message output sees random back-pressure. Every
// delivered value, its last flag, source and tag must equal what was sent.
// A first message without gaps or back-pressure checks that the first value
// leaves three cycles after the first data flit is taken (one cycle of
// unpacking, two of decompression).
module tb_fvc_ni_rx;
  import fvc_pkg::*;
  import fv_model_pkg::*;

  localparam int N = 4, ME = 1;
  logic clk = 1'b0, rst_n = 1'b0;
  logic flit_valid, flit_ready, msg_valid, msg_ready, msg_last;
  flit_t flit;
  logic [7:0] msg_src;
  logic [31:0] msg_tag, msg_value;
  logic [3:0] ev_repl;
  int checks = 0, failures = 0, cycles = 0;
  int n_stall = 0, n_repl = 0, n_vals = 0;
  int t_first_data = -1, t_first_out = -1;
  bit stalls_on = 0;
  fv_model mdl [N];
  int unsigned expv [$], expt [$];
  int exps [$];
  bit expl [$];

  fvc_ni_rx #(.NODES(N), .NODE_ID(ME)) dut (.*);

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
    msg_ready <= stalls_on ? ($urandom_range(3) != 0) : 1'b1;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      n_repl += int'(ev_repl);
      if (flit_valid && flit_ready && !flit.head && t_first_data < 0) t_first_data = cycles;
      if (msg_valid && !msg_ready) n_stall++;
      if (msg_valid && msg_ready) begin
        if (t_first_out < 0) t_first_out = cycles;
        n_vals++;
        if (expv.size() == 0) check(0, "unexpected value");
        else begin
          check(msg_value == expv.pop_front(), "value");
          check(msg_last == expl.pop_front(), "last flag");
          check(int'(msg_src) == exps.pop_front(), "source");
          check(msg_tag == expt.pop_front(), "tag");
        end
      end
    end
  end

  task automatic send_flit(flit_t f, bit gaps);
    @(negedge clk);
    if (gaps) while ($urandom_range(3) == 0) begin
      flit_valid = 1'b0;
      @(negedge clk);
    end
    flit_valid = 1'b1; flit = f;
    #1;
    while (!flit_ready) @(negedge clk);
  endtask

  task automatic send_msg(int src, int unsigned words[], bit gaps);
    bit hits[]; int idxs[]; longint unsigned flits[];
    int unsigned tag = $urandom();
    mdl[src].compress(words, hits, idxs);
    pack(words, hits, idxs, flits);
    foreach (words[w]) begin
      expv.push_back(words[w]); expl.push_back(w == words.size() - 1);
      exps.push_back(src); expt.push_back(tag);
    end
    send_flit('{head: 1'b1, tail: 1'b0, data: {16'h0, tag, 8'(src), 8'(ME)}}, gaps);
    foreach (flits[f]) send_flit('{head: 1'b0, tail: f == flits.size() - 1, data: flits[f]}, gaps);
    @(negedge clk);
    flit_valid = 1'b0;
  endtask

  initial begin
    int unsigned words[];
    int s;
    foreach (mdl[i]) mdl[i] = new();
    flit_valid = 0; flit = '0; msg_ready = 1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    words = new[LINE_WORDS];
    foreach (words[w]) words[w] = 32'(w % 2);
    send_msg(3, words, 0);
    repeat (30) @(posedge clk);
    check(t_first_out == t_first_data + 3, "first value three cycles after first data flit");
    stalls_on = 1;
    for (int m = 0; m < 400; m++) begin
      s = $urandom_range(2);
      if (s >= ME) s++;
      foreach (words[w]) words[w] = pick_value(s + m / 150, 65);
      send_msg(s, words, 1);
    end
    repeat (80) @(posedge clk);
    check(expv.size() == 0, "all values seen");
    check(n_repl == mdl[0].total_repl + mdl[2].total_repl + mdl[3].total_repl, "replacement events");
    check(n_stall > 0, "back-pressure happened");
    $display("values=%0d replacements=%0d stalls=%0d", n_vals, n_repl, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
