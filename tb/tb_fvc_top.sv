// tb_fvc_top: end-to-end test of all 24 network interfaces with FV compression.
//
// The interfaces are joined by fvc_net_model, a behavioural network that
// delivers each message contiguously and passes flits only in 80% of cycles
// per destination. Every node sends MSGS cache lines to random other nodes,
// injecting at a random traffic rate of R = 0.39 flits per cycle: a node
// starts a new line only while the flits it has generated, counted
// uncompressed (1 head + 8 data flits per line), stay below R * elapsed
// cycles. Lines mix values that are frequent for the node pair, random
// values, wholly random lines and constant lines. Every value delivered at a
// destination must equal the value sent, in order per node pair, with the
// right source and tag; this holds only if each pair's send and receive
// tables stay identical. Receivers apply random back-pressure.
//
// Mechanisms counted (each must occur): table hits, misses, replacements at
// senders and receivers (the totals must match), flit back-pressure from the
// network, fully uncompressed 9-flit lines, fully compressed 1-flit lines,
// and node pairs with lines in flight in both directions at once. The mean
// data-flit count per line, relative to the 8 flits of an uncompressed line,
// is printed.
module tb_fvc_top;
  import fvc_pkg::*;
  import fv_model_pkg::*;

  localparam int N    = NODES;
  localparam int MSGS = 60;
  localparam real R   = 0.39;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] tx_valid, tx_ready, tx_last, fo_valid, fo_ready, fi_valid, fi_ready;
  logic [N-1:0] rx_valid, rx_ready, rx_last, ev_hit, ev_miss;
  logic [N-1:0][7:0] tx_dst, rx_src;
  logic [N-1:0][31:0] tx_tag, tx_value, rx_tag, rx_value;
  flit_t [N-1:0] fo_flit, fi_flit;
  logic [N-1:0][3:0] ev_repl_tx, ev_repl_rx;

  // per-node drive values, written by one process per node
  logic        d_valid [N];
  logic        d_last  [N];
  logic [7:0]  d_dst   [N];
  logic [31:0] d_tag   [N];
  logic [31:0] d_value [N];

  int checks = 0, failures = 0, cycles = 0;
  int n_hit = 0, n_miss = 0, n_repl_tx = 0, n_repl_rx = 0, n_fo_stall = 0;
  int n_nine = 0, n_one = 0, n_both_dir = 0, n_lines_rx = 0, n_data_flits = 0;
  int n_done = 0;
  int fo_cnt [N];
  int gen_cnt [N];   // generated flits, counted uncompressed: 1 head + 8 data per line
  int rx_flits [N];
  int unsigned expw [N*N][$];
  int unsigned expt [N*N][$];

  fvc_top dut (.*);

  fvc_net_model #(.N(N), .PASS_PCT(80)) u_net (
    .clk, .rst_n,
    .fo_valid, .fo_ready, .fo_flit,
    .fi_valid, .fi_ready, .fi_flit
  );

  always #5 clk = ~clk;

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

  always @(posedge clk) begin
    cycles <= cycles + 1;
    for (int n = 0; n < N; n++) rx_ready[n] <= $urandom_range(7) != 0;
  end

  always_comb begin
    for (int n = 0; n < N; n++) begin
      tx_valid[n] = d_valid[n];
      tx_last[n]  = d_last[n];
      tx_dst[n]   = d_dst[n];
      tx_tag[n]   = d_tag[n];
      tx_value[n] = d_value[n];
    end
  end

  // scoreboard and event counters, sampled at the falling edge
  always @(negedge clk) begin
    if (rst_n) begin
      for (int n = 0; n < N; n++) begin
        if (ev_hit[n]) n_hit++;
        if (ev_miss[n]) n_miss++;
        n_repl_tx += int'(ev_repl_tx[n]);
        n_repl_rx += int'(ev_repl_rx[n]);
        if (fo_valid[n] && !fo_ready[n]) n_fo_stall++;
        if (fo_valid[n] && fo_ready[n]) fo_cnt[n]++;
        if (fi_valid[n] && fi_ready[n]) begin
          if (fi_flit[n].head) rx_flits[n] = 0;
          else begin
            rx_flits[n]++;
            n_data_flits++;
          end
          if (fi_flit[n].tail) begin
            if (rx_flits[n] == MAX_DATA_FLITS) n_nine++;
            if (rx_flits[n] == 1) n_one++;
          end
        end
        if (rx_valid[n] && rx_ready[n]) begin
          int p;
          p = int'(rx_src[n]) * N + n;
          if (int'(rx_src[n]) >= N || expw[p].size() == 0) check(0, "unexpected value");
          else begin
            check(rx_value[n] == expw[p].pop_front(), "delivered value");
            check(rx_tag[n] == expt[p].pop_front(), "delivered tag");
            check(rx_last[n] == (expw[p].size() % LINE_WORDS == 0), "last flag");
            if (rx_last[n]) n_lines_rx++;
          end
        end
      end
      for (int a = 0; a < N; a++)
        for (int b = a + 1; b < N; b++)
          if (expw[a*N+b].size() != 0 && expw[b*N+a].size() != 0) n_both_dir++;
    end
  end

  for (genvar g = 0; g < N; g++) begin : g_src
    initial begin
      int unsigned words [LINE_WORDS];
      int d, kind;
      int unsigned tag;
      d_valid[g] = 1'b0; d_last[g] = 1'b0; d_dst[g] = '0; d_tag[g] = '0; d_value[g] = '0;
      fo_cnt[g] = 0; gen_cnt[g] = 0; rx_flits[g] = 0;
      wait (rst_n);
      for (int m = 0; m < MSGS; m++) begin
        @(negedge clk);
        while (real'(gen_cnt[g]) > R * real'(cycles)) @(negedge clk);
        gen_cnt[g] += 1 + 8;
        // neighbours in the node numbering talk more often, so tables warm up
        d = ($urandom_range(1) == 0) ? (g + 1 + $urandom_range(2)) % N
                                     : (g + 1 + $urandom_range(N - 2)) % N;
        kind = $urandom_range(9);
        tag = $urandom();
        for (int w = 0; w < LINE_WORDS; w++) begin
          if (kind == 0) words[w] = $urandom();
          else if (kind == 1) words[w] = 32'h0;
          else words[w] = pick_value((g * 7 + d) % 11, 75);
          expw[g*N+d].push_back(words[w]);
          expt[g*N+d].push_back(tag);
        end
        for (int w = 0; w < LINE_WORDS; w++) begin
          if (w != 0) @(negedge clk);
          d_valid[g] = 1'b1; d_dst[g] = 8'(d); d_tag[g] = tag;
          d_value[g] = words[w]; d_last[g] = (w == LINE_WORDS - 1);
          #1;
          while (!tx_ready[g]) @(negedge clk);
        end
        @(negedge clk);
        d_valid[g] = 1'b0;
      end
      n_done++;
    end
  end

  initial begin
    int pending;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (n_done == N);
    pending = 1;
    while (pending != 0) begin
      repeat (50) @(posedge clk);
      pending = 0;
      for (int p = 0; p < N * N; p++) pending += expw[p].size();
      if (cycles > 150000) break;
    end
    repeat (20) @(posedge clk);
    check(pending == 0, "every line delivered");
    check(n_lines_rx == N * MSGS, "line count");
    check(n_hit > 0, "hits happened");
    check(n_miss > 0, "misses happened");
    check(n_repl_tx > 0 && n_repl_tx == n_repl_rx, "replacements, equal on both sides");
    check(n_fo_stall > 0, "network back-pressure happened");
    check(n_nine > 0, "9-flit lines happened");
    check(n_one > 0, "1-flit lines happened");
    check(n_both_dir > 0, "lines in flight both ways between a pair");
    $display("lines=%0d cycles=%0d hits=%0d misses=%0d repl_tx=%0d repl_rx=%0d fo_stalls=%0d",
             n_lines_rx, cycles, n_hit, n_miss, n_repl_tx, n_repl_rx, n_fo_stall);
    $display("nine-flit=%0d one-flit=%0d both-directions=%0d normalized length=%0.3f",
             n_nine, n_one, n_both_dir, real'(n_data_flits) / real'(8 * n_lines_rx));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
