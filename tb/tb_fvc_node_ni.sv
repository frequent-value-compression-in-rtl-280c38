// tb_fvc_node_ni: self-checking test of one node's network interface.
//
// Three interfaces (nodes 0, 1, 2 of a 3-node system) are joined by
// fvc_net_model and each sends 200 cache lines to the two others, so every
// interface compresses with two send tables and decompresses with two
// receive tables at once, and lines cross in both directions between every
// pair. Values are frequent per pair with some random ones. Every delivered
// value, source, tag and last flag is compared with what was sent, in order
// per node pair; sender and receiver replacement counts must match.
module tb_fvc_node_ni;
  import fvc_pkg::*;
  import fv_model_pkg::*;

  localparam int N = 3, MSGS = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] fo_valid, fo_ready, fi_valid, fi_ready;
  flit_t [N-1:0] fo_flit, fi_flit;
  logic        tx_valid [N], tx_ready [N], tx_last [N];
  logic [7:0]  tx_dst [N];
  logic [31:0] tx_tag [N], tx_value [N];
  logic        rx_valid [N], rx_ready [N], rx_last [N];
  logic [7:0]  rx_src [N];
  logic [31:0] rx_tag [N], rx_value [N];
  logic        ev_hit [N], ev_miss [N];
  logic [3:0]  ev_repl_tx [N], ev_repl_rx [N];

  int checks = 0, failures = 0, cycles = 0, n_done = 0;
  int n_hit = 0, n_repl_tx = 0, n_repl_rx = 0, n_lines = 0;
  int unsigned expw [N*N][$];
  int unsigned expt [N*N][$];

  for (genvar g = 0; g < N; g++) begin : g_ni
    fvc_node_ni #(.NODES(N), .NODE_ID(g)) dut (
      .clk, .rst_n,
      .tx_valid (tx_valid[g]), .tx_ready (tx_ready[g]), .tx_dst (tx_dst[g]),
      .tx_tag (tx_tag[g]), .tx_value (tx_value[g]), .tx_last (tx_last[g]),
      .fo_valid (fo_valid[g]), .fo_ready (fo_ready[g]), .fo_flit (fo_flit[g]),
      .fi_valid (fi_valid[g]), .fi_ready (fi_ready[g]), .fi_flit (fi_flit[g]),
      .rx_valid (rx_valid[g]), .rx_ready (rx_ready[g]), .rx_src (rx_src[g]),
      .rx_tag (rx_tag[g]), .rx_value (rx_value[g]), .rx_last (rx_last[g]),
      .ev_hit (ev_hit[g]), .ev_miss (ev_miss[g]),
      .ev_repl_tx (ev_repl_tx[g]), .ev_repl_rx (ev_repl_rx[g])
    );
  end

  fvc_net_model #(.N(N), .PASS_PCT(70)) u_net (
    .clk, .rst_n, .fo_valid, .fo_ready, .fo_flit, .fi_valid, .fi_ready, .fi_flit
  );

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
    for (int n = 0; n < N; n++) rx_ready[n] <= $urandom_range(5) != 0;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      for (int n = 0; n < N; n++) begin
        if (ev_hit[n]) n_hit++;
        n_repl_tx += int'(ev_repl_tx[n]);
        n_repl_rx += int'(ev_repl_rx[n]);
        if (rx_valid[n] && rx_ready[n]) begin
          int p;
          p = int'(rx_src[n]) * N + n;
          if (int'(rx_src[n]) >= N || expw[p].size() == 0) check(0, "unexpected value");
          else begin
            check(rx_value[n] == expw[p].pop_front(), "delivered value");
            check(rx_tag[n] == expt[p].pop_front(), "delivered tag");
            check(rx_last[n] == (expw[p].size() % LINE_WORDS == 0), "last flag");
            if (rx_last[n]) n_lines++;
          end
        end
      end
    end
  end

  for (genvar g = 0; g < N; g++) begin : g_src
    initial begin
      int d;
      int unsigned tag;
      int unsigned words [LINE_WORDS];
      tx_valid[g] = 1'b0; tx_last[g] = 1'b0; tx_dst[g] = '0; tx_tag[g] = '0; tx_value[g] = '0;
      wait (rst_n);
      for (int m = 0; m < MSGS; m++) begin
        @(negedge clk);
        d = (g + 1 + $urandom_range(N - 2)) % N;
        tag = $urandom();
        for (int w = 0; w < LINE_WORDS; w++) begin
          words[w] = pick_value(g * N + d + m / 70, 70);
          expw[g*N+d].push_back(words[w]);
          expt[g*N+d].push_back(tag);
        end
        for (int w = 0; w < LINE_WORDS; w++) begin
          if (w != 0) @(negedge clk);
          tx_valid[g] = 1'b1; tx_dst[g] = 8'(d); tx_tag[g] = tag;
          tx_value[g] = words[w]; tx_last[g] = (w == LINE_WORDS - 1);
          #1;
          while (!tx_ready[g]) @(negedge clk);
        end
        @(negedge clk);
        tx_valid[g] = 1'b0;
      end
      n_done++;
    end
  end

  initial begin
    int pending;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (n_done == N);
    repeat (400) @(posedge clk);
    pending = 0;
    for (int p = 0; p < N * N; p++) pending += expw[p].size();
    check(pending == 0, "every line delivered");
    check(n_lines == N * MSGS, "line count");
    check(n_hit > 0, "hits happened");
    check(n_repl_tx > 0 && n_repl_tx == n_repl_rx, "replacements, equal on both sides");
    $display("lines=%0d hits=%0d repl_tx=%0d repl_rx=%0d", n_lines, n_hit, n_repl_tx, n_repl_rx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
