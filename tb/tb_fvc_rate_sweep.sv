// tb_fvc_rate_sweep: the 24-node interfaces under random traffic at several
// injection rates.
//
// For each rate R in 0.10, 0.20, 0.30, 0.39 and 0.50 flits per cycle per node,
// every node sends MSGS lines to random other nodes. A node starts a new line
// only while the flits it has generated in this phase, counted uncompressed
// (1 head + 8 data flits per line), stay below R times the cycles elapsed in
// the phase. A phase ends when every line has been
// delivered; the tables keep their contents from one phase to the next.
// Every delivered value, tag, source and last flag is checked in order per
// node pair. For each rate the testbench prints the flits actually injected
// per cycle and node after compression, the mean line latency (first value offered to last
// value delivered) and the mean data flits per line relative to the 8 of an
// uncompressed line. The network is the behavioural fvc_net_model, so the
// latencies describe this test set-up, not a real mesh.
module tb_fvc_rate_sweep;
  import fvc_pkg::*;
  import fv_model_pkg::*;

  localparam int N      = NODES;
  localparam int MSGS   = 80;
  localparam int PHASES = 5;
  localparam real RATES [PHASES] = '{0.10, 0.20, 0.30, 0.39, 0.50};

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] tx_valid, tx_ready, tx_last, fo_valid, fo_ready, fi_valid, fi_ready;
  logic [N-1:0] rx_valid, rx_ready, rx_last, ev_hit, ev_miss;
  logic [N-1:0][7:0] tx_dst, rx_src;
  logic [N-1:0][31:0] tx_tag, tx_value, rx_tag, rx_value;
  flit_t [N-1:0] fo_flit, fi_flit;
  logic [N-1:0][3:0] ev_repl_tx, ev_repl_rx;

  logic        d_valid [N];
  logic        d_last  [N];
  logic [7:0]  d_dst   [N];
  logic [31:0] d_tag   [N];
  logic [31:0] d_value [N];

  int checks = 0, failures = 0, cycles = 0;
  int phase = -1, phase_start = 0, n_done = 0;
  int n_lines = 0, n_data_flits = 0, n_flits_out = 0;
  longint lat_sum = 0;
  int fo_cnt [N];
  int gen_cnt [N];   // generated flits, counted uncompressed: 1 head + 8 data per line
  int unsigned expw [N*N][$];
  int unsigned expt [N*N][$];
  int          t_start [N*N][$];

  fvc_top dut (.*);

  fvc_net_model #(.N(N), .PASS_PCT(90)) u_net (
    .clk, .rst_n, .fo_valid, .fo_ready, .fo_flit, .fi_valid, .fi_ready, .fi_flit
  );

  always #5 clk = ~clk;

  initial begin
    #5000000;
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
    for (int n = 0; n < N; n++) rx_ready[n] <= $urandom_range(15) != 0;
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

  always @(negedge clk) begin
    if (rst_n) begin
      for (int n = 0; n < N; n++) begin
        if (fo_valid[n] && fo_ready[n]) begin
          fo_cnt[n]++;
          n_flits_out++;
          if (!fo_flit[n].head) n_data_flits++;
        end
        if (rx_valid[n] && rx_ready[n]) begin
          int p;
          p = int'(rx_src[n]) * N + n;
          if (int'(rx_src[n]) >= N || expw[p].size() == 0) check(0, "unexpected value");
          else begin
            check(rx_value[n] == expw[p].pop_front(), "delivered value");
            check(rx_tag[n] == expt[p].pop_front(), "delivered tag");
            check(rx_last[n] == (expw[p].size() % LINE_WORDS == 0), "last flag");
            if (rx_last[n]) begin
              n_lines++;
              lat_sum += longint'(cycles - t_start[p].pop_front());
            end
          end
        end
      end
    end
  end

  for (genvar g = 0; g < N; g++) begin : g_src
    initial begin
      int unsigned words [LINE_WORDS];
      int d, kind, my_phase;
      int unsigned tag;
      d_valid[g] = 1'b0; d_last[g] = 1'b0; d_dst[g] = '0; d_tag[g] = '0; d_value[g] = '0;
      fo_cnt[g] = 0; gen_cnt[g] = 0;
      for (my_phase = 0; my_phase < PHASES; my_phase++) begin
        wait (phase == my_phase);
        for (int m = 0; m < MSGS; m++) begin
          @(negedge clk);
          while (real'(gen_cnt[g]) > RATES[my_phase] * real'(cycles - phase_start)) @(negedge clk);
          gen_cnt[g] += 1 + 8;
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
          t_start[g*N+d].push_back(cycles);
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
  end

  initial begin
    int pending, lines0, data0, flits0;
    longint lat0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int p = 0; p < PHASES; p++) begin
      lines0 = n_lines; data0 = n_data_flits; flits0 = n_flits_out; lat0 = lat_sum;
      for (int n = 0; n < N; n++) begin fo_cnt[n] = 0; gen_cnt[n] = 0; end
      phase_start = cycles;
      n_done = 0;
      phase = p;
      wait (n_done == N);
      pending = 1;
      while (pending != 0 && cycles - phase_start < 100000) begin
        repeat (20) @(negedge clk);
        pending = 0;
        for (int q = 0; q < N * N; q++) pending += expw[q].size();
      end
      check(pending == 0, "every line of the phase delivered");
      check(n_lines - lines0 == N * MSGS, "line count of the phase");
      $display("rate %0.2f: on the wire %0.3f flits/cycle/node, mean line latency %0.1f cycles, normalized length %0.3f",
               RATES[p], real'(n_flits_out - flits0) / real'(N * (cycles - phase_start)),
               real'(lat_sum - lat0) / real'(n_lines - lines0),
               real'(n_data_flits - data0) / real'(8 * (n_lines - lines0)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
