// fv_model_pkg: reference model of the frequent-value scheme for testbenches.
//
// fv_model is a plain software model of one FV table with counter-based
// replacement, written independently of the RTL: a hit adds 2 to the entry's
// counter (at most 255), every entry not hit by a message loses 1 at the end
// of the message (at least 0), and then the distinct missed values, in order
// of first appearance, are written into the entries whose counter is 0,
// lowest index first; a new entry starts with counter 2. Empty entries never
// match and count as counter 0. The package also builds the flit payloads of
// an encoded message (4-bit hit code {idx,1}, 33-bit miss code {value,0},
// packed from bit 0 upwards into 64-bit flits, last flit zero-padded).
package fv_model_pkg;

  localparam int ENTRIES = 8;

  class fv_model;
    bit          vld [ENTRIES];
    int unsigned val [ENTRIES];
    int          cnt [ENTRIES];
    bit          hitf[ENTRIES];
    int unsigned miss[$];
    int          total_repl;
    int          saturations;

    function new();
      foreach (vld[i]) begin vld[i] = 0; val[i] = 0; cnt[i] = 0; hitf[i] = 0; end
      total_repl = 0;
      saturations = 0;
    endfunction

    function void lookup(int unsigned v, output bit hit, output int idx);
      hit = 0; idx = 0;
      for (int i = 0; i < ENTRIES; i++)
        if (vld[i] && val[i] == v && !hit) begin hit = 1; idx = i; end
    endfunction

    // record one value; returns the number of entries replaced (only at last)
    function int record(bit hit, int idx, int unsigned v, bit last);
      int n = 0;
      if (hit) begin
        hitf[idx] = 1;
        cnt[idx] += 2;
        if (cnt[idx] > 255) begin cnt[idx] = 255; saturations++; end
      end else begin
        bit dup = 0;
        foreach (miss[m]) if (miss[m] == v) dup = 1;
        if (!dup && miss.size() < ENTRIES) miss.push_back(v);
      end
      if (last) begin
        for (int i = 0; i < ENTRIES; i++)
          if (!hitf[i] && cnt[i] > 0) cnt[i]--;
        for (int i = 0; i < ENTRIES; i++)
          if (cnt[i] == 0 && n < miss.size()) begin
            val[i] = miss[n]; vld[i] = 1; cnt[i] = 2; n++;
          end
        foreach (hitf[i]) hitf[i] = 0;
        miss.delete();
        total_repl += n;
      end
      return n;
    endfunction

    // compress a whole message: per value hit flag and index
    function void compress(int unsigned words[], output bit hits[], output int idxs[]);
      hits = new[words.size()];
      idxs = new[words.size()];
      foreach (words[w]) begin
        bit h; int ix; int r;
        lookup(words[w], h, ix);
        hits[w] = h; idxs[w] = ix;
        r = record(h, ix, words[w], w == words.size() - 1);
      end
    endfunction
  endclass

  // pack codes into 64-bit flit payloads
  function automatic void pack(int unsigned words[], bit hits[], int idxs[],
                               output longint unsigned flits[]);
    bit bits[$];
    int nf;
    foreach (words[w]) begin
      if (hits[w]) begin
        bits.push_back(1'b1);
        for (int b = 0; b < 3; b++) bits.push_back(idxs[w][b]);
      end else begin
        bits.push_back(1'b0);
        for (int b = 0; b < 32; b++) bits.push_back(words[w][b]);
      end
    end
    nf = (bits.size() + 63) / 64;
    flits = new[nf];
    for (int f = 0; f < nf; f++) begin
      flits[f] = 0;
      for (int b = 0; b < 64; b++)
        if (f * 64 + b < bits.size() && bits[f * 64 + b]) flits[f][b] = 1'b1;
    end
  endfunction

  // a value from a skewed alphabet: a few frequent values and rare others
  function automatic int unsigned pick_value(int unsigned fv_set, int pct_frequent);
    if (int'($urandom_range(99)) < pct_frequent)
      return fv_set * 32'h0101_0000 + $urandom_range(5);
    return $urandom();
  endfunction

endpackage
