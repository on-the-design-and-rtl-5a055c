// lz77_ref_pkg: testbench-side reference for the LZ77 compressor.
// gen_data makes a text-like byte stream (words from a small vocabulary,
// random bytes and runs of one byte); ref_step finds the longest match of
// the coding buffer in the searching buffer the way the hardware must
// (earliest position among equally long matches, matches may run into the
// coding buffer); decode rebuilds the input from the emitted codewords.
package lz77_ref_pkg;

  typedef byte unsigned bq_t[$];

  typedef struct {
    bit is_match;
    int ptr;
    int len;
    byte unsigned lit;
  } cw_t;

  function automatic bq_t gen_data(int n);
    string words[8] = '{"the ", "data ", "compress", "systolic ", "array ",
                        "buffer ", "LZ77 ", "lossless "};
    bq_t q;
    while (q.size() < n) begin
      int r = int'($urandom % 10);
      if (r < 6) begin
        string w = words[$urandom % 8];
        for (int k = 0; k < w.len(); k++) q.push_back(byte'(w[k]));
      end else if (r < 8) begin
        q.push_back(byte'($urandom));
      end else begin
        int rl = 1 + int'($urandom % 24);
        byte unsigned b = byte'(8'h30 + $urandom % 4);
        repeat (rl) q.push_back(b);
      end
    end
    while (q.size() > n) void'(q.pop_back());
    return q;
  endfunction

  // Deterministic text-like stream: words drawn with a skew towards the
  // start of a random vocabulary of nwords words (2 to 8 letters), so that
  // repeats lie both near and far back. The same seed gives the same stream.
  function automatic bq_t gen_text(int n, int nwords, int unsigned seed);
    bq_t q;
    string voc[$];
    int unsigned s = seed;
    for (int v = 0; v < nwords; v++) begin
      string w = "";
      int wl;
      s = s * 1664525 + 1013904223; wl = 2 + int'((s >> 16) % 7);
      for (int k = 0; k < wl; k++) begin
        s = s * 1664525 + 1013904223;
        w = {w, string'(byte'(8'h61 + (s >> 16) % 26))};
      end
      voc.push_back({w, " "});
    end
    while (q.size() < n) begin
      int unsigned a, b;
      string w;
      s = s * 1664525 + 1013904223; a = (s >> 8) % nwords;
      s = s * 1664525 + 1013904223; b = (s >> 8) % nwords;
      w = voc[(a * b) / nwords];
      for (int k = 0; k < w.len(); k++) q.push_back(byte'(w[k]));
    end
    while (q.size() > n) void'(q.pop_back());
    return q;
  endfunction

  // One codification step at input position i.
  function automatic cw_t ref_step(input bq_t d, int i, int N, int M, int CW_SYMS);
    cw_t c;
    int cl = (d.size() - i < M) ? d.size() - i : M;
    int ep = 0, el = 0;
    for (int p = 0; p < N; p++) begin
      int a = i - N + p;
      int l = 0;
      if (a < 0) continue;
      while (l < cl && d[a+l] == d[i+l]) l++;
      if (l > el) begin el = l; ep = p; end
    end
    c.lit = d[i];
    c.is_match = (el > CW_SYMS);
    c.ptr = c.is_match ? ep : 0;
    c.len = el;
    return c;
  endfunction

  function automatic bq_t decode(input cw_t cws[$], int N);
    bq_t o;
    foreach (cws[k]) begin
      if (cws[k].is_match) begin
        int src = o.size() - (N - cws[k].ptr);
        for (int j = 0; j < cws[k].len; j++) o.push_back(o[src + j]);
      end else begin
        o.push_back(cws[k].lit);
      end
    end
    return o;
  endfunction

endpackage
