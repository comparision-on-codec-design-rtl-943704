// tb_ref_pkg: reference models used by the testbenches.
//
// Written from the definitions, not from the RTL structure: coupling cost is
// computed by classifying every adjacent line pair of two link words, the
// encoder decision by evaluating the cost of every allowed inversion and
// picking the one that is strictly cheaper than all others (no inversion when
// there is no such option), and Gray code by its bit-level definition.
package tb_ref_pkg;

  typedef logic [63:0] word_t;

  // Inversion codes: 0 none, 1 odd lines, 2 even lines, 3 all lines.
  function automatic word_t mask_of(int code, int w);
    word_t m = '0;
    for (int i = 0; i < w; i++)
      case (code)
        1: m[i] = (i % 2 == 1);
        2: m[i] = (i % 2 == 0);
        3: m[i] = 1'b1;
        default: m[i] = 1'b0;
      endcase
    return m;
  endfunction

  // Pair type between time t-1 (a) and t (b) for lines i, i+1: 1..4
  function automatic int pair_type(word_t a, word_t b, int i);
    logic s0 = a[i] ^ b[i];
    logic s1 = a[i+1] ^ b[i+1];
    if (s0 != s1) return 1;
    if (!s0) return 4;
    // both switch: opposite directions when the new values differ
    return (b[i] != b[i+1]) ? 2 : 3;
  endfunction

  // Coupling activity T1 + 2*T2 between two consecutive words
  function automatic int coupling_cost(word_t a, word_t b, int w);
    int c = 0;
    for (int i = 0; i < w - 1; i++) begin
      int t = pair_type(a, b, i);
      if (t == 1) c += 1;
      else if (t == 2) c += 2;
    end
    return c;
  endfunction

  // Number of 0->1 transitions
  function automatic int rise_count(word_t a, word_t b, int w);
    int c = 0;
    for (int i = 0; i < w; i++) c += int'(!a[i] && b[i]);
    return c;
  endfunction

  // Encoder decision of a scheme (1, 2, 3) for raw word cur after prev.
  function automatic int best_code(int scheme, word_t prev, word_t cur, int w);
    int cand[$];
    int cost[4];
    int best;
    cand.push_back(0);
    cand.push_back(1);
    if (scheme >= 2) cand.push_back(3);
    if (scheme >= 3) cand.push_back(2);
    foreach (cand[k]) cost[cand[k]] = coupling_cost(prev, cur ^ mask_of(cand[k], w), w);
    best = 0;
    foreach (cand[k]) begin
      bit strict = 1;
      foreach (cand[j]) if (j != k && cost[cand[j]] <= cost[cand[k]]) strict = 0;
      if (strict) best = cand[k];
    end
    return best;
  endfunction

  function automatic word_t to_gray(word_t b, int w);
    word_t g = '0;
    for (int i = 0; i < w; i++) g[i] = b[i] ^ ((i + 1 < w) ? b[i+1] : 1'b0);
    return g;
  endfunction

  function automatic word_t from_gray(word_t g, int w);
    word_t b = '0;
    for (int i = 0; i < w; i++) begin
      logic x = 1'b0;
      for (int j = i; j < w; j++) x ^= g[j];
      b[i] = x;
    end
    return b;
  endfunction

  function automatic word_t rand_word(int w);
    word_t r = {$urandom, $urandom};
    return r & ((w >= 64) ? '1 : ((word_t'(1) << w) - 1));
  endfunction

endpackage
