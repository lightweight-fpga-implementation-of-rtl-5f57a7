// fips_ref_pkg: software reference of the four FIPS 140-2 tests and sample
// generators, used by the testbenches to work out expected results
// independently of the RTL.
//
// A sample is a dynamic array of bits. The reference follows the FIPS 140-2
// definitions directly: it counts ones, scans the whole sample for maximal
// runs, and for the poker test counts 4-bit blocks and evaluates
// X = (16/5000) * sum(n_i^2) - 5000 in floating point (scaled for other N).
package fips_ref_pkg;

  typedef bit sample_t [];

  function automatic int ref_ones(const ref sample_t s);
    int c = 0;
    foreach (s[i]) c += s[i];
    return c;
  endfunction

  function automatic bit ref_mono_pass(const ref sample_t s);
    int c = ref_ones(s);
    return (c > 9725) && (c < 10275);
  endfunction

  // counts[p][l]: runs of bit p with length l+1 (l = 5: six or more)
  function automatic void ref_runs(const ref sample_t s, output int counts [2][6],
                                   output int maxrun);
    int i = 0;
    foreach (counts[p, l]) counts[p][l] = 0;
    maxrun = 0;
    while (i < s.size()) begin
      int j = i;
      while (j < s.size() && s[j] == s[i]) j++;
      counts[s[i]][((j - i) > 6 ? 6 : (j - i)) - 1]++;
      if (j - i > maxrun) maxrun = j - i;
      i = j;
    end
  endfunction

  function automatic bit ref_runs_pass(const ref sample_t s);
    int counts [2][6];
    int mr;
    int lo [6] = '{2315, 1114, 527, 240, 103, 103};
    int hi [6] = '{2685, 1386, 723, 384, 209, 209};
    ref_runs(s, counts, mr);
    foreach (counts[p, l])
      if (!(counts[p][l] > lo[l] && counts[p][l] < hi[l])) return 0;
    return 1;
  endfunction

  function automatic bit ref_long_pass(const ref sample_t s);
    int counts [2][6];
    int mr;
    ref_runs(s, counts, mr);
    return mr < 26;
  endfunction

  function automatic longint ref_poker_sum(const ref sample_t s);
    longint n [16];
    longint sum = 0;
    foreach (n[i]) n[i] = 0;
    for (int b = 0; b + 3 < s.size(); b += 4)
      n[{s[b], s[b+1], s[b+2], s[b+3]}]++;
    foreach (n[i]) sum += n[i] * n[i];
    return sum;
  endfunction

  function automatic real ref_poker_x(const ref sample_t s);
    real nb = real'(s.size() / 4);
    return (16.0 / nb) * real'(ref_poker_sum(s)) - nb;
  endfunction

  function automatic bit ref_poker_pass(const ref sample_t s);
    real x = ref_poker_x(s);
    return (x > 2.16) && (x < 46.17);
  endfunction

  // --- generators -------------------------------------------------------

  function automatic sample_t gen_random(int n);
    sample_t s = new[n];
    foreach (s[i]) s[i] = 1'($urandom);
    return s;
  endfunction

  // Each bit is 1 with probability pct/1000.
  function automatic sample_t gen_biased(int n, int permille);
    sample_t s = new[n];
    foreach (s[i]) s[i] = ($urandom % 1000) < permille;
    return s;
  endfunction

  // Random sample whose ones count is exactly k (ones placed at random).
  function automatic sample_t gen_ones(int n, int k);
    sample_t s = new[n];
    int idx [] = new[n];
    foreach (idx[i]) idx[i] = i;
    idx.shuffle();
    foreach (s[i]) s[i] = 0;
    for (int i = 0; i < k; i++) s[idx[i]] = 1;
    return s;
  endfunction

  // Random sample with a run of `len` copies of `val` inserted at `pos`.
  function automatic sample_t gen_with_run(int n, int len, bit val, int pos);
    sample_t s = gen_random(n);
    for (int i = 0; i < len; i++) s[pos + i] = val;
    if (pos > 0) s[pos - 1] = !val;
    if (pos + len < n) s[pos + len] = !val;
    return s;
  endfunction

  // Random sample in which `k` blocks are forced to 4'b0110 and `k` to 4'b1001:
  // balanced in ones, mildly disturbing runs, strongly disturbing the poker X.
  function automatic sample_t gen_poker_skew(int n, int k);
    sample_t s = gen_random(n);
    for (int j = 0; j < 2 * k; j++) begin
      int b = 4 * ($urandom % (n / 4));
      logic [3:0] v = (j % 2 == 1) ? 4'b1001 : 4'b0110;
      for (int t = 0; t < 4; t++) s[b + t] = v[3 - t];
    end
    return s;
  endfunction

  // Periodic pattern, e.g. 4'b0011 repeated: passes monobit, fails runs.
  function automatic sample_t gen_pattern(int n, logic [3:0] pat);
    sample_t s = new[n];
    foreach (s[i]) s[i] = pat[3 - (i % 4)];
    return s;
  endfunction

  // Sample of n bits whose block counts give sum(n_i^2) == target exactly
  // (target must be even, since sum(n_i^2) has the parity of sum(n_i)).
  // Starts from near-uniform counts and moves single blocks between values
  // while that brings the sum no further from the target; blocks are then
  // placed in random order.
  function automatic sample_t gen_poker_sum(int n, longint target);
    int nb = n / 4;
    int cnt [16];
    int blocks [] = new[nb];
    longint sum = 0;
    int k = 0;
    sample_t s = new[n];
    foreach (cnt[i]) cnt[i] = nb / 16 + (i < nb % 16 ? 1 : 0);
    foreach (cnt[i]) sum += longint'(cnt[i]) * cnt[i];
    for (int it = 0; it < 1000000 && sum != target; it++) begin
      int a = $urandom % 16, b = $urandom % 16;
      longint d = 2 * (longint'(cnt[b]) - longint'(cnt[a]) + 1);
      if (a == b || cnt[a] == 0) continue;
      if ((sum + d - target) * (sum + d - target) <= (sum - target) * (sum - target)) begin
        cnt[a]--; cnt[b]++; sum += d;
      end
    end
    foreach (cnt[v]) for (int j = 0; j < cnt[v]; j++) blocks[k++] = v;
    blocks.shuffle();
    foreach (blocks[j]) for (int t = 0; t < 4; t++) s[4*j + t] = blocks[j][3 - t];
    return s;
  endfunction

endpackage
