// kmp_tb_pkg: reference functions for the KMP matcher testbenches.
//
// compute_next builds Knuth-Morris-Pratt's optimised jump table next[1..K]
// for a pattern (next[q] = 0: drop the character and restart at P[1]).
// count_matches counts the occurrences a matcher that restarts after each
// complete match must report: the leftmost occurrence, then the leftmost
// one starting after it ends, and so on, found by direct comparison.
// Patterns and texts are byte queues, index 0 holding P[1] / T[1].
package kmp_tb_pkg;

  typedef byte unsigned bytes_t[$];

  function automatic void compute_next(input bytes_t p, output int nxt[]);
    int m = p.size();
    int j = 1;
    int t = 0;
    nxt = new[m + 1];
    nxt[1] = 0;
    while (j < m) begin
      while (t > 0 && p[j-1] != p[t-1]) t = nxt[t];
      t++;
      j++;
      if (p[j-1] == p[t-1]) nxt[j] = nxt[t];
      else nxt[j] = t;
    end
  endfunction

  function automatic int count_matches(input bytes_t p, input bytes_t t);
    int n = 0;
    int i = 0;
    bit ok;
    while (i + p.size() <= t.size()) begin
      ok = 1;
      for (int k = 0; k < p.size(); k++) if (t[i+k] != p[k]) ok = 0;
      if (ok) begin
        n++;
        i += p.size();
      end else i++;
    end
    return n;
  endfunction

  // Fibonacci string over {a, b} (a, ab, aba, abaab, ...) of length m: the
  // worst case of KMP, with the longest chains of jumps.
  function automatic bytes_t fibonacci(input int m);
    bytes_t a = {8'h61};
    bytes_t b = {8'h61, 8'h62};
    bytes_t c;
    while (b.size() < m) begin
      c = b;
      b = {b, a};
      a = c;
    end
    return b[0:m-1];
  endfunction

endpackage
