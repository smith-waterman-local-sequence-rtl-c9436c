// Reference model for the testbenches: textbook Smith-Waterman with affine
// gaps (Gotoh form), written independently of the RTL.  A gap of length k
// costs gap_open + (k-1)*gap_ext.  Characters are 5-bit codes; code 0 never
// matches anything.
package sw_ref_pkg;

  typedef int unsigned chars_t[];

  // Best local-alignment score of query q against database d.
  function automatic int sw_best(chars_t q, chars_t d,
                                 int match, int mismatch, int gap_open, int gap_ext);
    int n = q.size();
    int hrow[] = new[n + 1];   // H(i-1, j)
    int frow[] = new[n + 1];   // F(i-1, j), vertical gap
    int best = 0;
    for (int j = 0; j <= n; j++) begin
      hrow[j] = 0;
      frow[j] = -1000000;
    end
    foreach (d[i]) begin
      int diag = 0;   // H(i-1, j-1)
      int left = 0;   // H(i, j-1)
      int e    = -1000000;
      for (int j = 1; j <= n; j++) begin
        int s, h, up;
        up = hrow[j];
        s  = (q[j-1] != 0 && q[j-1] == d[i]) ? match : -mismatch;
        e  = (e - gap_ext > left - gap_open) ? e - gap_ext : left - gap_open;
        frow[j] = (frow[j] - gap_ext > up - gap_open) ? frow[j] - gap_ext : up - gap_open;
        h  = diag + s;
        if (e > h) h = e;
        if (frow[j] > h) h = frow[j];
        if (h < 0) h = 0;
        diag    = up;
        hrow[j] = h;
        left    = h;
        if (h > best) best = h;
      end
    end
    return best;
  endfunction

  // Letters of a string to 5-bit codes (A=1 .. Z=26).
  function automatic chars_t from_string(string s);
    chars_t r = new[s.len()];
    foreach (r[i]) r[i] = int'(s[i]) - 64;
    return r;
  endfunction

  function automatic chars_t random_chars(int len, int alphabet);
    chars_t r = new[len];
    foreach (r[i]) r[i] = 1 + ($urandom % alphabet);
    return r;
  endfunction

endpackage
