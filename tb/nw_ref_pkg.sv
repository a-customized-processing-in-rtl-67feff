// nw_ref_pkg: reference Needleman-Wunsch model for the testbenches.
//
// Fills the full DP and direction matrices of Eq. (1) with the same
// boundary (DP(i,-1) = (i+1)*gap, DP(-1,j) = (j+1)*gap, DP(-1,-1) = 0) and
// the same tie order (diagonal, then North, then West) as the RTL, and
// offers helpers to pack 2-bit symbols 16 to a 32-bit word.
package nw_ref_pkg;

  typedef int int_da_t[];

  // dp and dir are row-major m x n.
  function automatic void nw_fill(input int a[], input int b[], input int match,
                                  input int mismatch, input int gap,
                                  output int dp[], output int dir[]);
    int m = a.size();
    int n = b.size();
    dp  = new[m * n];
    dir = new[m * n];
    for (int i = 0; i < m; i++) begin
      for (int j = 0; j < n; j++) begin
        int nw, no, we, t, best, d;
        nw = (i == 0) ? ((j == 0) ? 0 : j * gap) : ((j == 0) ? i * gap : dp[(i-1)*n + j-1]);
        no = (i == 0) ? (j + 1) * gap : dp[(i-1)*n + j];
        we = (j == 0) ? (i + 1) * gap : dp[i*n + j-1];
        t  = (a[i] == b[j]) ? match : mismatch;
        best = nw + t; d = 0;
        if (no + gap > best) begin best = no + gap; d = 1; end
        if (we + gap > best) begin best = we + gap; d = 2; end
        dp[i*n + j]  = best;
        dir[i*n + j] = d;
      end
    end
  endfunction

  // Word k of a sequence of 2-bit symbols, symbol e in bits [2e+1:2e].
  function automatic logic [31:0] pack_word(input int s[], input int k);
    logic [31:0] w = '0;
    for (int e = 0; e < 16; e++)
      if (k * 16 + e < s.size()) w[2*e +: 2] = 2'(s[k*16 + e]);
    return w;
  endfunction

  // Word k of a sequence of bits-wide symbols, 32 / bits symbols per word.
  function automatic logic [31:0] pack_word_w(input int s[], input int k, input int bits);
    logic [31:0] w = '0;
    int cpw = 32 / bits;
    for (int e = 0; e < cpw; e++)
      if (k * cpw + e < s.size())
        for (int x = 0; x < bits; x++) w[bits*e + x] = 1'((s[k*cpw + e] >> x) & 1);
    return w;
  endfunction

  // Word index of direction cell (i,j) with rows starting on a new word.
  function automatic int dir_word_index(input int i, input int j, input int n);
    return i * ((n + 15) / 16) + j / 16;
  endfunction

endpackage
