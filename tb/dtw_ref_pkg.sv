// dtw_ref_pkg: reference model and pattern storage for the DTW testbenches.
//
// pat_a / pat_b hold the reference and test patterns (frame index 1..,
// element 0..). dtw_ref() computes the symmetric P = 1 DTW distance with the
// adjustment window |i-j| <= r by plain dynamic programming over the whole
// I x J grid, with S(1,1) = 2 d(1,1) and every point outside the grid or
// the window unreachable. It returns -1 when (I,J) cannot be reached.
package dtw_ref_pkg;

  localparam int MAXF = 256;
  localparam int MAXL = 32;

  byte   pat_a [MAXF][MAXL];
  byte   pat_b [MAXF][MAXL];
  longint g    [MAXF][MAXF];

  localparam longint INF = 64'h7fff_ffff_ffff;

  function automatic longint ldist(int i, int j, int l);
    longint s = 0;
    for (int e = 0; e < l; e++) begin
      longint df = longint'(pat_a[i][e]) - longint'(pat_b[j][e]);
      s += df * df;
    end
    return s;
  endfunction

  function automatic longint gat(int i, int j, int r);
    if (i < 1 || j < 1) return INF;
    if (i - j > r || j - i > r) return INF;
    return g[i][j];
  endfunction

  function automatic longint mn(longint x, longint y);
    return (x < y) ? x : y;
  endfunction

  function automatic longint dtw_ref(int ni, int nj, int r, int l);
    for (int i = 1; i <= ni; i++)
      for (int j = 1; j <= nj; j++) begin
        if (i - j > r || j - i > r) begin
          g[i][j] = INF;
        end else if (i == 1 && j == 1) begin
          g[i][j] = 2 * ldist(1, 1, l);
        end else begin
          longint d = ldist(i, j, l);
          longint ca = INF, cb = INF, cc = INF;
          if (gat(i-1, j-2, r) < INF) ca = gat(i-1, j-2, r) + 2 * ldist(i, j-1, l) + d;
          if (gat(i-1, j-1, r) < INF) cb = gat(i-1, j-1, r) + 2 * d;
          if (gat(i-2, j-1, r) < INF) cc = gat(i-2, j-1, r) + 2 * ldist(i-1, j, l) + d;
          g[i][j] = mn(ca, mn(cb, cc));
        end
      end
    if (ni - nj > r || nj - ni > r) return -1;
    return (g[ni][nj] >= INF) ? -1 : g[ni][nj];
  endfunction

  // Fill both patterns with random elements in [-amp, amp).
  function automatic void fill_random(int amp);
    for (int f = 0; f < MAXF; f++)
      for (int e = 0; e < MAXL; e++) begin
        pat_a[f][e] = byte'(int'($urandom_range(2 * amp - 1)) - amp);
        pat_b[f][e] = byte'(int'($urandom_range(2 * amp - 1)) - amp);
      end
  endfunction

endpackage
