// ismatch_ref_pkg: reference models used by the testbenches.
// lev_matrix fills the full Levenshtein matrix of a pattern (rows) against a
// window (columns) with the textbook recurrence; best_of_row picks the
// smallest value of the last row and the first column where it occurs.
package ismatch_ref_pkg;

  localparam int MAXN = 32;

  typedef int row_t [MAXN+1];
  typedef int mat_t [MAXN+1][MAXN+1];
  typedef byte unsigned str_t [MAXN];

  function automatic mat_t lev_matrix(str_t p, str_t s, int n);
    mat_t d;
    for (int i = 0; i <= n; i++) d[i][0] = i;
    for (int j = 0; j <= n; j++) d[0][j] = j;
    for (int i = 1; i <= n; i++)
      for (int j = 1; j <= n; j++) begin
        int c, m;
        c = (p[i-1] == s[j-1]) ? 0 : 1;
        m = d[i-1][j-1] + c;
        if (d[i-1][j] + 1 < m) m = d[i-1][j] + 1;
        if (d[i][j-1] + 1 < m) m = d[i][j-1] + 1;
        d[i][j] = m;
      end
    return d;
  endfunction

  // distance and length of the best prefix of s against the whole of p
  function automatic void best_of_row(str_t p, str_t s, int n,
                                      output int dst, output int len);
    mat_t d;
    d    = lev_matrix(p, s, n);
    dst = d[n][1];
    len  = 1;
    for (int j = 2; j <= n; j++)
      if (d[n][j] < dst) begin
        dst = d[n][j];
        len  = j;
      end
  endfunction

  function automatic byte unsigned dna(int unsigned r);
    case (r % 4)
      0: return "A";
      1: return "C";
      2: return "G";
      default: return "T";
    endcase
  endfunction

  // Step-level model of a validation scheme with levels 0..k (the occurrence
  // validation algorithm): one call per window position.
  class val_model;
    int k;
    bit busy [];
    int cnt  [];
    int clen [];
    int cidx [];
    int last_len;

    function new(int k_levels);
      k = k_levels;
      busy = new[k+1];
      cnt  = new[k+1];
      clen = new[k+1];
      cidx = new[k+1];
      foreach (busy[i]) begin
        busy[i] = 0; cnt[i] = 0; clen[i] = 0; cidx[i] = 0;
      end
      last_len = 0;
    endfunction

    function bit any_busy();
      foreach (busy[i]) if (busy[i]) return 1;
      return 0;
    endfunction

    // returns 1 when an occurrence is validated in this step
    function bit step(bit hit, int d, int len, int idx,
                      output int o_dist, output int o_len, output int o_idx,
                      output int n_discard, output int n_drop);
      bit hi;
      bit old_busy [];
      bit v;
      old_busy = busy;
      hi = 0;
      v = 0;
      n_discard = 0;
      n_drop = 0;
      o_dist = 0; o_len = 0; o_idx = 0;
      for (int i = 0; i <= k; i++) begin
        bit fin;
        fin = 0;
        if (old_busy[i]) begin
          int cn;
          cn = (cnt[i] == 65535) ? cnt[i] : cnt[i] + 1;
          cnt[i] = cn;
          if (!hi && (cn == clen[i] || (cn > clen[i] && cn > last_len + clen[i]))) begin
            v = 1; o_dist = i; o_len = clen[i]; o_idx = cidx[i];
            busy[i] = 0; fin = 1;
          end else if (!hi && cn > clen[i]) begin
            n_discard++;
            busy[i] = 0; fin = 1;
          end
        end
        if (hit && d == i) begin
          if (!hi && (!old_busy[i] || fin)) begin
            busy[i] = 1; cnt[i] = 0; clen[i] = len; cidx[i] = idx;
          end else n_drop++;
        end
        hi = hi | old_busy[i];
      end
      if (v) last_len = o_len;
      return v;
    endfunction
  endclass

endpackage
