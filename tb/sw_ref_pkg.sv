// sw_ref_pkg: software reference model for the testbenches.
//
// Computes the full Smith-Waterman matrix with affine gaps for a query and
// a reference, row by row, with the same score constants as the hardware,
// and keeps the quantities the hardware reports: per column the best H and
// the first row where it occurs; per row the best H and the first column;
// and the H and E of every cell (so a testbench can feed or check any
// column boundary).
package sw_ref_pkg;
  import dialign_pkg::*;

  class sw_model;
    int q_len, r_len;
    byte unsigned q[];
    byte unsigned r[];
    int h[][];      // h[j][i], j = 0..r_len, i = 0..q_len
    int e[][];
    int col_best[];
    int col_row[];
    int row_best[];
    int row_col[];

    function new(byte unsigned qs[], byte unsigned rs[]);
      q = qs;
      r = rs;
      q_len = qs.size();
      r_len = rs.size();
    endfunction

    function int imax(int a, int b);
      return (a > b) ? a : b;
    endfunction

    function void run();
      int f[];
      h = new[r_len + 1];
      e = new[r_len + 1];
      f = new[q_len + 1];
      col_best = new[q_len + 1];
      col_row  = new[q_len + 1];
      row_best = new[r_len + 1];
      row_col  = new[r_len + 1];
      for (int j = 0; j <= r_len; j++) begin
        h[j] = new[q_len + 1];
        e[j] = new[q_len + 1];
      end
      for (int i = 0; i <= q_len; i++) begin
        h[0][i] = 0;
        e[0][i] = NEG_INF;
        f[i] = NEG_INF;
        col_best[i] = 0;
        col_row[i] = 0;
      end
      for (int j = 1; j <= r_len; j++) begin
        h[j][0] = 0;
        e[j][0] = NEG_INF;
        row_best[j] = 0;
        row_col[j] = 0;
        for (int i = 1; i <= q_len; i++) begin
          int s, d;
          s = (q[i-1] == r[j-1]) ? MATCH_SCORE : MISMATCH_SCORE;
          e[j][i] = imax(h[j][i-1] - GAP_OPEN, e[j][i-1] - GAP_EXTEND);
          f[i]    = imax(h[j-1][i] - GAP_OPEN, f[i] - GAP_EXTEND);
          d       = h[j-1][i-1] + s;
          h[j][i] = imax(imax(0, d), imax(e[j][i], f[i]));
          if (h[j][i] > col_best[i]) begin
            col_best[i] = h[j][i];
            col_row[i]  = j;
          end
          if (h[j][i] > row_best[j]) begin
            row_best[j] = h[j][i];
            row_col[j]  = i;
          end
        end
      end
    endfunction
  endclass

  // Random sequence over a small alphabet, with a planted copy of the
  // query's prefix so that real alignments exist.
  function automatic void make_seqs(int qn, int rn, int alpha,
                                    output byte unsigned qs[], output byte unsigned rs[]);
    qs = new[qn];
    rs = new[rn];
    for (int i = 0; i < qn; i++) qs[i] = byte'(65 + int'($urandom_range(alpha - 1)));
    for (int j = 0; j < rn; j++) rs[j] = byte'(65 + int'($urandom_range(alpha - 1)));
    if (rn > 8 && qn > 4) begin
      int at, len;
      len = (qn < rn / 2) ? qn : rn / 2;
      at  = $urandom_range(rn - len);
      for (int k = 0; k < len; k++)
        if ($urandom_range(9) != 0) rs[at + k] = qs[k];
    end
  endfunction

endpackage
