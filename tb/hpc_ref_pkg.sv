// hpc_ref_pkg: reference model of the 2-D Hamming product code for the
// testbenches. It is written independently of the RTL: check bits are
// computed one check bit at a time as the parity of the data bits whose
// matrix column has a one in that row, and correction is modelled a whole
// pass at a time rather than cycle by cycle.
package hpc_ref_pkg;

  class hpc_ref #(int unsigned N = 7, int unsigned R = 4);
    typedef logic [0:N-1] line_t;
    typedef logic [0:R-1] chk_t;
    typedef line_t        win_t [N];
    typedef chk_t         chks_t [N];
    typedef logic [0:N*R-1] h_t;

    static function chk_t enc(h_t h, line_t d);
      chk_t c;
      for (int b = 0; b < R; b++) begin
        c[b] = 1'b0;
        for (int j = 0; j < N; j++) c[b] = c[b] ^ (d[j] & h[j*R + b]);
      end
      return c;
    endfunction

    // single-error correction of one line; returns the error mask
    static function line_t sec(h_t h, line_t d, chk_t ref_c, output bit det, output bit unc);
      chk_t  s;
      line_t e;
      s   = enc(h, d) ^ ref_c;
      det = (s != '0);
      e   = '0;
      unc = det;
      if (det) begin
        for (int j = 0; j < N; j++) begin
          if (unc && s == h[j*R +: R]) begin
            e[j] = 1'b1;
            unc  = 1'b0;
          end
        end
      end
      return e;
    endfunction

    static function line_t get_col(win_t w, int j);
      line_t c;
      for (int i = 0; i < N; i++) c[i] = w[i][j];
      return c;
    endfunction

    static function void encode(h_t h, win_t w, output chks_t rc, output chks_t cc);
      for (int k = 0; k < N; k++) begin
        rc[k] = enc(h, w[k]);
        cc[k] = enc(h, get_col(w, k));
      end
    endfunction

    // one half pass; returns the number of repaired lines
    static function int half_pass(h_t h, inout win_t w, input chks_t rc, input chks_t cc,
                                  input bit col, output bit clean, inout line_t dirty);
      int    fixes;
      bit    det, unc;
      line_t e;
      fixes = 0;
      clean = 1;
      for (int k = 0; k < N; k++) begin
        if (!col) begin
          e = sec(h, w[k], rc[k], det, unc);
          w[k] = w[k] ^ e;
          if (det && !unc) dirty[k] = 1'b1;
        end else begin
          e = sec(h, get_col(w, k), cc[k], det, unc);
          for (int i = 0; i < N; i++) w[i][k] = w[i][k] ^ e[i];
          if (det && !unc) dirty = dirty | e;
        end
        if (det) clean = 0;
        if (det && !unc) fixes++;
      end
      return fixes;
    endfunction

    static function bit consistent(h_t h, win_t w, chks_t rc, chks_t cc);
      for (int k = 0; k < N; k++) begin
        if (enc(h, w[k]) != rc[k]) return 0;
        if (enc(h, get_col(w, k)) != cc[k]) return 0;
      end
      return 1;
    endfunction

    // iterative correction with the stopping rules of the controller
    static function void iterate(h_t h, inout win_t w, input chks_t rc, input chks_t cc,
                                 input bit col_first, input int max_hp,
                                 output bit success, output bit uncorr, output int hp,
                                 output int fixes, output line_t dirty);
      bit col, clean, prev_clean, prev_fixed;
      int f;
      col = col_first; prev_clean = 0; prev_fixed = 1;
      success = 0; uncorr = 0; hp = 0; fixes = 0; dirty = '0;
      forever begin
        f = half_pass(h, w, rc, cc, col, clean, dirty);
        fixes += f;
        hp++;
        if (clean && prev_clean) begin success = 1; return; end
        if ((!clean && f == 0 && !prev_fixed) || hp >= max_hp) begin uncorr = 1; return; end
        prev_clean = clean; prev_fixed = (f != 0); col = !col;
      end
    endfunction

    // a parity matrix for any N and R: the first N values with at least two
    // ones (so no data column looks like a single check bit)
    static function h_t make_h();
      h_t h;
      int j, v;
      j = 0; v = 3;
      while (j < N) begin
        if ($countones(v) >= 2) begin
          h[j*R +: R] = v[R-1:0];
          j++;
        end
        v++;
      end
      return h;
    endfunction

    static function void rand_win(output win_t w);
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) w[i][j] = 1'($urandom_range(0, 1));
    endfunction

    // flip n distinct random bits
    static function void inject(inout win_t w, input int n);
      bit taken [N*N];
      int p;
      for (int k = 0; k < N*N; k++) taken[k] = 0;
      for (int k = 0; k < n; k++) begin
        do p = $urandom_range(0, N*N-1); while (taken[p]);
        taken[p] = 1;
        w[p / N][p % N] = !w[p / N][p % N];
      end
    endfunction
  endclass

endpackage
