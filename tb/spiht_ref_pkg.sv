// spiht_ref_pkg - behavioural reference model of the fixed-order SPIHT
// encoder, used by the encoder testbenches.
//
// It works on 2-D coordinates only: the offspring of (x, y) are
// (2x, 2y), (2x, 2y+1), (2x+1, 2y), (2x+1, 2y+1), except for (0, 0); the
// four roots are the 2x2 low-pass corner. Descendant maxima are computed
// recursively, list membership is tracked with explicit per-coefficient and
// per-set flags plane by plane, exactly as the list-based algorithm with
// refinement first would do, and the bits of each (plane, unit, stream)
// are kept in a queue. Blocks are visited in the fixed order of the
// hardware: block p = the offspring of the node whose row and column are
// the odd and even bits of p; block p belongs to unit p mod NU.
package spiht_ref_pkg;

  class spiht_ref;
    int dim, nu;
    int coef[][];
    int md[][], ml[][];
    bit in_lip_lsp[][];   // coefficient is listed (LIP or LSP)
    bit d_listed[][];     // D set of the node is (or was) in the LIS
    bit q[16][4][3][$];   // bits per plane, unit, stream
    int gmax, nmax;
    int n_lbits_sig, n_dbits_sig, n_sign;

    function new(int d, int n);
      dim = d;
      nu  = n;
      coef = new[dim];
      md = new[dim];
      ml = new[dim];
      in_lip_lsp = new[dim];
      d_listed = new[dim];
      foreach (coef[i]) begin
        coef[i] = new[dim];
        md[i] = new[dim];
        ml[i] = new[dim];
        in_lip_lsp[i] = new[dim];
        d_listed[i] = new[dim];
      end
    endfunction

    static function int mag(int v);
      return v < 0 ? -v : v;
    endfunction

    function bit has_kids(int x, int y);
      return !(x == 0 && y == 0) && (2 * x < dim) && (2 * y < dim);
    endfunction

    // wavelet-like test image: large low-pass corner, magnitudes falling
    // by about 2x per finer level, some zero subtrees, random signs
    function void gen(int top_bits);
      for (int r = 0; r < dim; r++)
        for (int c = 0; c < dim; c++) begin
          int m, lvl, amp;
          m = (r > c) ? r : c;
          lvl = 0;
          while ((2 << lvl) <= m) lvl++;
          amp = (m < 2) ? (1 << top_bits) : (1 << (top_bits - 1 - lvl));
          if (amp < 2) amp = 2;
          if ($urandom_range(0, 5) == 0) coef[r][c] = 0;
          else coef[r][c] = int'($urandom_range(0, amp - 1));
          if ($urandom_range(0, 1) == 1) coef[r][c] = -coef[r][c];
        end
    endfunction

    function int rec_md(int x, int y);
      int m, l;
      m = 0;
      l = 0;
      if (has_kids(x, y))
        for (int k = 0; k < 4; k++) begin
          int cx, cy, dm;
          cx = 2 * x + k / 2;
          cy = 2 * y + k % 2;
          dm = rec_md(cx, cy);
          if (mag(coef[cx][cy]) > m) m = mag(coef[cx][cy]);
          if (dm > m) m = dm;
          if (dm > l) l = dm;
        end
      md[x][y] = m;
      ml[x][y] = l;
      return m;
    endfunction

    function void compute();
      gmax = 0;
      for (int x = 0; x < 2; x++)
        for (int y = 0; y < 2; y++) begin
          int dm;
          dm = rec_md(x, y);
          if (mag(coef[x][y]) > gmax) gmax = mag(coef[x][y]);
          if (dm > gmax) gmax = dm;
        end
      nmax = 0;
      while ((2 << nmax) <= gmax) nmax++;
    endfunction

    function void put(int n, int u, int s, bit b);
      q[n][u][s].push_back(b);
    endfunction

    // one full encode, plane by plane, blocks in fixed order
    function void encode();
      int nb;
      nb = dim * dim / 4;
      n_lbits_sig = 0;
      n_dbits_sig = 0;
      n_sign = 0;
      foreach (in_lip_lsp[i, j]) begin
        in_lip_lsp[i][j] = (i < 2 && j < 2);
        d_listed[i][j] = (i < 2 && j < 2) && has_kids(i, j);
      end
      if (gmax == 0) return;
      for (int n = nmax; n >= 0; n--) begin
        int th;
        th = 1 << n;
        for (int p = 0; p < nb; p++) begin
          int px, py, u;
          px = 0;
          py = 0;
          for (int b = 0; b < 16; b++) begin
            px |= ((p >> (2 * b + 1)) & 1) << b;
            py |= ((p >> (2 * b)) & 1) << b;
          end
          u = p % nu;
          // coefficients of the block: refinement or significance
          for (int k = 0; k < 4; k++) begin
            int cx, cy, m;
            cx = 2 * px + k / 2;
            cy = 2 * py + k % 2;
            m = mag(coef[cx][cy]);
            if (in_lip_lsp[cx][cy]) begin
              if (m >= 2 * th) put(n, u, 2, (m >> n) & 1);
              else begin
                put(n, u, 0, m >= th);
                if (m >= th) begin
                  put(n, u, 0, coef[cx][cy] < 0);
                  n_sign++;
                end
              end
            end
          end
          // sets of the block's nodes
          for (int k = 0; k < 4; k++) begin
            int cx, cy;
            cx = 2 * px + k / 2;
            cy = 2 * py + k % 2;
            if (d_listed[cx][cy]) begin
              if (md[cx][cy] < 2 * th) begin
                put(n, u, 1, md[cx][cy] >= th);
                if (md[cx][cy] >= th) n_dbits_sig++;
              end
              if (md[cx][cy] >= th) begin
                // offspring enter the lists (they are coded later in
                // this plane, in their own block)
                for (int j = 0; j < 4; j++)
                  in_lip_lsp[2 * cx + j / 2][2 * cy + j % 2] = 1;
                if (2 * cx < dim / 2 && 2 * cy < dim / 2 && ml[cx][cy] < 2 * th) begin
                  put(n, u, 1, ml[cx][cy] >= th);
                  if (ml[cx][cy] >= th) n_lbits_sig++;
                end
                if (ml[cx][cy] >= th)
                  for (int j = 0; j < 4; j++)
                    d_listed[2 * cx + j / 2][2 * cy + j % 2] = has_kids(2 * cx + j / 2, 2 * cy + j % 2);
              end
            end
          end
        end
      end
    endfunction

    // next 16-bit word of a stream, LSB first, zero padded at the end of
    // the plane; ok = 0 when the stream is used up
    function logic [15:0] next_word(int n, int u, int s, output bit ok);
      logic [15:0] w;
      w = '0;
      ok = (q[n][u][s].size() != 0);
      for (int i = 0; i < 16; i++)
        if (q[n][u][s].size() != 0) w[i] = q[n][u][s].pop_front();
      return w;
    endfunction

    function int words_left();
      int t;
      t = 0;
      for (int n = 0; n < 16; n++) for (int u = 0; u < 4; u++) for (int s = 0; s < 3; s++) t += (q[n][u][s].size() + 15) / 16;
      return t;
    endfunction
  endclass

endpackage
