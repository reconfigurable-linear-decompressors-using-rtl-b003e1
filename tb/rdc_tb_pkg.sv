// rdc_tb_pkg: test-side model of the reconfigurable linear decompressor and
// of the off-chip procedure that computes its inputs.
//
// class test_cube holds one test cube (specified bits per shift cycle and
// chain) and solves it for the decompressor:
//   * sge() is symbolic Gaussian elimination. Every matrix entry is a Boolean
//     function of the configuration bits, stored as one bit per minterm
//     (2^C bits), so row operations are bitwise AND and XOR on those vectors.
//     The pivot of a column is the entry with the most minterms in common with
//     the pivots chosen so far (with the most minterms, for the first column);
//     every other row r is XORed with the pivot row ANDed with r's entry in the
//     pivot column. Where that pivot is 0 for some configurations, further
//     pivots are taken in the same column for those configurations only, so
//     the elimination is complete for every configuration; pv[r] records for
//     which configurations row r is pivoted. A row that is not pivoted is all
//     zero afterwards, so the cube is solvable exactly for the configurations
//     in the AND over all rows of (pv[r] | ~y[r]).
//     The network is combinational, so the variables of one shift cycle only
//     reach the scan cells loaded in that cycle: the elimination runs cycle by
//     cycle and the per-cycle conditions are ANDed.
//   * nch < B models a decompressor fed by fewer channels: the variables of
//     channels nch..B-1 are held at 0.
//   * solve_with(m) is ordinary Gaussian elimination under one configuration; it
//     also produces the free variables for every cycle (unconstrained ones
//     random).
// The connection formula and the multiplexer wiring are rebuilt here from
// their definitions, independently of the RTL.
package rdc_tb_pkg;

  class test_cube #(int B = 32, int N = 1024, int M = 4, int C = 8, int T = 7,
                    int LMAX = 128, int RMAX = 64);
    localparam int G  = C / $clog2(M);
    localparam int NM = 1 << C;
    typedef logic [NM-1:0] fn_t;

    int           len;
    int           nspec;
    int           nch = B;            // channels in use; the others stay 0
    logic [N-1:0] spec [LMAX];
    logic [N-1:0] val  [LMAX];
    logic [B-1:0] x    [LMAX];
    logic [C-1:0] cfg;

    static logic [B-1:0] row [N];
    static fn_t          selk [G][M];
    static bit           ready = 1'b0;
    static fn_t          F [RMAX][B];
    static fn_t          Y [RMAX];

    static function void build();
      for (int j = 0; j < N; j++) begin
        logic [31:0] s = j * 32'd2654435761 + 32'd1;
        int n = 0;
        row[j] = '0;
        while (n < T) begin
          int unsigned k;
          s = s * 32'd1664525 + 32'd1013904223;
          k = int'(s[31:16]) % B;
          if (row[j][k] == 1'b0) begin row[j][k] = 1'b1; n++; end
        end
      end
      for (int g = 0; g < G; g++)
        for (int k = 0; k < M; k++)
          for (int m = 0; m < NM; m++)
            selk[g][k][m] = (((m >> ($clog2(M) * g)) & (M - 1)) == k);
      ready = 1'b1;
    endfunction

    static function int src_of(int c, int k);
      return (c + k * (N / M)) % N;
    endfunction

    // network row that reaches chain c under configuration m
    static function logic [B-1:0] row_for(int c, int m);
      return row[src_of(c, (m >> ($clog2(M) * (c % G))) & (M - 1))];
    endfunction

    function new(int l, int pct100);
      if (!ready) build();
      len = l;
      for (int t = 0; t < LMAX; t++) begin spec[t] = '0; val[t] = '0; x[t] = '0; end
      // pct100: specified bits in hundredths of a percent of all scan cells
      for (int i = 0; i < (pct100 * N * l) / 10000; i++) begin
        int t = $urandom % l, c = $urandom % N;
        if ($countones(spec[t]) < RMAX) begin
          spec[t][c] = 1'b1; val[t][c] = 1'($urandom);
        end
      end
      nspec = 0;
      for (int t = 0; t < l; t++) nspec += $countones(spec[t]);
      cfg = '0;
    endfunction

    function fn_t sge_cycle(int t, fn_t prior);
      int  R = 0;
      fn_t pv [RMAX];
      fn_t pset = prior, cond = {NM{1'b1}};
      for (int c = 0; c < N; c++) begin
        if (spec[t][c]) begin
          for (int j = 0; j < B; j++) begin
            fn_t f = '0;
            for (int k = 0; k < M; k++)
              if (row[src_of(c, k)][j] && j < nch) f |= selk[c % G][k];
            F[R][j] = f;
          end
          Y[R]  = {NM{val[t][c]}};
          pv[R] = '0;
          R++;
        end
      end
      for (int j = 0; j < B; j++) begin
        fn_t covered = '0;
        bit  first   = 1'b1;
        for (int pass = 0; pass < R; pass++) begin
          int  best = -1, bscore = 0;
          fn_t e;
          for (int r = 0; r < R; r++) begin
            int sc = $countones(F[r][j] & ~pv[r] & ~covered & pset);
            if (sc > bscore) begin best = r; bscore = sc; end
          end
          if (best < 0)
            for (int r = 0; r < R; r++) begin
              int sc = $countones(F[r][j] & ~pv[r] & ~covered);
              if (sc > bscore) begin best = r; bscore = sc; end
            end
          if (best < 0) break;
          e = F[best][j] & ~pv[best] & ~covered;
          if (first && (pset & e) != '0) pset &= e;
          first = 1'b0;
          for (int r = 0; r < R; r++) begin
            fn_t f = F[r][j] & e;
            if (r != best && f != '0) begin
              for (int jj = 0; jj < B; jj++) F[r][jj] ^= f & F[best][jj];
              Y[r] ^= f & Y[best];
            end
          end
          pv[best] |= e;
          covered  |= e;
        end
      end
      for (int r = 0; r < R; r++) cond &= pv[r] | ~Y[r];
      return cond;
    endfunction

    // configurations for which the whole cube can be produced
    function fn_t sge();
      fn_t cond = {NM{1'b1}};
      for (int t = 0; t < len; t++) cond &= sge_cycle(t, cond);
      return cond;
    endfunction

    function logic [B-1:0] chmask();
      logic [B-1:0] k;
      for (int i = 0; i < B; i++) k[i] = (i < nch);
      return k;
    endfunction

    function bit solve_cycle(int t, int m);
      logic [B-1:0] A [RMAX];
      bit           y [RMAX];
      int           pc [RMAX];
      int           R = 0, p = 0;
      logic [B-1:0] xv;
      for (int c = 0; c < N; c++)
        if (spec[t][c]) begin
          A[R] = row_for(c, m) & chmask(); y[R] = val[t][c]; R++;
        end
      for (int j = 0; j < B && p < R; j++) begin
        int s = -1;
        for (int r = p; r < R; r++) if (s < 0 && A[r][j]) s = r;
        if (s >= 0) begin
          logic [B-1:0] ta = A[s];
          bit           ty = y[s];
          A[s] = A[p]; y[s] = y[p]; A[p] = ta; y[p] = ty;
          for (int r = 0; r < R; r++)
            if (r != p && A[r][j]) begin A[r] ^= A[p]; y[r] ^= y[p]; end
          pc[p] = j;
          p++;
        end
      end
      for (int r = p; r < R; r++) if (y[r]) return 1'b0;
      for (int i = 0; i < B; i++) xv[i] = (i < nch) ? 1'($urandom) : 1'b0;
      for (int r = 0; r < p; r++) xv[pc[r]] = 1'b0;
      for (int r = 0; r < p; r++) xv[pc[r]] = y[r] ^ (^(A[r] & xv));
      x[t] = xv;
      return 1'b1;
    endfunction

    // ordinary Gaussian elimination under configuration m; on success the
    // free variables are in x[] and cfg is m
    function bit solve_with(int m);
      for (int t = 0; t < len; t++) if (!solve_cycle(t, m)) return 1'b0;
      cfg = C'(m);
      return 1'b1;
    endfunction

    // expected chain inputs of cycle t under the configuration in cfg
    function logic [N-1:0] expect_cycle(int t);
      logic [N-1:0] e;
      for (int c = 0; c < N; c++) e[c] = ^(x[t] & row_for(c, int'(cfg)));
      return e;
    endfunction
  endclass

endpackage
