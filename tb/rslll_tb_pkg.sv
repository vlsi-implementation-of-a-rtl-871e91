// rslll_tb_pkg: test-bench helpers for the RS-LLL unit (4 x 4 complex).
// Generates random channel matrices G with i.i.d. complex Gaussian entries
// (Box-Muller on $urandom), computes their QR decomposition by modified
// Gram-Schmidt in floating point (optionally sorted: at each step the
// remaining column of least norm is taken next, as in SQRD), quantises Q and R to the Q4.12 data format,
// and checks a reduction result against the input:
//   - T is unimodular: its determinant, computed exactly over the Gaussian
//     integers, is 1, -1, j or -j,
//   - Q~ R~ equals Q R T to within the fixed-point error of the rotations,
//   - Q~ has orthonormal columns, R~ has a non-negative real diagonal,
//   - without early termination, the Siegel condition eps*R(k-1,k-1)^2 < R(k,k)^2
//     holds exactly (in the integers) for every k.
package rslll_tb_pkg;
  import rslll_pkg::*;

  localparam int N = 4;
  localparam real SCALE = real'(1 << FRAC);
  localparam int  DMAX  = (1 << (W - 1)) - 1;

  typedef int  imat_t [N][N];

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(999999)) + 1.0) / 1000001.0;
    u2 = real'($urandom_range(999999)) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  // random G, G = Q R, quantised. mix > 0 adds mix times each column to the
  // next one (badly conditioned lattices, more swaps); the matrix is then
  // scaled down, if needed, so that no column norm exceeds 4.
  task automatic gen_qr(input real mix, output imat_t qr, output imat_t qi,
                        output imat_t rr, output imat_t ri, input bit sorted = 0);
    real gr [N][N], gi [N][N], ar [N][N], ai [N][N], fr [N][N], fi [N][N];
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        gr[r][c] = gauss() * 0.7071;
        gi[r][c] = gauss() * 0.7071;
      end
    // optional mixing: column c += mix * column c-1 (integer-like dependence)
    for (int c = 1; c < N; c++)
      for (int r = 0; r < N; r++) begin
        gr[r][c] += mix * gr[r][c-1];
        gi[r][c] += mix * gi[r][c-1];
      end
    // gain control: largest column norm at most 4 (half the data range)
    begin
      real mx, cn;
      mx = 0.0;
      for (int c = 0; c < N; c++) begin
        cn = 0.0;
        for (int r = 0; r < N; r++) cn += gr[r][c] * gr[r][c] + gi[r][c] * gi[r][c];
        if ($sqrt(cn) > mx) mx = $sqrt(cn);
      end
      if (mx > 4.0)
        for (int r = 0; r < N; r++)
          for (int c = 0; c < N; c++) begin
            gr[r][c] *= 4.0 / mx;
            gi[r][c] *= 4.0 / mx;
          end
    end
    ar = gr; ai = gi;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin fr[r][c] = 0.0; fi[r][c] = 0.0; end
    for (int k = 0; k < N; k++) begin
      real nrm;
      // sorted QR (SQRD): bring the remaining column of least norm to position k
      if (sorted) begin
        int  best;
        real bn, cn, tmp;
        best = k; bn = 1.0e30;
        for (int c = k; c < N; c++) begin
          cn = 0.0;
          for (int r = 0; r < N; r++) cn += ar[r][c] * ar[r][c] + ai[r][c] * ai[r][c];
          if (cn < bn) begin bn = cn; best = c; end
        end
        if (best != k) begin
          for (int r = 0; r < N; r++) begin
            tmp = ar[r][k]; ar[r][k] = ar[r][best]; ar[r][best] = tmp;
            tmp = ai[r][k]; ai[r][k] = ai[r][best]; ai[r][best] = tmp;
          end
          for (int r = 0; r < k; r++) begin
            tmp = fr[r][k]; fr[r][k] = fr[r][best]; fr[r][best] = tmp;
            tmp = fi[r][k]; fi[r][k] = fi[r][best]; fi[r][best] = tmp;
          end
        end
      end
      nrm = 0.0;
      for (int r = 0; r < N; r++) nrm += ar[r][k] * ar[r][k] + ai[r][k] * ai[r][k];
      nrm = $sqrt(nrm);
      fr[k][k] = nrm;
      for (int r = 0; r < N; r++) begin ar[r][k] /= nrm; ai[r][k] /= nrm; end
      for (int j = k + 1; j < N; j++) begin
        real pr, pi;
        pr = 0.0; pi = 0.0;
        for (int r = 0; r < N; r++) begin    // q_k^H a_j
          pr += ar[r][k] * ar[r][j] + ai[r][k] * ai[r][j];
          pi += ar[r][k] * ai[r][j] - ai[r][k] * ar[r][j];
        end
        fr[k][j] = pr; fi[k][j] = pi;
        for (int r = 0; r < N; r++) begin
          ar[r][j] -= pr * ar[r][k] - pi * ai[r][k];
          ai[r][j] -= pr * ai[r][k] + pi * ar[r][k];
        end
      end
    end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        qr[r][c] = int'($floor(ar[r][c] * SCALE + 0.5));
        qi[r][c] = int'($floor(ai[r][c] * SCALE + 0.5));
        rr[r][c] = (r <= c) ? int'($floor(fr[r][c] * SCALE + 0.5)) : 0;
        ri[r][c] = (r <  c) ? int'($floor(fi[r][c] * SCALE + 0.5)) : 0;
        if (rr[r][c] > DMAX) rr[r][c] = DMAX;
        if (rr[r][c] < -DMAX) rr[r][c] = -DMAX;
        if (ri[r][c] > DMAX) ri[r][c] = DMAX;
        if (ri[r][c] < -DMAX) ri[r][c] = -DMAX;
      end
  endtask

  // exact determinant over the Gaussian integers (Laplace expansion)
  function automatic void det_rec(input imat_t tr, input imat_t ti, input int n,
                                  input int rows [N], input int cols [N],
                                  output longint dr, output longint di);
    if (n == 1) begin
      dr = longint'(tr[rows[0]][cols[0]]);
      di = longint'(ti[rows[0]][cols[0]]);
      return;
    end
    dr = 0; di = 0;
    for (int c = 0; c < n; c++) begin
      int sr [N], sc [N];
      longint mr, mi, er, ei, pr, pi;
      for (int r = 1; r < n; r++) sr[r-1] = rows[r];
      for (int cc = 0, m = 0; cc < n; cc++) if (cc != c) begin sc[m] = cols[cc]; m++; end
      for (int r = n - 1; r < N; r++) begin sr[r] = 0; sc[r] = 0; end
      det_rec(tr, ti, n - 1, sr, sc, mr, mi);
      er = longint'(tr[rows[0]][cols[c]]);
      ei = longint'(ti[rows[0]][cols[c]]);
      pr = er * mr - ei * mi;
      pi = er * mi + ei * mr;
      if (c % 2 == 0) begin dr += pr; di += pi; end
      else            begin dr -= pr; di -= pi; end
    end
  endfunction

  // returns the number of failed checks; adds the number of checks made to nchk
  function automatic int check_result(
      input imat_t q0r, input imat_t q0i, input imat_t r0r, input imat_t r0i,
      input imat_t qr,  input imat_t qi,  input imat_t rr,  input imat_t ri,
      input imat_t tr,  input imat_t ti,  input bit et, input int eps_shift,
      input string tag, inout int nchk, output real relerr);
    int fails = 0;
    int rows [N], cols [N];
    longint dr, di;
    real br [N][N], bi [N][N], num, den, orth;
    for (int i = 0; i < N; i++) begin rows[i] = i; cols[i] = i; end
    // unimodular T
    det_rec(tr, ti, N, rows, cols, dr, di);
    nchk++;
    if (!((dr == 1 || dr == -1) && di == 0) && !((di == 1 || di == -1) && dr == 0)) begin
      fails++; $display("%s: det(T) = %0d, %0dj", tag, dr, di);
    end
    // Q R T against Q~ R~
    num = 0.0; den = 0.0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        real xr, xi, yr, yi;
        xr = 0.0; xi = 0.0; yr = 0.0; yi = 0.0;
        for (int m = 0; m < N; m++) begin
          // (Q R)(r,m) * T(m,c)
          real gr_, gi_;
          gr_ = 0.0; gi_ = 0.0;
          for (int l = 0; l < N; l++) begin
            gr_ += real'(q0r[r][l]) * real'(r0r[l][m]) - real'(q0i[r][l]) * real'(r0i[l][m]);
            gi_ += real'(q0r[r][l]) * real'(r0i[l][m]) + real'(q0i[r][l]) * real'(r0r[l][m]);
          end
          xr += gr_ * real'(tr[m][c]) - gi_ * real'(ti[m][c]);
          xi += gr_ * real'(ti[m][c]) + gi_ * real'(tr[m][c]);
          yr += real'(qr[r][m]) * real'(rr[m][c]) - real'(qi[r][m]) * real'(ri[m][c]);
          yi += real'(qr[r][m]) * real'(ri[m][c]) + real'(qi[r][m]) * real'(rr[m][c]);
        end
        num += (xr - yr) * (xr - yr) + (xi - yi) * (xi - yi);
        den += xr * xr + xi * xi;
      end
    relerr = $sqrt(num / den);
    nchk++;
    if (relerr > 0.03) begin fails++; $display("%s: |QRT - Q~R~|/|QRT| = %f", tag, relerr); end
    // orthonormal Q~
    orth = 0.0;
    for (int a = 0; a < N; a++)
      for (int b = 0; b < N; b++) begin
        real pr, pi, e;
        pr = 0.0; pi = 0.0;
        for (int r = 0; r < N; r++) begin
          pr += real'(qr[r][a]) * real'(qr[r][b]) + real'(qi[r][a]) * real'(qi[r][b]);
          pi += real'(qr[r][a]) * real'(qi[r][b]) - real'(qi[r][a]) * real'(qr[r][b]);
        end
        pr /= SCALE * SCALE; pi /= SCALE * SCALE;
        e = $sqrt((pr - (a == b ? 1.0 : 0.0)) ** 2 + pi * pi);
        if (e > orth) orth = e;
      end
    nchk++;
    if (orth > 0.05) begin fails++; $display("%s: Q~ not orthonormal (%f)", tag, orth); end
    // triangular R~ with real non-negative diagonal
    for (int k = 0; k < N; k++) begin
      nchk++;
      if (rr[k][k] < 0 || ri[k][k] != 0) begin fails++; $display("%s: R~(%0d,%0d) not real >= 0", tag, k, k); end
    end
    // Siegel condition after a regular end
    if (!et)
      for (int k = 1; k < N; k++) begin
        longint x, y;
        x = longint'(rr[k-1][k-1]);
        y = longint'(rr[k][k]);
        nchk++;
        if (((x * (x >>> eps_shift)) - y * y) >= 0) begin
          fails++; $display("%s: Siegel condition violated at k=%0d (%0d, %0d)", tag, k + 1, x, y);
        end
      end
    return fails;
  endfunction

endpackage
