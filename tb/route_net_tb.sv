// route_net_tb: self-checking test of the routing network together with the
// multiplier array it drives. For random matrix contents, column pairs and
// rotation coefficients every operation is applied, and the element writes it
// produces (found by address, whatever port carries them) are compared with a
// floating-point reference of the operation: exact for the Siegel decisions
// and the size reduction (integer mu), within 3 LSB for the rotations. The
// number of enabled writes must match as well.
module route_net_tb;
  import rslll_pkg::*;

  localparam int MT = 4, MR = 4, NMULT = 4, NWP = 4;
  localparam real SC = real'(1 << FRAC);

  op_e      op;
  idx_t     kk, j;
  logic [1:0] eps_shift;
  cplx_t    c_r [MT][MT], c_q [MR][MT];
  mu_cplx_t mu;
  cplx_t    a_red, w, phasor, w_out;
  data_t    s, c;
  cplx_t    ma [NMULT], mb [NMULT], mp [NMULT];
  logic     mconj [NMULT];
  logic signed [2*W+1:0] mp_re [NMULT];
  logic [MT-2:0] siegel_ok;
  wr_t      r_wr [NWP], q_wr [NWP];
  int checks = 0, failures = 0;

  route_net #(.MT(MT), .MR(MR), .NMULT(NMULT), .NWP(NWP)) dut (.*);
  cmult_array #(.NMULT(NMULT)) u_mult (.a(ma), .b(mb), .conj_b(mconj), .p(mp), .p_re_full(mp_re));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(input int lim);
    return $signed($urandom_range(2 * lim)) - lim;
  endfunction

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // expected writes
  int   ne;
  int   er [8], ec [8];
  real  evr [8], evi [8];
  bit   exact [8];

  task automatic expect_wr(input int r, input int cc, input real vr, input real vi, input bit ex);
    er[ne] = r; ec[ne] = cc; evr[ne] = vr; evi[ne] = vi; exact[ne] = ex; ne++;
  endtask

  task automatic compare(input wr_t wr [NWP], input string tag);
    int nen = 0;
    for (int p = 0; p < NWP; p++) if (wr[p].en) nen++;
    checks++;
    if (nen != ne) begin failures++; $display("%s: %0d writes, expected %0d", tag, nen, ne); end
    for (int e = 0; e < ne; e++) begin
      bit hit = 0;
      for (int p = 0; p < NWP; p++)
        if (wr[p].en && int'(wr[p].row) == er[e] && int'(wr[p].col) == ec[e]) begin
          real dr, di, tol;
          hit = 1;
          tol = exact[e] ? 0.0 : 3.0;
          dr = real'(wr[p].data.re) - evr[e];
          di = real'(wr[p].data.im) - evi[e];
          checks++;
          if (er[e] == ec[e]) di = 0.0;        // the memory keeps only the real part on the diagonal
          if (dr > tol || dr < -tol || di > tol || di < -tol) begin
            failures++;
            $display("%s: write (%0d,%0d) got %0d,%0d exp %f,%f", tag, er[e], ec[e], wr[p].data.re, wr[p].data.im, evr[e], evi[e]);
          end
        end
      checks++;
      if (!hit) begin failures++; $display("%s: no write to (%0d,%0d)", tag, er[e], ec[e]); end
    end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int k1, k2, mr, mi;
      real wr_, wi_, sv, ang;
      // random state
      for (int r = 0; r < MT; r++)
        for (int cc = 0; cc < MT; cc++)
          if (r == cc)     c_r[r][cc] = '{re: data_t'($urandom_range(4 << FRAC)), im: '0};
          else if (r < cc) c_r[r][cc] = '{re: data_t'(rnd(3 << FRAC)), im: data_t'(rnd(3 << FRAC))};
          else             c_r[r][cc] = '0;
      for (int r = 0; r < MR; r++)
        for (int cc = 0; cc < MT; cc++)
          c_q[r][cc] = '{re: data_t'(rnd(1 << FRAC)), im: data_t'(rnd(1 << FRAC))};
      k2 = $urandom_range(MT - 1, 1); k1 = k2 - 1;
      kk = idx_t'(k2);
      mr = rnd(3); mi = rnd(3);
      mu.re = mu_t'(mr); mu.im = mu_t'(mi);
      a_red = '{re: data_t'(rnd(2 << FRAC)), im: data_t'(rnd(2 << FRAC))};
      ang = real'($urandom_range(10000)) / 10000.0 * 6.2831853;
      sv  = real'($urandom_range(10000)) / 10000.0;
      wr_ = $sqrt(1.0 - sv * sv) * $cos(ang); wi_ = -$sqrt(1.0 - sv * sv) * $sin(ang);
      w = '{re: data_t'(int'(wr_ * SC)), im: data_t'(int'(wi_ * SC))};
      s = data_t'(int'(sv * SC));
      c = data_t'(int'($sqrt(1.0 - sv * sv) * SC));
      phasor = '{re: data_t'(int'($cos(ang) * SC)), im: data_t'(int'(-$sin(ang) * SC))};
      eps_shift = 2'($urandom_range(2, 1));
      j = '0;

      // Siegel
      op = OP_SIEGEL; #1;
      for (int m = 0; m < MT - 1; m++) begin
        longint x, y;
        x = longint'(c_r[m][m].re); y = longint'(c_r[m+1][m+1].re);
        checks++;
        if (siegel_ok[m] != ((x * (x >>> eps_shift) - y * y) >= 0)) begin
          failures++; $display("siegel m=%0d", m);
        end
      end
      checks++;
      if (r_wr[0].en || q_wr[0].en) begin failures++; $display("write during Siegel check"); end

      // size reduction + exchange
      op = OP_SRED; #1;
      ne = 0;
      for (int i = 0; i < k1; i++) begin
        expect_wr(i, k1, real'(c_r[i][k2].re) - (mr * real'(c_r[i][k1].re) - mi * real'(c_r[i][k1].im)),
                         real'(c_r[i][k2].im) - (mr * real'(c_r[i][k1].im) + mi * real'(c_r[i][k1].re)), 1);
        expect_wr(i, k2, real'(c_r[i][k1].re), real'(c_r[i][k1].im), 1);
      end
      compare(r_wr, "SRED");

      // phasor
      op = OP_PHASOR; #1;
      checks++;
      if (fabs(real'(w_out.re) - real'(c) * real'(phasor.re) / SC) > 1.0 ||
          fabs(real'(w_out.im) - real'(c) * real'(phasor.im) / SC) > 1.0) begin
        failures++; $display("phasor product");
      end

      // rotation of the swapped pair
      op = OP_ROT_KK; #1;
      ne = 0;
      begin
        real ar, ai, b, x;
        ar = real'(a_red.re); ai = real'(a_red.im); b = real'(c_r[k2][k2].re); x = real'(c_r[k1][k1].re);
        expect_wr(k1, k1, (real'(w.re) * ar - real'(w.im) * ai) / SC + real'(s) * b / SC, 0.0, 0);
        expect_wr(k1, k2, real'(w.re) * x / SC, real'(w.im) * x / SC, 0);
        expect_wr(k2, k2, real'(s) * x / SC, 0.0, 0);
      end
      compare(r_wr, "ROT_KK");

      // rotations right of the pair
      for (int jj = k2 + 1; jj < MT; jj++) begin
        real xr, xi, yr, yi, wrr, wii, ss;
        op = OP_ROT_R; j = idx_t'(jj); #1;
        ne = 0;
        xr = real'(c_r[k1][jj].re); xi = real'(c_r[k1][jj].im);
        yr = real'(c_r[k2][jj].re); yi = real'(c_r[k2][jj].im);
        wrr = real'(w.re) / SC; wii = real'(w.im) / SC; ss = real'(s) / SC;
        expect_wr(k1, jj, wrr * xr - wii * xi + ss * yr, wrr * xi + wii * xr + ss * yi, 0);
        expect_wr(k2, jj, ss * xr - (wrr * yr + wii * yi), ss * xi - (wrr * yi - wii * yr), 0);
        compare(r_wr, "ROT_R");
      end

      // rotations of Q
      for (int jj = 0; jj < MR; jj++) begin
        real xr, xi, yr, yi, wrr, wii, ss;
        op = OP_ROT_Q; j = idx_t'(jj); #1;
        ne = 0;
        xr = real'(c_q[jj][k1].re); xi = real'(c_q[jj][k1].im);
        yr = real'(c_q[jj][k2].re); yi = real'(c_q[jj][k2].im);
        wrr = real'(w.re) / SC; wii = real'(w.im) / SC; ss = real'(s) / SC;
        expect_wr(jj, k1, wrr * xr + wii * xi + ss * yr, wrr * xi - wii * xr + ss * yi, 0);
        expect_wr(jj, k2, ss * xr - (wrr * yr - wii * yi), ss * xi - (wrr * yi + wii * yr), 0);
        compare(q_wr, "ROT_Q");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
