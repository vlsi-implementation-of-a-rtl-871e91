// route_net: routing network between the memories, the multiplier array and the
// CORDIC of the RS-LLL core.
//
// Purely combinational. For the operation chosen by the controller (op) and the
// current column pair (kk-1, kk), 0-based, it selects the operands of the four
// complex multipliers, adds/subtracts their products and forms the element
// writes back into the R and Q memories. With w = c*exp(-j*phi) and s from the
// CORDIC, the 2x2 rotation applied to rows kk-1, kk of R is
//     [ w   s      ]          and Q is multiplied from the right by its
//     [ s  -conj(w)]          conjugate transpose,
// which nulls R(kk, kk-1) of the column-swapped matrix and leaves both diagonal
// entries real and non-negative.
//   OP_SIEGEL : multiplier m forms (x + jy)(eps*x + jy), x = R(m,m), y = R(m+1,m+1);
//               its real part eps*x^2 - y^2 >= 0 sets siegel_ok[m] (pair m, m+1
//               must be swapped). eps = 2^-eps_shift.
//   OP_SRED   : rows i < kk-1: R(i,kk-1) <- R(i,kk) - mu*R(i,kk-1), R(i,kk) <- R(i,kk-1)
//               (size reduction of r_k and column exchange in one step)
//   OP_PHASOR : w_out = c * phasor
//   OP_ROT_KK : the swapped columns kk-1, kk: new R(kk-1,kk-1) = Re(w*a_red + s*R(kk,kk)),
//               R(kk-1,kk) = w*R(kk-1,kk-1), R(kk,kk) = s*R(kk-1,kk-1); a_red is the
//               size-reduced R(kk-1,kk) from the divider
//   OP_ROT_R  : column j > kk of rows kk-1, kk of R
//   OP_ROT_Q  : row j of columns kk-1, kk of Q
// The operation set follows the document's mapping of Alg. 1 onto the units;
// the exact operand assignment is this design's own. Q is written at most two
// elements per cycle, so q_wr[2] and q_wr[3] stay disabled (all zero); they are
// kept so that both write buses have the same shape as the memories' ports.
module route_net
  import rslll_pkg::*;
#(
  parameter int MT    = 4,
  parameter int MR    = 4,
  parameter int NMULT = 4,
  parameter int NWP   = 4
) (
  input  op_e                   op,
  input  idx_t                  kk,
  input  idx_t                  j,
  input  logic [1:0]            eps_shift,
  input  cplx_t                 c_r      [MT][MT],
  input  cplx_t                 c_q      [MR][MT],
  input  mu_cplx_t              mu,
  input  cplx_t                 a_red,
  input  cplx_t                 w,
  input  data_t                 s,
  input  data_t                 c,
  input  cplx_t                 phasor,
  // multiplier array
  output cplx_t                 ma       [NMULT],
  output cplx_t                 mb       [NMULT],
  output logic                  mconj    [NMULT],
  input  cplx_t                 mp       [NMULT],
  input  logic signed [2*W+1:0] mp_re    [NMULT],
  // results
  output logic [MT-2:0]         siegel_ok,
  output cplx_t                 w_out,
  output wr_t                   r_wr     [NWP],
  output wr_t                   q_wr     [NWP]
);

  // static limits of this operand mapping
  if (MT - 1 > NMULT || 2 * (MT - 2) > NWP || NMULT < 4 || NWP < 3) begin : g_size_check
    $error("route_net: MT too large for NMULT/NWP");
  end

  function automatic cplx_t cadd(input cplx_t x, input cplx_t y, input logic sub);
    cplx_t z;
    logic signed [2*W+1:0] xr, xi, yr, yi;
    xr = (2*W+2)'(x.re); xi = (2*W+2)'(x.im);
    yr = (2*W+2)'(y.re); yi = (2*W+2)'(y.im);
    z.re = sat_data(sub ? xr - yr : xr + yr);
    z.im = sat_data(sub ? xi - yi : xi + yi);
    return z;
  endfunction

  function automatic cplx_t re_only(input data_t x);
    return '{re: x, im: '0};
  endfunction

  function automatic wr_t mkwr(input int row, input int col, input cplx_t d);
    return '{en: 1'b1, row: idx_t'(row), col: idx_t'(col), data: d};
  endfunction

  int k1, k2, jj;
  assign k1 = int'(kk) - 1;
  assign k2 = int'(kk);
  assign jj = int'(j);

  always_comb begin
    cplx_t muc, x, y;
    for (int m = 0; m < NMULT; m++) begin
      ma[m] = '0; mb[m] = '0; mconj[m] = 1'b0;
    end
    for (int p = 0; p < NWP; p++) begin
      r_wr[p] = '0; q_wr[p] = '0;
    end
    siegel_ok = '0;
    w_out     = mp[0];
    muc.re    = data_t'(mu.re) <<< FRAC;
    muc.im    = data_t'(mu.im) <<< FRAC;
    x = '0; y = '0;

    unique case (op)
      OP_SIEGEL: begin
        for (int m = 0; m < MT - 1; m++) begin
          ma[m] = '{re: c_r[m][m].re,                  im: c_r[m+1][m+1].re};
          mb[m] = '{re: c_r[m][m].re >>> eps_shift,    im: c_r[m+1][m+1].re};
          siegel_ok[m] = (mp_re[m] >= 0);
        end
      end
      OP_SRED: begin
        for (int i = 0; i < MT - 2; i++) begin
          if (i < k1) begin
            ma[i] = muc;
            mb[i] = c_r[i][k1];
            r_wr[2*i]   = mkwr(i, k1, cadd(c_r[i][k2], mp[i], 1'b1));
            r_wr[2*i+1] = mkwr(i, k2, c_r[i][k1]);
          end
        end
      end
      OP_PHASOR: begin
        ma[0] = phasor;
        mb[0] = re_only(c);
      end
      OP_ROT_KK: if (k1 >= 0 && k2 < MT) begin
        ma[0] = w;          mb[0] = a_red;
        ma[1] = re_only(s); mb[1] = re_only(c_r[k2][k2].re);
        ma[2] = w;          mb[2] = re_only(c_r[k1][k1].re);
        ma[3] = re_only(s); mb[3] = re_only(c_r[k1][k1].re);
        r_wr[0] = mkwr(k1, k1, cadd(mp[0], mp[1], 1'b0));
        r_wr[1] = mkwr(k1, k2, mp[2]);
        r_wr[2] = mkwr(k2, k2, mp[3]);
      end
      OP_ROT_R: if (k1 >= 0 && jj > k2 && jj < MT) begin
        x = c_r[k1][jj];
        y = c_r[k2][jj];
        ma[0] = x; mb[0] = w;
        ma[1] = y; mb[1] = re_only(s);
        ma[2] = x; mb[2] = re_only(s);
        ma[3] = y; mb[3] = w; mconj[3] = 1'b1;
        r_wr[0] = mkwr(k1, jj, cadd(mp[0], mp[1], 1'b0));
        r_wr[1] = mkwr(k2, jj, cadd(mp[2], mp[3], 1'b1));
      end
      OP_ROT_Q: if (k1 >= 0 && k2 < MT && jj < MR) begin
        x = c_q[jj][k1];
        y = c_q[jj][k2];
        ma[0] = x; mb[0] = w; mconj[0] = 1'b1;
        ma[1] = y; mb[1] = re_only(s);
        ma[2] = x; mb[2] = re_only(s);
        ma[3] = y; mb[3] = w;
        q_wr[0] = mkwr(jj, k1, cadd(mp[0], mp[1], 1'b0));
        q_wr[1] = mkwr(jj, k2, cadd(mp[2], mp[3], 1'b1));
      end
      default: ;
    endcase
  end

endmodule
