// cmult_array: the array of complex-valued multipliers of the RS-LLL data path.
//
// NMULT independent complex multipliers (four in the reference configuration)
// each compute p[i] = a[i] * b[i], or a[i] * conj(b[i]) when conj_b[i] is set.
// The full-precision real part of every product is brought out unscaled
// (p_re_full, 2*FRAC fractional bits) so the controller can take the exact sign
// of eps*R(k-1,k-1)^2 - R(k,k)^2 for the Siegel criterion. The scaled product p
// is rounded to nearest (half up) back to FRAC fractional bits and saturated to
// W bits. The array is purely combinational: operands are set up by the routing
// network and the results are written back to the memories at the next clock
// edge. The number of multipliers follows the document; the rounding and
// saturation scheme is this design's own.
module cmult_array
  import rslll_pkg::*;
#(
  parameter int NMULT = 4
) (
  input  cplx_t                   a        [NMULT],
  input  cplx_t                   b        [NMULT],
  input  logic                    conj_b   [NMULT],
  output cplx_t                   p        [NMULT],
  output logic signed [2*W+1:0]   p_re_full[NMULT]
);

  localparam logic signed [2*W+1:0] RND = (2*W+2)'(1) <<< (FRAC-1);

  for (genvar i = 0; i < NMULT; i++) begin : g_mult
    logic signed [2*W+1:0] bi_im, rr, ii, ri, ir, pre, pim;
    always_comb begin
      bi_im = conj_b[i] ? -(2*W+2)'(b[i].im) : (2*W+2)'(b[i].im);
      rr    = (2*W+2)'(a[i].re) * (2*W+2)'(b[i].re);
      ii    = (2*W+2)'(a[i].im) * bi_im;
      ri    = (2*W+2)'(a[i].re) * bi_im;
      ir    = (2*W+2)'(a[i].im) * (2*W+2)'(b[i].re);
      pre   = rr - ii;
      pim   = ri + ir;
      p_re_full[i] = pre;
      p[i].re = sat_data((pre + RND) >>> FRAC);
      p[i].im = sat_data((pim + RND) >>> FRAC);
    end
  end

endmodule
