// cmult_array_tb: self-checking test of the complex multiplier array.
// Random operands (including full-scale and conjugate cases) are applied to all
// four multipliers; each product is compared with one computed in floating
// point, rounded half-up to FRAC fractional bits and saturated, and the exact
// real part with an integer reference.
module cmult_array_tb;
  import rslll_pkg::*;

  localparam int NMULT = 4;
  cplx_t                 a [NMULT], b [NMULT], p [NMULT];
  logic                  cj [NMULT];
  logic signed [2*W+1:0] pf [NMULT];
  int checks = 0, failures = 0;

  cmult_array #(.NMULT(NMULT)) dut (.a(a), .b(b), .conj_b(cj), .p(p), .p_re_full(pf));

  function automatic longint ref_q(input real v);
    longint r;
    r = longint'($floor(v / real'(1 << FRAC) + 0.5));
    if (r > (longint'(1) <<< (W - 1)) - 1) r = (longint'(1) <<< (W - 1)) - 1;
    if (r < -(longint'(1) <<< (W - 1))) r = -(longint'(1) <<< (W - 1));
    return r;
  endfunction

  function automatic data_t rnd_data(input int mode);
    case (mode)
      0: return data_t'($urandom);
      1: return data_t'((1 << (W - 1)) - 1);
      2: return data_t'(-(1 << (W - 1)));
      default: return data_t'($signed($urandom_range(8191, 0)) - 4096);
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int m = 0; m < NMULT; m++) begin
        a[m].re = rnd_data(t < 20 ? $urandom_range(3) : 3);
        a[m].im = rnd_data(t < 20 ? $urandom_range(3) : 3);
        b[m].re = rnd_data(t < 20 ? $urandom_range(3) : 3);
        b[m].im = rnd_data(t < 20 ? $urandom_range(3) : 3);
        cj[m]   = $urandom_range(1);
      end
      #1;
      for (int m = 0; m < NMULT; m++) begin
        real ar, ai, br, bi, pr, pi;
        longint er;
        ar = real'(a[m].re); ai = real'(a[m].im);
        br = real'(b[m].re); bi = cj[m] ? -real'(b[m].im) : real'(b[m].im);
        pr = ar * br - ai * bi;
        pi = ar * bi + ai * br;
        er = longint'(a[m].re) * longint'(b[m].re) - longint'(a[m].im) * (cj[m] ? -longint'(b[m].im) : longint'(b[m].im));
        checks += 3;
        if (longint'(p[m].re) != ref_q(pr)) begin failures++; $display("re mismatch m=%0d got %0d exp %0d", m, p[m].re, ref_q(pr)); end
        if (longint'(p[m].im) != ref_q(pi)) begin failures++; $display("im mismatch m=%0d got %0d exp %0d", m, p[m].im, ref_q(pi)); end
        if (longint'(pf[m]) != er) begin failures++; $display("full mismatch m=%0d", m); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
