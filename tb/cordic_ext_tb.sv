// cordic_ext_tb: self-checking test of the extended CORDIC.
// Division: random numerators and positive denominators; mu must equal the
// nearest integer of num/den (ties away from zero) clipped to +-3 per
// component, and the side-product remainder must equal num - mu*den exactly.
// The result must be valid one cycle after div_start.
// Vectoring: random complex a and real b >= 0; the phasor, c and s must match
// exp(-j*arg a), |a|/r and b/r within the accuracy of nine micro-rotations,
// and vec_done must come exactly six cycles after vec_start.
module cordic_ext_tb;
  import rslll_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     div_start = 0, div_valid, mu_nz, mu_sat;
  cplx_t    div_num, div_rem;
  data_t    div_den;
  mu_cplx_t mu;
  logic     vec_start = 0, vec_busy, vec_done;
  cplx_t    vec_a, phasor;
  data_t    vec_b, cos_o, sin_o;
  int checks = 0, failures = 0;
  int n_sat = 0, n_zero = 0;

  cordic_ext dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_mu(input int num, input int den);
    real q; int m;
    q = real'(num) / real'(den);
    m = int'($floor((q < 0 ? -q : q) + 0.5));
    if (m > 3) m = 3;
    return (q < 0) ? -m : m;
  endfunction

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    div_num = '0; div_den = '0; vec_a = '0; vec_b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- division
    for (int t = 0; t < 3000; t++) begin
      int mr, mi, den;
      den = (t % 3 == 0) ? $urandom_range(400, 1) : $urandom_range(16384, 64);
      div_den    = data_t'(den);
      div_num.re = data_t'($signed($urandom_range(40000, 0)) - 20000);
      div_num.im = (t % 5 == 0) ? data_t'(($urandom_range(6) - 3) * den + (den / 2)) :
                                  data_t'($signed($urandom_range(40000, 0)) - 20000);
      div_start <= 1;
      @(posedge clk);
      div_start <= 0;
      #1;
      chk(div_valid, "div_valid one cycle after div_start");
      mr = ref_mu(int'(div_num.re), den);
      mi = ref_mu(int'(div_num.im), den);
      chk(int'(mu.re) == mr && int'(mu.im) == mi,
          $sformatf("mu num=(%0d,%0d) den=%0d got (%0d,%0d) exp (%0d,%0d)",
                    div_num.re, div_num.im, den, mu.re, mu.im, mr, mi));
      chk(int'(div_rem.re) == int'(div_num.re) - mr * den && int'(div_rem.im) == int'(div_num.im) - mi * den,
          $sformatf("remainder num=(%0d,%0d) den=%0d", div_num.re, div_num.im, den));
      chk(mu_nz == (mr != 0 || mi != 0), "mu_nz");
      if (mu_sat) n_sat++;
      if (!mu_nz) n_zero++;
    end
    chk(n_sat > 0 && n_zero > 0, "saturation and mu = 0 both seen");
    // ---- vectoring
    for (int t = 0; t < 500; t++) begin
      real ar, ai, b, mag, r, phi, er, ei, ec, es;
      int  n;
      vec_a.re = data_t'($signed($urandom_range(30000, 0)) - 15000);
      vec_a.im = data_t'($signed($urandom_range(30000, 0)) - 15000);
      vec_b    = data_t'($urandom_range(15000, 0));
      if (t == 0) begin vec_a = '0; vec_a.re = 16'sd4096; vec_b = '0; end
      if (t == 1) begin vec_a.re = -16'sd8000; vec_a.im = 16'sd10; end
      ar = real'(vec_a.re); ai = real'(vec_a.im); b = real'(vec_b);
      mag = $sqrt(ar * ar + ai * ai);
      r   = $sqrt(mag * mag + b * b);
      phi = $atan2(ai, ar);
      er = $cos(phi); ei = -$sin(phi); ec = mag / r; es = b / r;
      vec_start <= 1;
      @(posedge clk);
      vec_start <= 0;
      n = 0;
      do begin @(posedge clk); n++; #1; end while (!vec_done && n < 20);
      chk(n == 6, $sformatf("vectoring latency %0d", n));
      chk(fabs(real'(phasor.re) / 4096.0 - er) < 0.012 && fabs(real'(phasor.im) / 4096.0 - ei) < 0.012,
          $sformatf("phasor a=(%0d,%0d) got (%0d,%0d) exp (%f,%f)", vec_a.re, vec_a.im, phasor.re, phasor.im, er, ei));
      chk(fabs(real'(cos_o) / 4096.0 - ec) < 0.012 && fabs(real'(sin_o) / 4096.0 - es) < 0.012,
          $sformatf("c/s a=(%0d,%0d) b=%0d got (%0d,%0d) exp (%f,%f)", vec_a.re, vec_a.im, vec_b, cos_o, sin_o, ec, es));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
