// t_mem_tb: self-checking test of the double-buffered T memory with its
// multiply-accumulate. The working bank is set to the identity, then receives
// random combined size-reduction/exchange operations (random column pair and
// mu in -3..3), long enough for entries to saturate. After a bank swap the host
// port must show exactly what an integer reference model computed, and t_sat
// must flag exactly the operations in which the reference saturated.
module t_mem_tb;
  import rslll_pkg::*;

  localparam int MT = 4;
  logic     clk = 0, rst_n = 0, swap = 0, bank, init = 0, mac_swap = 0, t_sat;
  idx_t     kk = '0, h_rrow = '0, h_rcol = '0;
  mu_cplx_t mu = '0;
  tcplx_t   h_rdata;
  int checks = 0, failures = 0, n_sat = 0;
  int refr [MT][MT], refi [MT][MT];

  always #5 clk = ~clk;

  t_mem #(.MT(MT)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clampt(input int v, output bit s);
    int hi = (1 << (TW - 1)) - 1, lo = -(1 << (TW - 1));
    s = (v > hi) || (v < lo);
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 20; run++) begin
      @(negedge clk); swap = 1;
      @(negedge clk); swap = 0; init = 1;
      @(negedge clk); init = 0;
      for (int r = 0; r < MT; r++) for (int c = 0; c < MT; c++) begin
        refr[r][c] = (r == c) ? 1 : 0; refi[r][c] = 0;
      end
      for (int op = 0; op < 5 + run * 2; op++) begin
        int k, mr, mi;
        bit s, sany;
        int nr [MT], ni [MT];
        k = $urandom_range(MT - 1, 1);
        mr = $signed($urandom_range(6)) - 3; mi = $signed($urandom_range(6)) - 3;
        kk = idx_t'(k); mu.re = mu_t'(mr); mu.im = mu_t'(mi); mac_swap = 1;
        sany = 0;
        for (int r = 0; r < MT; r++) begin
          nr[r] = clampt(refr[r][k] - (mr * refr[r][k-1] - mi * refi[r][k-1]), s); sany |= s;
          ni[r] = clampt(refi[r][k] - (mr * refi[r][k-1] + mi * refr[r][k-1]), s); sany |= s;
        end
        for (int r = 0; r < MT; r++) begin
          refr[r][k] = refr[r][k-1]; refi[r][k] = refi[r][k-1];
          refr[r][k-1] = nr[r];      refi[r][k-1] = ni[r];
        end
        @(negedge clk); mac_swap = 0;
        checks++;
        if (t_sat != sany) begin failures++; $display("t_sat run %0d op %0d", run, op); end
        if (sany) n_sat++;
      end
      @(negedge clk); swap = 1;
      @(negedge clk); swap = 0;
      for (int r = 0; r < MT; r++) for (int c = 0; c < MT; c++) begin
        h_rrow = idx_t'(r); h_rcol = idx_t'(c);
        #1;
        checks++;
        if (int'(h_rdata.re) != refr[r][c] || int'(h_rdata.im) != refi[r][c]) begin
          failures++; $display("T(%0d,%0d) run %0d got %0d,%0d exp %0d,%0d", r, c, run, h_rdata.re, h_rdata.im, refr[r][c], refi[r][c]);
        end
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
