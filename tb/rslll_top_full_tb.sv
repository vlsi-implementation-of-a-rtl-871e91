// rslll_top_full_tb: the RS-LLL unit at its default parameters (4 x 4, SMAX = 20,
// eps = 1/2), taken through complete reductions of random channels.
// Each matrix is loaded through the host ports, reduced, and read back after
// the next start; the result is checked with rslll_tb_pkg::check_result (T
// unimodular, G*T = Q~R~, Q~ orthonormal, Siegel condition met) and the
// latency against the controller's schedule.
module rslll_top_full_tb;
  import rslll_pkg::*;
  import rslll_tb_pkg::*;

  localparam int MT = 4, MR = 4, NMAT = 12;

  logic   clk = 0, rst_n = 0, start = 0;
  logic   r_we = 0, q_we = 0;
  idx_t   r_row = '0, r_col = '0, q_row = '0, q_col = '0;
  cplx_t  r_wdata = '0, q_wdata = '0, r_rdata, q_rdata;
  idx_t   r_rrow = '0, r_rcol = '0, q_rrow = '0, q_rcol = '0, t_rrow = '0, t_rcol = '0;
  tcplx_t t_rdata;
  logic   ready, busy, done, early_term;
  logic [4:0] swaps;
  int checks = 0, failures = 0, total_swaps = 0;

  always #5 clk = ~clk;

  rslll_top dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency against the schedule
  int lat = 0, lat_exp = 0;
  bit running = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_fsm.op == OP_ROT_KK) lat_exp += 11 + (MT - 1 - int'(dut.u_fsm.kk)) + MR;
    if (start && ready) begin running = 1; lat = 0; lat_exp = 3; end
    else if (running) lat++;
    if (done && running) begin
      running = 0;
      checks++;
      if (lat != lat_exp) begin failures++; $display("latency %0d, schedule says %0d", lat, lat_exp); end
    end
  end

  imat_t in_qr, in_qi, in_rr, in_ri;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NMAT; n++) begin
      imat_t qr, qi, rr, ri, tr, ti;
      bit    et;
      real   e;
      gen_qr((n % 3 == 2) ? 1.5 : 0.0, in_qr, in_qi, in_rr, in_ri);
      for (int r = 0; r < MR; r++)
        for (int c = 0; c < MT; c++) begin
          @(negedge clk);
          q_we = 1; q_row = idx_t'(r); q_col = idx_t'(c);
          q_wdata.re = data_t'(in_qr[r][c]); q_wdata.im = data_t'(in_qi[r][c]);
          r_we = 1; r_row = idx_t'(r); r_col = idx_t'(c);
          r_wdata.re = data_t'(in_rr[r][c]); r_wdata.im = data_t'(in_ri[r][c]);
        end
      @(negedge clk);
      q_we = 0; r_we = 0;
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      et = early_term;
      total_swaps += int'(swaps);
      @(negedge clk);
      start = 1;                        // hand the result bank to the host
      @(negedge clk);
      start = 0;
      for (int r = 0; r < MT; r++)
        for (int c = 0; c < MT; c++) begin
          r_rrow = idx_t'(r); r_rcol = idx_t'(c);
          q_rrow = idx_t'(r); q_rcol = idx_t'(c);
          t_rrow = idx_t'(r); t_rcol = idx_t'(c);
          #1;
          rr[r][c] = int'(r_rdata.re); ri[r][c] = int'(r_rdata.im);
          qr[r][c] = int'(q_rdata.re); qi[r][c] = int'(q_rdata.im);
          tr[r][c] = int'(t_rdata.re); ti[r][c] = int'(t_rdata.im);
        end
      failures += check_result(in_qr, in_qi, in_rr, in_ri, qr, qi, rr, ri, tr, ti, et, 1,
                               $sformatf("matrix %0d", n), checks, e);
      while (!ready) @(negedge clk);    // let the run on the stale bank finish
    end
    checks++;
    if (total_swaps == 0) begin failures++; $display("no column swap in any matrix"); end
    $display("%0d matrices, %0d swaps", NMAT, total_swaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
