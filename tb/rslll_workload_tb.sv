// rslll_workload_tb: the 4 x 4 i.i.d. Rayleigh-fading workload with sorted QR
// preprocessing, run on two units side by side: the default runtime limit
// SMAX = 20 and the tight limit SMAX = 4. Each unit reduces the same 300
// channels (one matrix at a time); every result is checked with
// rslll_tb_pkg::check_result, and the average number of swaps and of clock
// cycles per matrix is reported, together with the throughput this gives at a
// 333 MHz clock. The workload (4 x 4, sorted QR input, runtime limits of 20
// and 4 swaps, 333 MHz) follows the published evaluation; the channel count,
// the gain control in the generator and the hand-over protocol are this
// testbench's own choices.
module rslll_workload_tb;
  import rslll_pkg::*;
  import rslll_tb_pkg::*;

  localparam int MT = 4, MR = 4, NMAT = 300, NU = 2;
  localparam int SMAXU [NU] = '{20, 4};

  logic   clk = 0, rst_n = 0, start = 0;
  logic   r_we = 0, q_we = 0;
  idx_t   r_row = '0, r_col = '0, q_row = '0, q_col = '0;
  cplx_t  r_wdata = '0, q_wdata = '0;
  idx_t   r_rrow = '0, r_rcol = '0, q_rrow = '0, q_rcol = '0, t_rrow = '0, t_rcol = '0;
  logic   ready [NU], busy [NU], done [NU], early_term [NU];
  cplx_t  r_rdata [NU], q_rdata [NU];
  tcplx_t t_rdata [NU];
  logic [4:0] swaps0;
  logic [2:0] swaps1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rslll_top #(.SMAX(20)) dut_a (
    .clk, .rst_n, .start, .ready(ready[0]), .busy(busy[0]), .done(done[0]),
    .early_term(early_term[0]), .swaps(swaps0),
    .r_we, .r_row, .r_col, .r_wdata, .r_rrow, .r_rcol, .r_rdata(r_rdata[0]),
    .q_we, .q_row, .q_col, .q_wdata, .q_rrow, .q_rcol, .q_rdata(q_rdata[0]),
    .t_rrow, .t_rcol, .t_rdata(t_rdata[0])
  );
  rslll_top #(.SMAX(4)) dut_b (
    .clk, .rst_n, .start, .ready(ready[1]), .busy(busy[1]), .done(done[1]),
    .early_term(early_term[1]), .swaps(swaps1),
    .r_we, .r_row, .r_col, .r_wdata, .r_rrow, .r_rcol, .r_rdata(r_rdata[1]),
    .q_we, .q_row, .q_col, .q_wdata, .q_rrow, .q_rcol, .q_rdata(q_rdata[1]),
    .t_rrow, .t_rcol, .t_rdata(t_rdata[1])
  );

  int  lat [NU], lat_sum [NU], sw_sum [NU], n_et [NU];
  bit  running [NU], et_last [NU], counted [NU];
  bit  measuring = 0;                   // set for runs on a freshly loaded matrix
  initial for (int u = 0; u < NU; u++) begin
    lat[u] = 0; lat_sum[u] = 0; sw_sum[u] = 0; n_et[u] = 0; running[u] = 0; et_last[u] = 0;
  end
  always @(posedge clk) if (rst_n)
    for (int u = 0; u < NU; u++) begin
      if (start && ready[u]) begin running[u] = 1; lat[u] = 0; counted[u] = measuring; end
      else if (running[u]) lat[u]++;
      if (done[u] && running[u] && !counted[u]) running[u] = 0;
      if (done[u] && running[u] && counted[u]) begin
        running[u] = 0;
        lat_sum[u] += lat[u];
        sw_sum[u]  += (u == 0) ? int'(swaps0) : int'(swaps1);
        et_last[u] = early_term[u];
        if (early_term[u]) n_et[u]++;
      end
    end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  imat_t in_qr, in_qi, in_rr, in_ri;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NMAT; n++) begin
      gen_qr(0.0, in_qr, in_qi, in_rr, in_ri, 1);
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
      start = 1; measuring = 1;
      @(negedge clk);
      start = 0; measuring = 0;
      while (!(ready[0] && ready[1])) @(negedge clk);
      start = 1;                        // hand the result banks to the host
      @(negedge clk);
      start = 0;
      for (int u = 0; u < NU; u++) begin
        imat_t qr, qi, rr, ri, tr, ti;
        real   e;
        for (int r = 0; r < MT; r++)
          for (int c = 0; c < MT; c++) begin
            r_rrow = idx_t'(r); r_rcol = idx_t'(c);
            q_rrow = idx_t'(r); q_rcol = idx_t'(c);
            t_rrow = idx_t'(r); t_rcol = idx_t'(c);
            #1;
            rr[r][c] = int'(r_rdata[u].re); ri[r][c] = int'(r_rdata[u].im);
            qr[r][c] = int'(q_rdata[u].re); qi[r][c] = int'(q_rdata[u].im);
            tr[r][c] = int'(t_rdata[u].re); ti[r][c] = int'(t_rdata[u].im);
          end
        failures += check_result(in_qr, in_qi, in_rr, in_ri, qr, qi, rr, ri, tr, ti, et_last[u], 1,
                                 $sformatf("SMAX=%0d matrix %0d", SMAXU[u], n), checks, e);
      end
      while (!(ready[0] && ready[1])) @(negedge clk);
    end
    // only runs on freshly loaded matrices are counted; the hand-over runs
    // reduce a stale bank and are ignored
    for (int u = 0; u < NU; u++)
      $display("SMAX=%0d: %0d runs, avg %0.2f swaps, avg %0.1f cycles per run, %0.2f M runs/s at 333 MHz, early terminations %0d",
               SMAXU[u], NMAT, real'(sw_sum[u]) / real'(NMAT), real'(lat_sum[u]) / real'(NMAT),
               333.0 / (real'(lat_sum[u]) / real'(NMAT)), n_et[u]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
