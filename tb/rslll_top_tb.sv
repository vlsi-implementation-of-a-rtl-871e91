// rslll_top_tb: end-to-end test of the RS-LLL unit.
// Two units run the same stream of random 4 x 4 channels side by side: one with
// the default parameters (SMAX = 20) and one with SMAX = 2, which forces early
// termination. Matrices are streamed through the double buffers the way a
// receiver would use them: the next Q and R are written while the unit works on
// the current one, and the previous result is read back right after the next
// start. Every result is checked with rslll_tb_pkg::check_result, and the
// start-to-done latency is checked against the schedule
//     3 + sum over swaps of (11 + (MT-1-kk) + MR) cycles.
// Each mechanism of the algorithm must be seen at least once: swaps, size
// reduction with mu != 0 and with mu = 0, saturation of mu, Siegel checks that
// skip diagonal elements, k capped at MT after a swap, rotations of columns
// right of the pair, regular and early termination, and host transfers
// overlapping a run.
module rslll_top_tb;
  import rslll_pkg::*;
  import rslll_tb_pkg::*;

  localparam int MT = 4, MR = 4, NMAT = 60;
  localparam int NU = 2;                       // unit 0: defaults, unit 1: SMAX = 2
  localparam int SMAXU [NU] = '{20, 2};

  logic   clk = 0, rst_n = 0, start = 0;
  logic   r_we = 0, q_we = 0;
  idx_t   r_row = '0, r_col = '0, q_row = '0, q_col = '0;
  cplx_t  r_wdata = '0, q_wdata = '0;
  idx_t   r_rrow = '0, r_rcol = '0, q_rrow = '0, q_rcol = '0, t_rrow = '0, t_rcol = '0;
  logic   ready [NU], busy [NU], done [NU], early_term [NU];
  logic [4:0] swaps [NU];
  cplx_t  r_rdata [NU], q_rdata [NU];
  tcplx_t t_rdata [NU];

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rslll_top dut (
    .clk, .rst_n, .start, .ready(ready[0]), .busy(busy[0]), .done(done[0]),
    .early_term(early_term[0]), .swaps(swaps[0]),
    .r_we, .r_row, .r_col, .r_wdata, .r_rrow, .r_rcol, .r_rdata(r_rdata[0]),
    .q_we, .q_row, .q_col, .q_wdata, .q_rrow, .q_rcol, .q_rdata(q_rdata[0]),
    .t_rrow, .t_rcol, .t_rdata(t_rdata[0])
  );

  logic [1:0] swaps_et;
  rslll_top #(.SMAX(2)) dut_et (
    .clk, .rst_n, .start, .ready(ready[1]), .busy(busy[1]), .done(done[1]),
    .early_term(early_term[1]), .swaps(swaps_et),
    .r_we, .r_row, .r_col, .r_wdata, .r_rrow, .r_rcol, .r_rdata(r_rdata[1]),
    .q_we, .q_row, .q_col, .q_wdata, .q_rrow, .q_rcol, .q_rdata(q_rdata[1]),
    .t_rrow, .t_rcol, .t_rdata(t_rdata[1])
  );
  assign swaps[1] = 5'(swaps_et);

  // ------------------------------------------------------------ monitors
  int n_swap [NU], n_mu_nz [NU], n_mu_zero [NU], n_mu_sat [NU], n_skip [NU];
  int n_kcap [NU], n_rotr [NU], n_et [NU], n_regular [NU], n_overlap;
  int lat [NU], lat_exp [NU], lat_sum [NU], n_runs [NU];
  bit running [NU];

  initial begin
    for (int u = 0; u < NU; u++) begin
      n_swap[u] = 0; n_mu_nz[u] = 0; n_mu_zero[u] = 0; n_mu_sat[u] = 0; n_skip[u] = 0;
      n_kcap[u] = 0; n_rotr[u] = 0; n_et[u] = 0; n_regular[u] = 0;
      lat[u] = 0; lat_exp[u] = 0; lat_sum[u] = 0; n_runs[u] = 0; running[u] = 0;
    end
    n_overlap = 0;
  end

  task automatic mon(input int u, input op_e op, input idx_t kk, input logic found,
                     input idx_t kk_next, input logic mu_nz, input logic mu_sat,
                     input logic rotq_last);
    if (op == OP_SRED) begin
      if (mu_nz) n_mu_nz[u]++; else n_mu_zero[u]++;
      if (mu_sat) n_mu_sat[u]++;
    end
    if (op == OP_SIEGEL && found && kk_next < kk) n_skip[u]++;
    if (op == OP_ROT_KK) lat_exp[u] += 11 + (MT - 1 - int'(kk)) + MR;
    if (op == OP_ROT_R) n_rotr[u]++;
    if (rotq_last) begin
      n_swap[u]++;
      if (int'(kk) == MT - 1) n_kcap[u]++;
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    mon(0, dut.u_fsm.op, dut.u_fsm.kk, dut.u_fsm.found, dut.u_fsm.kk_next,
        dut.u_cordic.mu_nz, dut.u_cordic.mu_sat,
        dut.u_fsm.op == OP_ROT_Q && int'(dut.u_fsm.j) == MR - 1);
    mon(1, dut_et.u_fsm.op, dut_et.u_fsm.kk, dut_et.u_fsm.found, dut_et.u_fsm.kk_next,
        dut_et.u_cordic.mu_nz, dut_et.u_cordic.mu_sat,
        dut_et.u_fsm.op == OP_ROT_Q && int'(dut_et.u_fsm.j) == MR - 1);
    if ((r_we || q_we) && (busy[0] || busy[1])) n_overlap++;
    for (int u = 0; u < NU; u++) begin
      if (start && ready[u]) begin running[u] = 1; lat[u] = 0; lat_exp[u] = 3; end
      else if (running[u]) lat[u]++;
      if (done[u] && running[u]) begin
        running[u] = 0;
        checks++;
        if (lat[u] != lat_exp[u]) begin
          failures++; $display("unit %0d: latency %0d, schedule says %0d", u, lat[u], lat_exp[u]);
        end
        lat_sum[u] += lat[u]; n_runs[u]++;
        if (early_term[u]) n_et[u]++; else n_regular[u]++;
        checks++;
        if (int'(swaps[u]) > SMAXU[u] || (early_term[u] != (int'(swaps[u]) == SMAXU[u]))) begin
          failures++; $display("unit %0d: swaps %0d early_term %0d", u, swaps[u], early_term[u]);
        end
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ host side
  imat_t in_qr [2], in_qi [2], in_rr [2], in_ri [2];   // [matrix parity]
  bit    et_flag [NU][2];

  task automatic load(input imat_t qr, input imat_t qi, input imat_t rr, input imat_t ri);
    for (int r = 0; r < MR; r++)
      for (int c = 0; c < MT; c++) begin
        @(negedge clk);
        q_we = 1; q_row = idx_t'(r); q_col = idx_t'(c);
        q_wdata.re = data_t'(qr[r][c]); q_wdata.im = data_t'(qi[r][c]);
        r_we = 1; r_row = idx_t'(r); r_col = idx_t'(c);
        r_wdata.re = data_t'(rr[r][c]); r_wdata.im = data_t'(ri[r][c]);
      end
    @(negedge clk);
    q_we = 0; r_we = 0;
  endtask

  task automatic read_check(input int par, input int idx);
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
      failures += check_result(in_qr[par], in_qi[par], in_rr[par], in_ri[par],
                               qr, qi, rr, ri, tr, ti, et_flag[u][par], 1,
                               $sformatf("unit %0d matrix %0d", u, idx), checks, e);
    end
  endtask

  task automatic start_both();
    @(negedge clk);
    while (!(ready[0] && ready[1])) @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
  endtask

  task automatic wait_both(input int par);
    bit d0 = 0, d1 = 0;
    while (!(d0 && d1)) begin
      @(posedge clk);
      #1;
      if (ready[0] && !d0) begin d0 = 1; et_flag[0][par] = early_term[0]; end
      if (ready[1] && !d1) begin d1 = 1; et_flag[1][par] = early_term[1]; end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    gen_qr(0.0, in_qr[0], in_qi[0], in_rr[0], in_ri[0]);
    load(in_qr[0], in_qi[0], in_rr[0], in_ri[0]);
    for (int n = 0; n <= NMAT; n++) begin
      int par;
      par = n % 2;
      start_both();                       // unit works on matrix n
      if (n > 0) read_check(1 - par, n - 1);
      if (n < NMAT) begin
        real mix;
        mix = (n % 4 == 3) ? 2.5 : (n % 4 == 2) ? 0.8 : 0.0;
        gen_qr(mix, in_qr[1 - par], in_qi[1 - par], in_rr[1 - par], in_ri[1 - par]);
        load(in_qr[1 - par], in_qi[1 - par], in_rr[1 - par], in_ri[1 - par]);
      end
      wait_both(par);
    end
    for (int u = 0; u < NU; u++) begin
      $display("unit %0d (SMAX=%0d): %0d runs, avg %0.1f cycles, swaps %0d, mu!=0 %0d, mu=0 %0d, mu sat %0d, skips %0d, k capped %0d, ROT_R %0d, early %0d, regular %0d",
               u, SMAXU[u], n_runs[u], real'(lat_sum[u]) / real'(n_runs[u]), n_swap[u], n_mu_nz[u],
               n_mu_zero[u], n_mu_sat[u], n_skip[u], n_kcap[u], n_rotr[u], n_et[u], n_regular[u]);
    end
    $display("host transfers overlapping a run: %0d", n_overlap);
    checks += 10;
    if (n_swap[0] == 0)    begin failures++; $display("no swap seen"); end
    if (n_mu_nz[0] == 0)   begin failures++; $display("no size reduction with mu != 0"); end
    if (n_mu_zero[0] == 0) begin failures++; $display("no swap with mu = 0"); end
    if (n_mu_sat[0] + n_mu_sat[1] == 0) begin failures++; $display("mu never saturated"); end
    if (n_skip[0] == 0)    begin failures++; $display("no Siegel check skipped an element"); end
    if (n_kcap[0] == 0)    begin failures++; $display("k never capped at MT"); end
    if (n_rotr[0] == 0)    begin failures++; $display("no rotation right of the pair"); end
    if (n_et[1] == 0)      begin failures++; $display("no early termination"); end
    if (n_regular[0] == 0) begin failures++; $display("no regular termination"); end
    if (n_overlap == 0)    begin failures++; $display("no overlapping host transfer"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
