// q_mem_tb: self-checking test of the double-buffered triangular R memory.
// Random host writes (including entries below the diagonal and imaginary parts
// on the diagonal, which must be dropped) and random core writes through all
// four ports go to different banks in the same cycles; after each bank swap the
// core view and the host read port are compared with a reference model of two
// upper-triangular, real-diagonal banks.
module q_mem_tb;
  import rslll_pkg::*;

  localparam int MT = 4, MR = 4, NWP = 4;
  logic  clk = 0, rst_n = 0, swap = 0, bank;
  logic  h_we = 0;
  idx_t  h_row = '0, h_col = '0, h_rrow = '0, h_rcol = '0;
  cplx_t h_wdata = '0, h_rdata;
  wr_t   c_wr [NWP];
  cplx_t c_q [MR][MT];
  int checks = 0, failures = 0;
  cplx_t ref_m [2][MT][MT];
  int    rb = 0;                          // reference working bank

  always #5 clk = ~clk;

  q_mem #(.MR(MR), .MT(MT), .NWP(NWP)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cplx_t rc();
    cplx_t v;
    v.re = data_t'($urandom);
    v.im = data_t'($urandom);
    return v;
  endfunction

  task automatic ref_write(input int b, input int r, input int c, input cplx_t d);
    ref_m[b][r][c] = d;
  endtask

  task automatic compare();
    for (int r = 0; r < MT; r++)
      for (int c = 0; c < MT; c++) begin
        checks += 2;
        if (c_q[r][c] != ref_m[rb][r][c]) begin failures++; $display("core view (%0d,%0d) got %h exp %h bank %0d rb %0d", r, c, c_q[r][c], ref_m[rb][r][c], bank, rb); end
        h_rrow = idx_t'(r); h_rcol = idx_t'(c);
        #1;
        if (h_rdata != ref_m[1-rb][r][c]) begin failures++; $display("host read (%0d,%0d)", r, c); end
      end
  endtask

  initial begin
    for (int b = 0; b < 2; b++) for (int r = 0; r < MT; r++) for (int c = 0; c < MT; c++) ref_m[b][r][c] = '0;
    for (int p = 0; p < NWP; p++) c_wr[p] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 50; round++) begin
      for (int cyc = 0; cyc < 12; cyc++) begin
        @(negedge clk);
        h_we = $urandom_range(1); h_row = idx_t'($urandom_range(MT - 1)); h_col = idx_t'($urandom_range(MT - 1));
        h_wdata = rc();
        for (int p = 0; p < NWP; p++) begin
          c_wr[p].en = $urandom_range(1);
          c_wr[p].row = idx_t'(p);            // distinct rows: no two ports hit one element
          c_wr[p].col = idx_t'($urandom_range(MT - 1));
          c_wr[p].data = rc();
        end
        @(posedge clk);
        if (h_we) ref_write(1 - rb, int'(h_row), int'(h_col), h_wdata);
        for (int p = 0; p < NWP; p++)
          if (c_wr[p].en) ref_write(rb, int'(c_wr[p].row), int'(c_wr[p].col), c_wr[p].data);
      end
      @(negedge clk);
      h_we = 0;
      for (int p = 0; p < NWP; p++) c_wr[p].en = 0;
      compare();
      checks++;
      if (int'(bank) != rb) failures++;
      @(negedge clk);
      swap = 1;
      @(negedge clk);
      swap = 0;
      rb = 1 - rb;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
