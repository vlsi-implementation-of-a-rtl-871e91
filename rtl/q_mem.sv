// q_mem: double-buffered flip-flop memory for the unitary matrix Q (MR x MT).
//
// Two banks: the working bank belongs to the lattice-reduction core, the other
// to the host, which loads the next Q and reads back the previous result while
// the core runs; a one-cycle pulse on swap exchanges the roles. The core sees
// the whole working bank in parallel (c_q) and writes up to NWP elements per
// cycle (c_wr); the host has one write and one combinational read port on its
// bank. Writes take effect at the next rising clock edge; reset clears both
// banks. Double buffering and the flip-flop realisation follow the document;
// the port structure is this design's choice.
module q_mem
  import rslll_pkg::*;
#(
  parameter int MR  = 4,
  parameter int MT  = 4,
  parameter int NWP = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  swap,
  output logic  bank,
  // host port (host bank)
  input  logic  h_we,
  input  idx_t  h_row,
  input  idx_t  h_col,
  input  cplx_t h_wdata,
  input  idx_t  h_rrow,
  input  idx_t  h_rcol,
  output cplx_t h_rdata,
  // core port (working bank)
  input  wr_t   c_wr [NWP],
  output cplx_t c_q  [MR][MT]
);

  cplx_t mem [2][MR][MT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank <= 1'b0;
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < MR; i++)
          for (int j = 0; j < MT; j++)
            mem[b][i][j] <= '0;
    end else begin
      if (swap) bank <= ~bank;
      for (int p = 0; p < NWP; p++)
        if (c_wr[p].en && int'(c_wr[p].row) < MR && int'(c_wr[p].col) < MT)
          mem[bank][int'(c_wr[p].row)][int'(c_wr[p].col)] <= c_wr[p].data;
      if (h_we && int'(h_row) < MR && int'(h_col) < MT)
        mem[~bank][int'(h_row)][int'(h_col)] <= h_wdata;
    end
  end

  always_comb begin
    c_q = mem[bank];
    if (int'(h_rrow) < MR && int'(h_rcol) < MT) h_rdata = mem[~bank][int'(h_rrow)][int'(h_rcol)];
    else                                        h_rdata = '0;
  end

endmodule
