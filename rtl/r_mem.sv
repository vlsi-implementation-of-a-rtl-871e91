// r_mem: double-buffered flip-flop memory for the triangular matrix R.
//
// Holds two banks. The working bank belongs to the lattice-reduction core; the
// other bank belongs to the host, which loads the next R into it and reads back
// the previous result while the core runs. A one-cycle pulse on swap exchanges
// the roles of the banks. Only what an upper-triangular matrix with real
// diagonal needs is stored: MT real diagonal entries and MT*(MT-1)/2 complex
// entries above the diagonal (10 instead of 16 complex words for MT = 4).
//
// Core side: the whole working bank is visible at once as a full MT x MT
// complex matrix (c_r, zero below the diagonal and zero imaginary part on it),
// which gives the irregular parallel access the arithmetic units need; NWP
// element writes per cycle go through c_wr (a diagonal write keeps only the
// real part, writes below the diagonal are dropped). Host side: one write and
// one combinational read port on the host bank, same rules. Writes take effect
// at the next rising clock edge; reset clears both banks. The double buffering,
// flip-flop realisation and the triangular/real-diagonal storage follow the
// document; the port structure is this design's choice.
module r_mem
  import rslll_pkg::*;
#(
  parameter int MT  = 4,
  parameter int NWP = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  swap,
  output logic  bank,                 // index of the core's working bank
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
  output cplx_t c_r  [MT][MT]
);

  localparam int NOFF = MT * (MT - 1) / 2;

  data_t diag [2][MT];
  cplx_t off  [2][NOFF];

  // position of element (i, j), i < j, in the packed upper triangle
  function automatic int tri_idx(input int i, input int j);
    return i * MT - (i * (i + 1)) / 2 + (j - i - 1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank <= 1'b0;
      for (int b = 0; b < 2; b++) begin
        for (int i = 0; i < MT; i++)   diag[b][i] <= '0;
        for (int i = 0; i < NOFF; i++) off[b][i]  <= '0;
      end
    end else begin
      if (swap) bank <= ~bank;
      for (int p = 0; p < NWP; p++) begin
        if (c_wr[p].en) begin
          if (c_wr[p].row == c_wr[p].col && int'(c_wr[p].row) < MT)
            diag[bank][int'(c_wr[p].row)] <= c_wr[p].data.re;
          else if (c_wr[p].row < c_wr[p].col && int'(c_wr[p].col) < MT)
            off[bank][tri_idx(int'(c_wr[p].row), int'(c_wr[p].col))] <= c_wr[p].data;
        end
      end
      if (h_we) begin
        if (h_row == h_col && int'(h_row) < MT)
          diag[~bank][int'(h_row)] <= h_wdata.re;
        else if (h_row < h_col && int'(h_col) < MT)
          off[~bank][tri_idx(int'(h_row), int'(h_col))] <= h_wdata;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < MT; i++)
      for (int j = 0; j < MT; j++)
        if (i == j)     c_r[i][j] = '{re: diag[bank][i], im: '0};
        else if (i < j) c_r[i][j] = off[bank][tri_idx(i, j)];
        else            c_r[i][j] = '0;
    if (h_rrow == h_rcol && int'(h_rrow) < MT)
      h_rdata = '{re: diag[~bank][int'(h_rrow)], im: '0};
    else if (h_rrow < h_rcol && int'(h_rcol) < MT)
      h_rdata = off[~bank][tri_idx(int'(h_rrow), int'(h_rcol))];
    else
      h_rdata = '0;
  end

endmodule
