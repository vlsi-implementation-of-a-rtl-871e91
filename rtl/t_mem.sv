// t_mem: double-buffered flip-flop memory for the unimodular matrix T, with the
// low-precision multiply-accumulate of the size reduction built in.
//
// T has complex-integer entries of TW bits per component. The core's working
// bank supports two operations:
//   init      : working bank <- identity (start of a new matrix)
//   mac_swap  : for column index kk (0-based, the document's k = kk + 1)
//               t(kk-1) <- sat(t(kk) - mu * t(kk-1))   size reduction of t_k
//               t(kk)   <- t(kk-1)                     column exchange
// so lines 7 and 9 of the reduction algorithm for T take a single cycle. mu is
// the small complex integer produced by the divider; its products with the
// narrow T entries are formed by dedicated small multipliers inside the memory
// rather than on the main complex multipliers. Results saturate to TW bits and
// t_sat reports that a saturation happened in that cycle. The host reads the
// host bank through a combinational port; swap exchanges the banks. Keeping the
// MAC in the T memory follows the document; the widths and saturation are this
// design's choices.
module t_mem
  import rslll_pkg::*;
#(
  parameter int MT = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     swap,
  output logic     bank,
  input  logic     init,
  input  logic     mac_swap,
  input  idx_t     kk,
  input  mu_cplx_t mu,
  output logic     t_sat,
  input  idx_t     h_rrow,
  input  idx_t     h_rcol,
  output tcplx_t   h_rdata
);

  localparam int PW = TW + MUW + 3;

  tcplx_t mem [2][MT][MT];
  tcplx_t newcol [MT];
  logic   sat_any;

  // t_k - mu * t_(k-1) for every row of the working bank
  always_comb begin
    logic signed [PW-1:0] tr, ti, ur, ui, vr, vi;
    sat_any = 1'b0;
    for (int i = 0; i < MT; i++) begin
      if (int'(kk) >= 1 && int'(kk) < MT) begin
        tr = PW'(mem[bank][i][int'(kk) - 1].re);
        ti = PW'(mem[bank][i][int'(kk) - 1].im);
        ur = PW'(mem[bank][i][int'(kk)].re);
        ui = PW'(mem[bank][i][int'(kk)].im);
      end else begin
        tr = '0; ti = '0; ur = '0; ui = '0;
      end
      vr = ur - (PW'(mu.re) * tr - PW'(mu.im) * ti);
      vi = ui - (PW'(mu.re) * ti + PW'(mu.im) * tr);
      newcol[i].re = sat_t(vr);
      newcol[i].im = sat_t(vi);
      if (PW'(newcol[i].re) != vr || PW'(newcol[i].im) != vi) sat_any = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank  <= 1'b0;
      t_sat <= 1'b0;
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < MT; i++)
          for (int j = 0; j < MT; j++)
            mem[b][i][j] <= '0;
    end else begin
      t_sat <= 1'b0;
      if (swap) bank <= ~bank;
      if (init) begin
        for (int i = 0; i < MT; i++)
          for (int j = 0; j < MT; j++)
            mem[bank][i][j] <= (i == j) ? '{re: TW'(1), im: '0} : '0;
      end else if (mac_swap && int'(kk) >= 1 && int'(kk) < MT) begin
        t_sat <= sat_any;
        for (int i = 0; i < MT; i++) begin
          mem[bank][i][int'(kk) - 1] <= newcol[i];
          mem[bank][i][int'(kk)]     <= mem[bank][i][int'(kk) - 1];
        end
      end
    end
  end

  always_comb begin
    if (int'(h_rrow) < MT && int'(h_rcol) < MT) h_rdata = mem[~bank][int'(h_rrow)][int'(h_rcol)];
    else                                        h_rdata = '0;
  end

endmodule
