// rslll_top: reverse Siegel LLL (RS-LLL) lattice-reduction unit for MIMO detection.
//
// Given the QR decomposition G = QR of an MR x MT complex channel matrix, the
// unit computes a unimodular complex-integer matrix T and a new decomposition
// G*T = Q~ R~ whose lattice basis is reduced in the sense of Siegel's
// criterion (eps*R(k-1,k-1)^2 < R(k,k)^2 for all k), processing the diagonal
// from the bottom-right corner upwards and stopping after at most SMAX column
// swaps. The final size reduction of the textbook algorithm is left out.
//
// Structure: three double-buffered flip-flop memories (R: triangular, real
// diagonal; Q; T with its own small multiply-accumulate), an extended
// master-slave CORDIC (Givens vectoring plus a non-restoring divider for mu),
// an array of four complex multipliers, a routing network and a controller.
//
// Host protocol: while the core runs, the host writes the next R and Q into the
// host banks (r_we/q_we with row/col addresses; R entries below the diagonal
// and imaginary parts on the diagonal are ignored) and may read the previous
// result (r_r*/q_r*/t_r* read ports, combinational). When ready is high a
// one-cycle start pulse exchanges the banks and starts reduction of the loaded
// matrix; done pulses for one cycle at the end, with swaps giving the number of
// column swaps and early_term set if the SMAX limit ended the run. The result
// becomes readable on the host ports after the next start, which hands the
// host bank back. R must be upper triangular with a real non-negative diagonal.
// The architecture follows the document; data widths, port protocol and cycle
// schedule are this design's choices (see rslll_fsm for the schedule).
module rslll_top
  import rslll_pkg::*;
#(
  parameter int MT        = 4,   // transmit antennas (columns)
  parameter int MR        = 4,   // receive antennas (rows of Q)
  parameter int SMAX      = 20,  // early termination: maximum column swaps
  parameter int EPS_SHIFT = 1,   // Siegel parameter eps = 2^-EPS_SHIFT
  localparam int SW       = $clog2(SMAX + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          ready,
  output logic          busy,
  output logic          done,
  output logic          early_term,
  output logic [SW-1:0] swaps,
  // R host port
  input  logic          r_we,
  input  idx_t          r_row,
  input  idx_t          r_col,
  input  cplx_t         r_wdata,
  input  idx_t          r_rrow,
  input  idx_t          r_rcol,
  output cplx_t         r_rdata,
  // Q host port
  input  logic          q_we,
  input  idx_t          q_row,
  input  idx_t          q_col,
  input  cplx_t         q_wdata,
  input  idx_t          q_rrow,
  input  idx_t          q_rcol,
  output cplx_t         q_rdata,
  // T host read port
  input  idx_t          t_rrow,
  input  idx_t          t_rcol,
  output tcplx_t        t_rdata
);

  localparam int NMULT = 4;
  localparam int NWP   = 4;

  // controller
  op_e           op;
  idx_t          kk, j;
  logic          mem_swap, t_init, t_mac_swap, div_start, vec_start, w_load;
  logic [MT-2:0] siegel_ok;

  // memories
  cplx_t c_r [MT][MT];
  cplx_t c_q [MR][MT];
  wr_t   r_wr [NWP];
  wr_t   q_wr [NWP];
  logic  r_bank, q_bank, t_bank;

  // arithmetic units
  cplx_t                 ma [NMULT], mb [NMULT], mp [NMULT];
  logic                  mconj [NMULT];
  logic signed [2*W+1:0] mp_re [NMULT];
  logic                  vec_done;
  mu_cplx_t              mu;
  cplx_t                 div_rem, phasor, w_out, w_q;
  data_t                 cos_v, sin_v;

  rslll_fsm #(.MT(MT), .MR(MR), .SMAX(SMAX)) u_fsm (
    .clk, .rst_n, .start, .ready, .busy, .done, .early_term, .swaps,
    .siegel_ok, .vec_done, .op, .kk, .j, .mem_swap, .t_init, .t_mac_swap,
    .div_start, .vec_start, .w_load
  );

  r_mem #(.MT(MT), .NWP(NWP)) u_rmem (
    .clk, .rst_n, .swap(mem_swap), .bank(r_bank),
    .h_we(r_we), .h_row(r_row), .h_col(r_col), .h_wdata(r_wdata),
    .h_rrow(r_rrow), .h_rcol(r_rcol), .h_rdata(r_rdata),
    .c_wr(r_wr), .c_r(c_r)
  );

  q_mem #(.MR(MR), .MT(MT), .NWP(NWP)) u_qmem (
    .clk, .rst_n, .swap(mem_swap), .bank(q_bank),
    .h_we(q_we), .h_row(q_row), .h_col(q_col), .h_wdata(q_wdata),
    .h_rrow(q_rrow), .h_rcol(q_rcol), .h_rdata(q_rdata),
    .c_wr(q_wr), .c_q(c_q)
  );

  t_mem #(.MT(MT)) u_tmem (
    .clk, .rst_n, .swap(mem_swap), .bank(t_bank),
    .init(t_init), .mac_swap(t_mac_swap), .kk(kk), .mu(mu), .t_sat(),
    .h_rrow(t_rrow), .h_rcol(t_rcol), .h_rdata(t_rdata)
  );

  cordic_ext u_cordic (
    .clk, .rst_n,
    .div_start, .div_num(c_r[int'(kk) - 1][int'(kk)]), .div_den(c_r[int'(kk) - 1][int'(kk) - 1].re),
    .div_valid(), .mu, .mu_nz(), .mu_sat(), .div_rem,
    .vec_start, .vec_a(div_rem), .vec_b(c_r[int'(kk)][int'(kk)].re),
    .vec_busy(), .vec_done, .phasor, .cos_o(cos_v), .sin_o(sin_v)
  );

  cmult_array #(.NMULT(NMULT)) u_mult (
    .a(ma), .b(mb), .conj_b(mconj), .p(mp), .p_re_full(mp_re)
  );

  route_net #(.MT(MT), .MR(MR), .NMULT(NMULT), .NWP(NWP)) u_route (
    .op, .kk, .j, .eps_shift(2'(EPS_SHIFT)), .c_r, .c_q, .mu, .a_red(div_rem),
    .w(w_q), .s(sin_v), .c(cos_v), .phasor,
    .ma, .mb, .mconj, .mp, .mp_re,
    .siegel_ok, .w_out, .r_wr, .q_wr
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      w_q <= '0;
    else if (w_load) w_q <= w_out;
  end

  // the three memories always hand over their banks together
  a_banks_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    (r_bank == q_bank) && (q_bank == t_bank));

endmodule
