// rslll_pkg: types and constants shared by the RS-LLL lattice-reduction unit.
//
// All matrix entries of Q and R are complex fixed-point numbers with W bits per
// component and FRAC fractional bits (two's complement, range [-8, 8) at the
// default Q4.12 format). Entries of the unimodular matrix T are complex
// integers with TW bits per component; the size-reduction coefficient mu is a
// complex integer with MUW bits per component (range -3..3). None of these
// widths are specified for the original design; they are this implementation's
// choices, made so that T and mu stay low-precision as the architecture needs.
package rslll_pkg;

  parameter int W     = 18;  // data width per real component
  parameter int FRAC  = 12;  // fractional bits of the data format
  parameter int TW    = 8;   // T-matrix entry width per real component
  parameter int MUW   = 3;   // mu width per real component (signed, |mu| <= 3)
  parameter int MUMAX = 3;   // largest |Re mu|, |Im mu| produced by the rounding table
  parameter int IDXW  = 3;   // row/column index width (matrices up to 8x8)

  typedef logic signed [W-1:0]   data_t;
  typedef logic signed [TW-1:0]  tdata_t;
  typedef logic signed [MUW-1:0] mu_t;
  typedef logic [IDXW-1:0]       idx_t;

  typedef struct packed {
    data_t re;
    data_t im;
  } cplx_t;

  typedef struct packed {
    tdata_t re;
    tdata_t im;
  } tcplx_t;

  typedef struct packed {
    mu_t re;
    mu_t im;
  } mu_cplx_t;

  // One element write into the working bank of a matrix memory.
  typedef struct packed {
    logic  en;
    idx_t  row;
    idx_t  col;
    cplx_t data;
  } wr_t;

  // Operation the routing network sets up for the multiplier array.
  typedef enum logic [2:0] {
    OP_NONE,    // multipliers idle
    OP_SIEGEL,  // three Siegel-criterion evaluations
    OP_SRED,    // size reduction of r_k plus column exchange, rows above k-1
    OP_PHASOR,  // w = c * exp(-j*phi)
    OP_ROT_KK,  // rotation of the two swapped columns k-1, k of R
    OP_ROT_R,   // rotation of rows k-1, k of R in column j > k
    OP_ROT_Q    // rotation of columns k-1, k of Q in row j
  } op_e;

  function automatic data_t sat_data(input logic signed [2*W+1:0] v);
    logic signed [2*W+1:0] maxv, minv;
    maxv = (2*W+2)'((1 <<< (W-1)) - 1);
    minv = -(2*W+2)'(1 <<< (W-1));
    if (v > maxv) return data_t'(maxv[W-1:0]);
    else if (v < minv) return data_t'(minv[W-1:0]);
    else return data_t'(v[W-1:0]);
  endfunction

  function automatic tdata_t sat_t(input logic signed [TW+MUW+2:0] v);
    logic signed [TW+MUW+2:0] maxv, minv;
    maxv = (TW+MUW+3)'((1 <<< (TW-1)) - 1);
    minv = -(TW+MUW+3)'(1 <<< (TW-1));
    if (v > maxv) return tdata_t'(maxv[TW-1:0]);
    else if (v < minv) return tdata_t'(minv[TW-1:0]);
    else return tdata_t'(v[TW-1:0]);
  endfunction

endpackage
