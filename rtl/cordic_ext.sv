// cordic_ext: extended master-slave CORDIC of the RS-LLL data path.
//
// Two jobs share this unit.
//
// Division (div_start): computes the size-reduction coefficient
//   mu = round(num / den)   (num complex, den real and non-negative)
// separately for the real and imaginary part with a three-step non-restoring
// divider on 2|num|, which yields q = floor(2|num|/den) in 0..7. A small
// rounding table maps q to |mu| in 0..3 (q = 7 and any overflow saturate to 3),
// so no adder is needed for the rounding. The remainder of the divider gives
// the size-reduced entry num - mu*den as a side product. Results are registered:
// they are valid (div_valid) one cycle after div_start.
//
// Complex Givens vectoring (vec_start): for a = vec_a (complex) and b = vec_b
// (real, non-negative) it returns the phasor p = exp(-j*phi), phi = arg(a), and
// c = |a|/r, s = b/r with r = sqrt(|a|^2 + b^2). The master CORDIC first rotates
// a onto the real axis (stage 1), then rotates (|a|, b) onto the real axis
// (stage 2); each stage is nine micro-rotations, three per clock cycle. The
// slave CORDIC repeats the master's micro-rotation directions on the vector
// (1/K, 0), so it ends on the unit phasor of the master's total rotation
// without a gain-correction multiplier. Stage 2's input b is pre-scaled by the
// CORDIC gain K with a constant multiplier so that both components of the
// stage-2 vector carry the same gain. Results appear with vec_done six cycles
// after vec_start. The master-slave arrangement, three micro-rotations per
// cycle, nine micro-rotations and the divider inside the CORDIC follow the
// document; the two-stage split, internal widths and the rounding table
// contents are this design's choices.
module cordic_ext
  import rslll_pkg::*;
#(
  parameter int NIT   = 9,  // micro-rotations per vectoring stage
  parameter int PERCY = 3   // micro-rotations per clock cycle
) (
  input  logic     clk,
  input  logic     rst_n,
  // divider
  input  logic     div_start,
  input  cplx_t    div_num,
  input  data_t    div_den,
  output logic     div_valid,
  output mu_cplx_t mu,
  output logic     mu_nz,
  output logic     mu_sat,
  output cplx_t    div_rem,
  // vectoring
  input  logic     vec_start,
  input  cplx_t    vec_a,
  input  data_t    vec_b,
  output logic     vec_busy,
  output logic     vec_done,
  output cplx_t    phasor,
  output data_t    cos_o,
  output data_t    sin_o
);

  // ---------------------------------------------------------------- divider
  typedef struct packed {
    mu_t   mu;
    data_t rem;
    logic  sat;
  } divres_t;

  localparam logic [1:0] RND_LUT [8] = '{2'd0, 2'd1, 2'd1, 2'd2, 2'd2, 2'd3, 2'd3, 2'd3};

  localparam int DW = W + 5;

  function automatic divres_t divide(input data_t num, input data_t den);
    logic signed [DW-1:0] a_abs, aa, d, r, remv;
    logic [2:0]           q;
    logic                 ovf;
    logic [1:0]           mag;
    divres_t              res;
    a_abs = (num < 0) ? -DW'(num) : DW'(num);
    aa    = a_abs <<< 1;
    d     = DW'(den);
    ovf   = (aa >= (d <<< 3)) && (aa != 0);
    // three non-restoring steps, quotient bit weights 4, 2, 1
    r     = aa - (d <<< 2);
    q[2]  = (r >= 0);
    r     = q[2] ? r - (d <<< 1) : r + (d <<< 1);
    q[1]  = (r >= 0);
    r     = q[1] ? r - d : r + d;
    q[0]  = (r >= 0);
    if (!q[0]) r = r + d;                 // final correction
    mag   = ovf ? 2'(MUMAX) : RND_LUT[q];
    // remainder r = 2|num| - q*den  ->  |num| - mag*den = (r + (q - 2*mag)*den) / 2
    if (ovf)                           remv = a_abs - d - (d <<< 1);
    else if (q == 3'd7)                remv = (r + d) >>> 1;
    else if (q[0])                     remv = (r - d) >>> 1;
    else                               remv = r >>> 1;
    res.sat = ovf || (q == 3'd7);
    if (num < 0) begin
      res.mu  = -mu_t'({1'b0, mag});
      res.rem = sat_data(-(2*W+2)'(remv));
    end else begin
      res.mu  = mu_t'({1'b0, mag});
      res.rem = sat_data((2*W+2)'(remv));
    end
    return res;
  endfunction

  divres_t dre, dim;
  always_comb begin
    dre = divide(div_num.re, div_den);
    dim = divide(div_num.im, div_den);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_valid <= 1'b0;
      mu        <= '0;
      mu_nz     <= 1'b0;
      mu_sat    <= 1'b0;
      div_rem   <= '0;
    end else begin
      div_valid <= div_start;
      if (div_start) begin
        mu.re      <= dre.mu;
        mu.im      <= dim.mu;
        mu_nz      <= (dre.mu != 0) || (dim.mu != 0);
        mu_sat     <= dre.sat || dim.sat;
        div_rem.re <= dre.rem;
        div_rem.im <= dim.rem;
      end
    end
  end

  // -------------------------------------------------------------- vectoring
  localparam int G    = 2;             // guard bits below the data LSB
  localparam int IW   = W + 4 + G;     // internal width (gain growth up to K^2*sqrt(3)*8)
  // 1/K and K for nine micro-rotations, K = prod_{i=0..8} sqrt(1 + 2^(-2i)) = 1.646756,
  // in fixed point with 14 fractional bits
  localparam int KQF  = 14;
  localparam logic signed [IW-1:0] KINV = IW'(9949);   // round(2^14 / K)
  localparam logic signed [IW-1:0] KMUL = IW'(26980);  // round(2^14 * K)
  localparam int NCY  = NIT / PERCY;   // cycles per stage

  typedef logic signed [IW-1:0] iw_t;

  logic       stage;                   // 0: phi stage, 1: theta stage
  logic [3:0] cyc;
  iw_t        mx, my, sx, sy;          // master and slave vectors
  iw_t        nmx, nmy, nsx, nsy;
  iw_t        b_k;
  cplx_t      ph_q;

  // three micro-rotations of this cycle, shifts cyc*PERCY .. cyc*PERCY+PERCY-1
  always_comb begin
    iw_t tx, ty, ux, uy;
    int  sh;
    nmx = mx; nmy = my; nsx = sx; nsy = sy;
    for (int j = 0; j < PERCY; j++) begin
      sh = int'(cyc) * PERCY + j;
      tx = nmx; ty = nmy; ux = nsx; uy = nsy;
      if (ty >= 0) begin
        nmx = tx + (ty >>> sh);  nmy = ty - (tx >>> sh);
        nsx = ux + (uy >>> sh);  nsy = uy - (ux >>> sh);
      end else begin
        nmx = tx - (ty >>> sh);  nmy = ty + (tx >>> sh);
        nsx = ux - (uy >>> sh);  nsy = uy + (ux >>> sh);
      end
    end
  end

  function automatic data_t to_data(input iw_t v);
    logic signed [2*W+1:0] vw;
    vw = (2*W+2)'(v);
    return sat_data((vw + ((2*W+2)'(1) <<< (G-1))) >>> G);
  endfunction

  logic signed [2*IW-1:0] bprod;
  assign bprod = (2*IW)'(iw_t'(vec_b) <<< G) * (2*IW)'(KMUL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage    <= 1'b0;
      cyc      <= '0;
      vec_busy <= 1'b0;
      vec_done <= 1'b0;
      mx <= '0; my <= '0; sx <= '0; sy <= '0; b_k <= '0;
      ph_q     <= '0;
      phasor   <= '0;
      cos_o    <= '0;
      sin_o    <= '0;
    end else begin
      vec_done <= 1'b0;
      if (vec_start && !vec_busy) begin
        vec_busy <= 1'b1;
        stage    <= 1'b0;
        cyc      <= '0;
        b_k      <= iw_t'(bprod >>> KQF);
        // pre-rotation by pi for the left half plane keeps the angle in range
        if (vec_a.re < 0) begin
          mx <= -(iw_t'(vec_a.re) <<< G);  my <= -(iw_t'(vec_a.im) <<< G);
          sx <= -KINV;                     sy <= '0;
        end else begin
          mx <=  (iw_t'(vec_a.re) <<< G);  my <=  (iw_t'(vec_a.im) <<< G);
          sx <=  KINV;                     sy <= '0;
        end
      end else if (vec_busy) begin
        if (cyc == 4'(NCY - 1)) begin
          cyc <= '0;
          if (!stage) begin
            stage   <= 1'b1;
            ph_q.re <= to_data(nsx);
            ph_q.im <= to_data(nsy);
            mx <= nmx;  my <= b_k;         // (K|a|, K*b)
            sx <= KINV; sy <= '0;
          end else begin
            vec_busy <= 1'b0;
            vec_done <= 1'b1;
            phasor   <= ph_q;
            cos_o    <= to_data(nsx);
            sin_o    <= to_data(-nsy);
            mx <= nmx; my <= nmy; sx <= nsx; sy <= nsy;
          end
        end else begin
          cyc <= cyc + 4'd1;
          mx <= nmx; my <= nmy; sx <= nsx; sy <= nsy;
        end
      end
    end
  end

endmodule
