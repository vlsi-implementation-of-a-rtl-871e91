// rslll_fsm: reactive controller of the RS-LLL core (Alg. 1 without the final
// size reduction, with early termination after SMAX column swaps).
//
// Schedule of one matrix (0-based column index kk; the document's k = kk + 1):
//   IDLE  : ready. A start pulse swaps the memory banks (the host's freshly
//           loaded Q and R become the working bank).
//   INIT  : T <- I, kk <- MT-1, swap counter S <- 0.
//   CHECK : the multipliers evaluate the Siegel criterion of all MT-1 adjacent
//           pairs at once. If S = SMAX the run ends (early termination).
//           Otherwise kk jumps straight to the largest index <= kk whose pair
//           needs a swap, so the descending k <- k-1 steps cost no cycles; if no
//           pair <= kk needs one, the run ends.
//   DIV   : divider computes mu = round(R(kk-1,kk)/R(kk-1,kk-1)) and the
//           size-reduced R(kk-1,kk).
//   SRED  : size reduction + column exchange of R (rows above kk-1) on the
//           multipliers, of T in the T memory; vectoring is started.
//   VEC   : wait for the CORDIC (6 cycles); in its last cycle w = c*phasor.
//   ROTKK : rotation of the swapped column pair of R.
//   ROTR  : rotation of rows kk-1, kk of R, columns kk+1..MT-1 (one per cycle).
//   ROTQ  : rotation of columns kk-1, kk of Q, rows 0..MR-1 (one per cycle);
//           then S <- S+1, kk <- min(kk+1, MT-1), back to CHECK.
//   DONE  : one-cycle done pulse, back to IDLE.
// A swap therefore costs 11 + (MT-1-kk) + MR cycles; a matrix costs 3 cycles
// plus its swaps. The algorithm, the three parallel Siegel checks and the
// swap-count based early termination follow the document; the state
// breakdown and timing are this design's own.
module rslll_fsm
  import rslll_pkg::*;
#(
  parameter int MT   = 4,
  parameter int MR   = 4,
  parameter int SMAX = 20,
  localparam int SW  = $clog2(SMAX + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          ready,
  output logic          busy,
  output logic          done,
  output logic          early_term,    // last run ended because S reached SMAX
  output logic [SW-1:0] swaps,         // column swaps of the current/last run
  // to the data path
  input  logic [MT-2:0] siegel_ok,
  input  logic          vec_done,
  output op_e           op,
  output idx_t          kk,
  output idx_t          j,
  output logic          mem_swap,
  output logic          t_init,
  output logic          t_mac_swap,
  output logic          div_start,
  output logic          vec_start,
  output logic          w_load
);

  typedef enum logic [3:0] {
    S_IDLE, S_INIT, S_CHECK, S_DIV, S_SRED, S_VEC, S_ROTKK, S_ROTR, S_ROTQ, S_DONE
  } state_e;

  state_e state;

  // largest pair index kk' <= kk whose Siegel criterion asks for a swap
  logic found;
  idx_t kk_next;
  always_comb begin
    found   = 1'b0;
    kk_next = kk;
    for (int m = 0; m < MT - 1; m++) begin
      if (siegel_ok[m] && (m + 1) <= int'(kk)) begin
        found   = 1'b1;
        kk_next = idx_t'(m + 1);
      end
    end
  end

  always_comb begin
    op         = OP_NONE;
    mem_swap   = 1'b0;
    t_init     = 1'b0;
    t_mac_swap = 1'b0;
    div_start  = 1'b0;
    vec_start  = 1'b0;
    w_load     = 1'b0;
    unique case (state)
      S_IDLE:  mem_swap = start;
      S_INIT:  t_init = 1'b1;
      S_CHECK: op = OP_SIEGEL;
      S_DIV:   div_start = 1'b1;
      S_SRED:  begin op = OP_SRED; t_mac_swap = 1'b1; vec_start = 1'b1; end
      S_VEC:   if (vec_done) begin op = OP_PHASOR; w_load = 1'b1; end
      S_ROTKK: op = OP_ROT_KK;
      S_ROTR:  op = OP_ROT_R;
      S_ROTQ:  op = OP_ROT_Q;
      default: ;
    endcase
  end

  assign ready = (state == S_IDLE);
  assign busy  = (state != S_IDLE);
  assign done  = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      kk         <= '0;
      j          <= '0;
      swaps      <= '0;
      early_term <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE:  if (start) state <= S_INIT;
        S_INIT: begin
          kk         <= idx_t'(MT - 1);
          swaps      <= '0;
          early_term <= 1'b0;
          state      <= S_CHECK;
        end
        S_CHECK: begin
          if (int'(swaps) >= SMAX) begin
            early_term <= 1'b1;
            state      <= S_DONE;
          end else if (!found) begin
            state <= S_DONE;
          end else begin
            kk    <= kk_next;
            state <= S_DIV;
          end
        end
        S_DIV:   state <= S_SRED;
        S_SRED:  state <= S_VEC;
        S_VEC:   if (vec_done) state <= S_ROTKK;
        S_ROTKK: begin
          if (int'(kk) < MT - 1) begin
            j     <= kk + idx_t'(1);
            state <= S_ROTR;
          end else begin
            j     <= '0;
            state <= S_ROTQ;
          end
        end
        S_ROTR: begin
          if (int'(j) == MT - 1) begin
            j     <= '0;
            state <= S_ROTQ;
          end else begin
            j <= j + idx_t'(1);
          end
        end
        S_ROTQ: begin
          if (int'(j) == MR - 1) begin
            j     <= '0;
            swaps <= swaps + SW'(1);
            if (int'(kk) < MT - 1) kk <= kk + idx_t'(1);
            state <= S_CHECK;
          end else begin
            j <= j + idx_t'(1);
          end
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // handshake rules
  a_start_only_idle: assert property (@(posedge clk) disable iff (!rst_n)
    mem_swap |-> state == S_IDLE);
  a_swaps_bounded: assert property (@(posedge clk) disable iff (!rst_n)
    int'(swaps) <= SMAX);
  a_kk_range: assert property (@(posedge clk) disable iff (!rst_n)
    (state != S_IDLE && state != S_INIT) |-> (kk >= 1 && int'(kk) <= MT - 1));

endmodule
