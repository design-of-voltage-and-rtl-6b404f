// qec_ucon: update controller (UCON) of the QEC loop filter.
//
// Input: the four bang-bang results of one measurement, bit k for pair
// (phase k, phase k+1), and the update direction state UDS. Output: which one
// of the five delay lines to move and in which direction.
//
// One comparison asks for three moves: BB[k] = 0 (leading clock early) asks to
// raise t_k, lower t_k+1 and raise t_quad; BB[k] = 1 asks the opposite. Summed
// over the four pairs the t_quad requests cancel unless all bits agree, and
// phase k is asked to move only where BB changes between pair k-1 and pair k:
//   raise t_k  when BB[k] = 0 and BB[k-1] = 1,
//   lower t_k  when BB[k] = 1 and BB[k-1] = 0.
// Selection:
//   BB = 0000 -> C_QUAD up;  BB = 1111 -> C_QUAD down (UDS plays no part);
//   otherwise UDS = DN picks a lowering candidate and UDS = UP a raising one,
//   the highest-numbered phase first when there are two candidates.
// The candidate rule follows the design; the tie-break order is chosen so that
// BB = 0101 (pairs (I,Q)..(QB,I)) gives "lower QB" or "raise IB".
// Purely combinational.
`timescale 1ps / 10fs
module qec_ucon
  import qec_pkg::*;
(
  input  logic [N_PHASE-1:0] bb,
  input  logic               uds_up,
  output qec_sel_e           sel,
  output logic               up
);

  logic [N_PHASE-1:0] inc_cand, dec_cand;

  always_comb begin
    for (int k = 0; k < N_PHASE; k++) begin
      inc_cand[k] = ~bb[k] &  bb[(k + N_PHASE - 1) % N_PHASE];
      dec_cand[k] =  bb[k] & ~bb[(k + N_PHASE - 1) % N_PHASE];
    end
  end

  always_comb begin
    sel = SEL_NONE;
    up  = 1'b0;
    if (bb == '0) begin
      sel = SEL_QUAD;
      up  = 1'b1;
    end else if (bb == '1) begin
      sel = SEL_QUAD;
      up  = 1'b0;
    end else if (uds_up) begin
      up = 1'b1;
      for (int k = 0; k < N_PHASE; k++)
        if (inc_cand[k]) sel = qec_sel_e'(k);
    end else begin
      up = 1'b0;
      for (int k = 0; k < N_PHASE; k++)
        if (dec_cand[k]) sel = qec_sel_e'(k);
    end
  end

endmodule
