// qec_sig_sel: signal selector of the QEC.
//
// Two one-hot clock multiplexers pick two adjacent phases 90 degrees apart:
// MUX0 outputs phase k (the leading clock), MUX1 outputs phase k+1. The MUX
// SEL generator (qec_sel_gen) rotates the pair over the four phases, one pair
// per rising edge of O_MUX0. SEL1 is also an output, because the error
// detector deserializes SEL1<3> to mark which comparison belongs to pair
// (QB, I).
// The multiplexers are AND-OR gates; with the select bits switched only while
// both the old and the new input are low, the outputs are glitch free.
`timescale 1ps / 10fs
module qec_sig_sel #(
  parameter int unsigned N_PHASE = 4
) (
  input  logic               rst_n,
  input  logic [N_PHASE-1:0] clk_ph,
  output logic               o_mux0,
  output logic               o_mux1,
  output logic [N_PHASE-1:0] sel1
);

  logic [N_PHASE-1:0] sel0;
  logic [N_PHASE-1:0] clk_next;   // clk_next[k] = phase k+1

  always_comb begin
    for (int k = 0; k < N_PHASE; k++) clk_next[k] = clk_ph[(k + 1) % N_PHASE];
  end

  always_comb o_mux0 = |(sel0 & clk_ph);
  always_comb o_mux1 = |(sel1 & clk_next);

  qec_sel_gen #(.N_PHASE(N_PHASE)) u_sel_gen (
    .rst_n  (rst_n),
    .clk_ph (clk_ph),
    .o_mux0 (o_mux0),
    .sel0   (sel0),
    .sel1   (sel1)
  );

endmodule
