// qec_top: quadrature error corrector (QEC) with minimum total delay tracking.
//
// Four input clocks I, Q, IB, QB (nominally 90 degrees apart, but skewed) pass
// through four main-path DCDLs with codes C_I, C_Q, C_IB, C_QB. The calibration
// loop measures the corrected outputs and adjusts those codes until every
// adjacent pair is exactly T/4 apart:
//   EN (qec_en)        gates the outputs into the loop while EN_B = 1;
//   signal selector    rotates over the adjacent pairs (I,Q) (Q,IB) (IB,QB) (QB,I);
//   QED                delays the leading clock by the quadrature DCDL (C_QUAD),
//                      the lagging one by an identical DCDL at minimum code,
//                      compares them in a bang-bang detector and deserializes
//                      four results per CLK_LF,PRE cycle;
//   DLF + UCON         move exactly one of the five codes per update. When
//                      all four adjacent gaps equal t_quad they also sum to T,
//                      so t_quad = T/4; the UDS rule keeps one main code at 0,
//                      which is the solution with the least added delay;
//   ENS                turns the loop on and off from the asynchronous CAL.
// Codes hold while CAL = 0; the main path keeps running.
// The DCDLs are behavioural models (qec_dcdl), everything else is
// synthesizable. Per update the loop needs three CLK_LF cycles, i.e. 15 input
// clock periods. Reset (asynchronous, active low) clears all codes.
`timescale 1ps / 10fs
module qec_top
  import qec_pkg::*;
#(
  parameter int unsigned MAIN_CODE_W = 7,
  parameter int unsigned QUAD_CODE_W = 8,
  parameter real         LSB_PS      = 1.23,
  parameter int unsigned SEQ_DLY     = 16
) (
  input  logic                                rst_n,
  input  logic                                cal,
  input  logic [N_PHASE-1:0]                  clk_in,
  output logic [N_PHASE-1:0]                  clk_out,
  output logic [N_PHASE-1:0][MAIN_CODE_W-1:0] code_main,
  output logic [QUAD_CODE_W-1:0]              code_quad,
  output logic                                uds_up,
  output logic                                en_a,
  output logic                                en_b,
  output qec_mode_e                           mode
);

  logic [N_PHASE-1:0] clk_gated, sel1;
  logic               o_mux0, o_mux1, o_mux0d, o_mux1d;
  logic [N_PHASE-1:0] des_bb, des_tag;
  logic               clk_lf_pre, clk_lf;

  // main clock path
  for (genvar k = 0; k < N_PHASE; k++) begin : g_main
    qec_dcdl #(.CODE_W(MAIN_CODE_W), .LSB_PS(LSB_PS)) u_dcdl (
      .clk_i (clk_in[k]),
      .code  (code_main[k]),
      .clk_o (clk_out[k])
    );
  end

  qec_en #(.N_PHASE(N_PHASE)) u_en (
    .clk_i (clk_out),
    .en_b  (en_b),
    .clk_o (clk_gated)
  );

  qec_sig_sel #(.N_PHASE(N_PHASE)) u_sig_sel (
    .rst_n  (rst_n),
    .clk_ph (clk_gated),
    .o_mux0 (o_mux0),
    .o_mux1 (o_mux1),
    .sel1   (sel1)
  );

  // quadrature error detector: delay lines and digital part
  qec_dcdl #(.CODE_W(QUAD_CODE_W), .LSB_PS(LSB_PS)) u_dcdl_quad0 (
    .clk_i (o_mux0),
    .code  (code_quad),
    .clk_o (o_mux0d)
  );

  qec_dcdl #(.CODE_W(QUAD_CODE_W), .LSB_PS(LSB_PS)) u_dcdl_quad1 (
    .clk_i (o_mux1),
    .code  ('0),
    .clk_o (o_mux1d)
  );

  qec_qed #(.DES_W(N_PHASE)) u_qed (
    .rst_n      (rst_n),
    .o_mux0d    (o_mux0d),
    .o_mux1d    (o_mux1d),
    .sel1_3     (sel1[N_PHASE-1]),
    .des_bb     (des_bb),
    .des_tag    (des_tag),
    .clk_lf_pre (clk_lf_pre)
  );

  qec_ens #(.SEQ_DLY(SEQ_DLY)) u_ens (
    .clk_ref    (clk_out[0]),
    .rst_n      (rst_n),
    .cal        (cal),
    .clk_lf_pre (clk_lf_pre),
    .en_a       (en_a),
    .en_b       (en_b),
    .clk_lf     (clk_lf)
  );

  qec_dlf #(.MAIN_CODE_W(MAIN_CODE_W), .QUAD_CODE_W(QUAD_CODE_W)) u_dlf (
    .clk_lf    (clk_lf),
    .rst_n     (rst_n),
    .des_bb    (des_bb),
    .des_tag   (des_tag),
    .code_main (code_main),
    .code_quad (code_quad),
    .uds_up    (uds_up),
    .mode      (mode)
  );

endmodule
