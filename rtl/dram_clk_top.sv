// dram_clk_top: the clock-path circuits of a high-speed DRAM interface, side
// by side.
//
// Three independent circuits, each with its own ports:
//  * qec_*  quadrature error corrector (qec_top): removes the skew between
//           four quadrature clocks with the least added delay, and can switch
//           its calibration loop off asynchronously;
//  * rx_*   forwarded-clock receiver (fcrx_top): four DQ lanes sampled by a
//           DQS path whose delay a two-stage DLL holds at N UI against voltage
//           and temperature drift;
//  * ct_*   the divide-by-2 of the open-loop compensated clock tree
//           (ct_cml_div), turning the global clock into a quadrature clock.
//           The rest of that clock tree (CML buffers, CML-to-CMOS converter,
//           current-starved inverters, bias generator) is analog and has no
//           model here; its output ports carry the divider's clocks.
// Nothing is shared between the three; each keeps its own reset.
`timescale 1ps / 10fs
module dram_clk_top (
  // quadrature error corrector
  input  logic                  qec_rst_n,
  input  logic                  qec_cal,
  input  logic [3:0]            qec_clk_in,
  output logic [3:0]            qec_clk_out,
  output logic [3:0][6:0]       qec_code_main,
  output logic [7:0]            qec_code_quad,
  output logic                  qec_uds_up,
  output logic                  qec_en_a,
  output logic                  qec_en_b,
  output logic [1:0]            qec_mode,       // qec_pkg::qec_mode_e
  // forwarded-clock receiver
  input  logic                  rx_rst_n,
  input  logic                  rx_dqs_t_amp,
  input  logic                  rx_dqs_c_amp,
  input  logic                  rx_dqs_c_in,
  input  logic [3:0]            rx_dq,
  input  logic                  rx_cfg_run,
  input  logic                  rx_cfg_coarse_sweep,
  input  logic [2:0]            rx_cfg_gain1,
  input  logic [2:0]            rx_cfg_gain2,
  output logic [3:0][15:0]      rx_data,
  output logic                  rx_data_valid,
  output logic [6:0]            rx_code1,
  output logic [6:0]            rx_code2,
  output logic [2:0]            rx_dlf_state,   // fcrx_pkg::fcrx_state_e
  output logic                  rx_lp1,
  output logic                  rx_lp2,
  output logic                  rx_dqs_i,
  output logic [3:0]            rx_clk_iq,
  // clock-tree divider
  input  logic                  ct_rst_n,
  input  logic                  ct_clk,
  output logic [3:0]            ct_clk_iq
);

  qec_pkg::qec_mode_e    qec_mode_e_w;
  fcrx_pkg::fcrx_state_e rx_state_e_w;

  assign qec_mode     = qec_mode_e_w;
  assign rx_dlf_state = rx_state_e_w;

  qec_top u_qec (
    .rst_n     (qec_rst_n),
    .cal       (qec_cal),
    .clk_in    (qec_clk_in),
    .clk_out   (qec_clk_out),
    .code_main (qec_code_main),
    .code_quad (qec_code_quad),
    .uds_up    (qec_uds_up),
    .en_a      (qec_en_a),
    .en_b      (qec_en_b),
    .mode      (qec_mode_e_w)
  );

  fcrx_top u_rx (
    .rst_n            (rx_rst_n),
    .dqs_t_amp        (rx_dqs_t_amp),
    .dqs_c_amp        (rx_dqs_c_amp),
    .dqs_c_in         (rx_dqs_c_in),
    .dq               (rx_dq),
    .cfg_run          (rx_cfg_run),
    .cfg_coarse_sweep (rx_cfg_coarse_sweep),
    .cfg_gain1        (rx_cfg_gain1),
    .cfg_gain2        (rx_cfg_gain2),
    .data             (rx_data),
    .data_valid       (rx_data_valid),
    .code1            (rx_code1),
    .code2            (rx_code2),
    .dlf_state        (rx_state_e_w),
    .lp1              (rx_lp1),
    .lp2              (rx_lp2),
    .dqs_i            (rx_dqs_i),
    .clk_iq           (rx_clk_iq)
  );

  ct_cml_div u_ct_div (
    .clk    (ct_clk),
    .rst_n  (ct_rst_n),
    .clk_iq (ct_clk_iq)
  );

endmodule
