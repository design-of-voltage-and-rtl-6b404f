// fcrx_top: forwarded-clock receiver with a DLL-based self-tracking loop.
//
// In an unmatched DRAM receiver the DQ path has no replica of the DQS path
// delay, so after write training any voltage or temperature drift of the DQS
// path moves the sampling point off the eye centre. Here the DQS path delay
// itself is held at N UI by two cascaded DLLs, so the sampling point found by
// write training stays put without re-training and without DQ transitions:
//   stage 1: DCDL1 delays the amplified DQS_t/DQS_c into DQS_edge_t/_c; PD_L1
//            samples the raw DQS_c with DQS_edge_t, so DQS_edge_t is aligned
//            to an edge of the input DQS (N1 UI);
//   stage 2: DCDL2 delays DQS_edge_t into the sampling strobe DQS_I; PD2
//            samples DQS_I with DQS_edge_t and DQS_edge_c, so DQS_I is aligned
//            to an edge of DQS_edge (N2 UI).
// Splitting the loop lets each detector compare two signals that are close in
// time, so it works with a burst-mode (non-continuous) DQS. The DLF sets the
// lock points at minimum delay, optionally coarse-sweeps, then tracks.
// DQS_I is divided into four quadrature clocks that sample each DQ lane; the
// samples are deserialized 1:4 per phase into 16-bit words. The deserializer's
// word counter also gives the slow clock (I clock / 4) of the DLF.
// The DCDLs and PD_L1 are behavioural models; the input amplifier, clock
// buffers and the I2C block are not part of this RTL: the amplified DQS and
// the loop settings are ports.
`timescale 1ps / 10fs
module fcrx_top
  import fcrx_pkg::*;
#(
  parameter int unsigned LANES    = 4,
  parameter real         TNAND_PS = 15.0,
  parameter int unsigned SETTLE   = 8
) (
  input  logic                     rst_n,
  input  logic                     dqs_t_amp,     // amplified DQS_t
  input  logic                     dqs_c_amp,     // amplified DQS_c
  input  logic                     dqs_c_in,      // low-swing DQS_c to PD_L1
  input  logic [LANES-1:0]         dq,
  input  logic                     cfg_run,
  input  logic                     cfg_coarse_sweep,
  input  logic [2:0]               cfg_gain1,
  input  logic [2:0]               cfg_gain2,
  output logic [LANES-1:0][15:0]   data,
  output logic                     data_valid,
  output logic [CODE_W-1:0]        code1,
  output logic [CODE_W-1:0]        code2,
  output fcrx_state_e              dlf_state,
  output logic                     lp1,           // stage-1 lock point
  output logic                     lp2,           // stage-2 lock point
  output logic                     dqs_i,
  output logic [3:0]               clk_iq
);

  logic [N_COARSE-1:0]   cu1, cd1, cu2, cd2;
  logic [FINE_STEPS-1:0] fs1, fs2;
  logic                  edge_t, edge_c, pd_l1, pd_t, pd_c, clk_dlf;
  logic [LANES-1:0][3:0] smp;

  // stage 1
  fcrx_dcdl_dec u_dec1 (.code(code1), .cu(cu1), .cd(cd1), .fsel(fs1));

  fcrx_dcdl #(.TNAND_PS(TNAND_PS)) u_dcdl1_t (
    .clk_i(dqs_t_amp), .cu(cu1), .cd(cd1), .fsel(fs1), .clk_o(edge_t));
  fcrx_dcdl #(.TNAND_PS(TNAND_PS)) u_dcdl1_c (
    .clk_i(dqs_c_amp), .cu(cu1), .cd(cd1), .fsel(fs1), .clk_o(edge_c));

  fcrx_pd_l1 u_pd_l1 (.clk(edge_t), .d(dqs_c_in), .q(pd_l1));

  // stage 2
  fcrx_dcdl_dec u_dec2 (.code(code2), .cu(cu2), .cd(cd2), .fsel(fs2));

  fcrx_dcdl #(.TNAND_PS(TNAND_PS)) u_dcdl2 (
    .clk_i(edge_t), .cu(cu2), .cd(cd2), .fsel(fs2), .clk_o(dqs_i));

  fcrx_pd2 u_pd2 (.rst_n(rst_n), .edge_t(edge_t), .edge_c(edge_c), .dqs_i(dqs_i),
                  .pd_t(pd_t), .pd_c(pd_c));

  // sampling clocks and data path
  fcrx_iq_div u_div (.rst_n(rst_n), .clk(dqs_i), .clk_iq(clk_iq));

  fcrx_dq_sampler #(.LANES(LANES)) u_smp (.rst_n(rst_n), .clk_iq(clk_iq), .dq(dq), .smp(smp));

  fcrx_des #(.LANES(LANES), .RATIO(4)) u_des (
    .clk(clk_iq[0]), .rst_n(rst_n), .smp(smp), .data(data), .valid(data_valid),
    .clk_div(clk_dlf));

  // loop filter
  fcrx_dlf #(.SETTLE(SETTLE)) u_dlf (
    .clk(clk_dlf), .rst_n(rst_n), .run(cfg_run), .coarse_sweep(cfg_coarse_sweep),
    .gain1(cfg_gain1), .gain2(cfg_gain2), .pd_l1(pd_l1), .pd_t(pd_t), .pd_c(pd_c),
    .code1(code1), .code2(code2), .state(dlf_state), .lp1(lp1), .lp2(lp2));

endmodule
