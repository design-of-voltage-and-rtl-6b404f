// qec_en: enable circuit (EN) in front of the QEC signal selector.
//
// Four AND gates. While EN_B is 1 each output follows the corresponding
// corrected clock (I_OUT, Q_OUT, IB_OUT, QB_OUT); while EN_B is 0 the outputs
// are held low, which stops the signal selector, the error detector and the
// clock that the detector derives for the loop filter. This is the gating the
// calibration on/off scheme uses to save power once the skew is corrected.
// Purely combinational.
`timescale 1ps / 10fs
module qec_en #(
  parameter int unsigned N_PHASE = 4
) (
  input  logic [N_PHASE-1:0] clk_i,
  input  logic               en_b,
  output logic [N_PHASE-1:0] clk_o
);

  always_comb clk_o = clk_i & {N_PHASE{en_b}};

endmodule
