// fcrx_pd_l1: behavioural model of the first-stage phase detector.
//
// Behavioural model, not synthesizable logic. In silicon this is a PMOS-input
// strong-arm latch that samples the low-swing (0 to 0.4 V) input DQS_c on the
// rising edge of DQS_edge_t. PD_L1 = 0 means DQS_c was low, i.e. the rising
// edge of DQS_edge_t came before the rising edge of DQS_c. Here the input is a
// logic level and the decision appears TCQ_PS after the clock edge; offset and
// metastability are not modelled.
`timescale 1ps / 10fs
module fcrx_pd_l1 #(
  parameter real TCQ_PS = 10.0
) (
  input  logic clk,    // DQS_edge_t
  input  logic d,      // DQS_c
  output logic q       // PD_L1
);

  initial q = 1'b0;

  always @(posedge clk) begin
    automatic logic s = d;
    fork
      begin
        #(TCQ_PS) q <= s;
      end
    join_none
  end

endmodule
