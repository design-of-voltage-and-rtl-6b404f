// fcrx_pd2: second-stage phase detector of the receiver DLL.
//
// Two flip-flops sample the DQ sampling strobe DQS_I: PD_t on the rising edge
// of DQS_edge_t and PD_c on the rising edge of DQS_edge_c. A 1 means DQS_I
// was already high, i.e. its rising edge came before the sampling edge. The
// pair (PD_c, PD_t) tells between which edges the rising edge of DQS_I lies,
// which sets the lock point of the second stage. Asynchronous active-low
// reset to 0.
`timescale 1ps / 10fs
module fcrx_pd2 (
  input  logic rst_n,
  input  logic edge_t,
  input  logic edge_c,
  input  logic dqs_i,
  output logic pd_t,
  output logic pd_c
);

  always_ff @(posedge edge_t or negedge rst_n) begin
    if (!rst_n) pd_t <= 1'b0;
    else        pd_t <= dqs_i;
  end

  always_ff @(posedge edge_c or negedge rst_n) begin
    if (!rst_n) pd_c <= 1'b0;
    else        pd_c <= dqs_i;
  end

endmodule
