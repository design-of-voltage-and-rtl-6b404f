// fcrx_dq_sampler: DQ samplers of the receiver.
//
// Every DQ lane is sampled on the rising edges of the four quadrature clocks
// (I, Q, IB, QB), so each lane has one sampler per phase and each sampler
// runs at a quarter of the data rate. smp[l][p] is lane l sampled by phase p.
// The samplers are modelled as edge-triggered flip-flops (their circuit is
// not part of this design). Asynchronous active-low reset to 0.
`timescale 1ps / 10fs
module fcrx_dq_sampler #(
  parameter int unsigned LANES = 4
) (
  input  logic                  rst_n,
  input  logic [3:0]            clk_iq,
  input  logic [LANES-1:0]      dq,
  output logic [LANES-1:0][3:0] smp
);

  for (genvar p = 0; p < 4; p++) begin : g_ph
    logic [LANES-1:0] s;

    always_ff @(posedge clk_iq[p] or negedge rst_n) begin
      if (!rst_n) s <= '0;
      else        s <= dq;
    end

    for (genvar l = 0; l < LANES; l++) begin : g_ln
      always_comb smp[l][p] = s[l];
    end
  end

endmodule
