// fcrx_iq_div: I-Q divider of the receiver DQS path.
//
// Divides the DQ sampling strobe DQS_I by two into four clocks 90 degrees
// apart: I toggles on every rising edge of DQS_I, Q copies I on the falling
// edge of DQS_I (half an input period = a quarter output period later), IB
// and QB are their complements. At a 3.2 GHz DQS the outputs run at 1.6 GHz
// and their four rising edges are one 6.4 Gb/s unit interval apart.
// clk_iq = {QB, IB, Q, I}. The flip-flop structure is this design's choice.
// Asynchronous active-low reset to I = Q = 0.
`timescale 1ps / 10fs
module fcrx_iq_div (
  input  logic       rst_n,
  input  logic       clk,
  output logic [3:0] clk_iq
);

  logic i_q, q_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) i_q <= 1'b0;
    else        i_q <= ~i_q;
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) q_q <= 1'b0;
    else        q_q <= i_q;
  end

  always_comb clk_iq = {~q_q, ~i_q, q_q, i_q};

endmodule
