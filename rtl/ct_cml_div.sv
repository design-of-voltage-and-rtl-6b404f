// ct_cml_div: behavioural model of the DFF-based CML divide-by-2.
//
// Behavioural model, not synthesizable logic. In the clock tree the 12 GHz
// CML clock is divided by a master-slave pair of CML latches into a 6 GHz
// quadrature clock. Here the master takes the inverted slave output on the
// rising input edge and the slave copies the master on the falling edge, each
// TCQ_PS after its edge, so the slave lags the master by half an input period,
// a quarter of the output period:
//   clk_iq = {QB, IB, Q, I} = {~slave, ~master, slave, master}.
// The self-oscillation frequency and input-swing sensitivity of the real
// divider are analog properties and are not modelled. rst_n clears both
// latches (a model convenience; the CML divider has no reset).
`timescale 1ps / 10fs
module ct_cml_div #(
  parameter real TCQ_PS = 5.0
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic [3:0] clk_iq
);

  logic m, s;

  initial begin
    m = 1'b0;
    s = 1'b0;
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) m <= 1'b0;
    else begin
      automatic logic nv = ~s;
      fork
        begin
          #(TCQ_PS) m <= nv;
        end
      join_none
    end
  end

  always @(negedge clk or negedge rst_n) begin
    if (!rst_n) s <= 1'b0;
    else begin
      automatic logic nv = m;
      fork
        begin
          #(TCQ_PS) s <= nv;
        end
      join_none
    end
  end

  always_comb clk_iq = {~s, ~m, s, m};

endmodule
