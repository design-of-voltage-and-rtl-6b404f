// fcrx_dcdl: behavioural model of the receiver DCDL.
//
// Behavioural model, not synthesizable logic. Two NAND coarse lines delay the
// input by 2 t_NAND per enabled stage (the number of ones in CU and CD); a
// tri-state-inverter phase interpolator mixes the two with weight w/15 on
// CLKD, w = number of ones in FSEL, taken as linear:
//   delay = T0_PS + ((15 - w) * nU + w * nD) * 2 * TNAND_PS / 15
// t_NAND and the intrinsic delay T0_PS are this model's values. Edges are
// delayed one by one (transport delay), so delays above half a period work.
// The delay is a run-time value, so lint cannot prove it non-zero; it never
// is, since T0_PS > 0 (hence its zero-delay note on the two # controls).
`timescale 1ps / 10fs
module fcrx_dcdl #(
  parameter real TNAND_PS = 15.0,
  parameter real T0_PS    = 20.0
) (
  input  logic        clk_i,
  input  logic [5:0]  cu,
  input  logic [5:0]  cd,
  input  logic [14:0] fsel,
  output logic        clk_o
);

  realtime     dly;
  realtime     t_rise, t_fall;   // when the last rising / falling edge left

  always_comb begin
    real nu, nd, w;
    nu  = real'($countones(cu));
    nd  = real'($countones(cd));
    w   = real'($countones(fsel));
    dly = T0_PS + ((15.0 - w) * nu + w * nd) * 2.0 * TNAND_PS / 15.0;
  end

  initial begin
    t_rise = 0.0;
    t_fall = 0.0;
  end

  always @(posedge clk_i) fork
    begin
      #(dly) t_rise <= $realtime;
    end
  join_none

  always @(negedge clk_i) fork
    begin
      #(dly) t_fall <= $realtime;
    end
  join_none

  always_comb clk_o = (t_rise > t_fall);

endmodule
