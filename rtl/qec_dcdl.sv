// qec_dcdl: behavioural model of a digitally-controlled delay line (DCDL).
//
// Behavioural model, not synthesizable logic. The real delay line is a pair
// of NAND-lattice coarse lines merged by a pipelined phase interpolator; that
// analog structure is not modelled. What is modelled is the code-to-delay
// relation, taken as linear:
//   delay = T0_PS + code * LSB_PS   (picoseconds)
// The 1.23 ps step follows the measured average resolution of the main-path
// line; the intrinsic delay T0_PS and the code width are this model's choices.
// Each edge of clk_i is scheduled separately (transport delay), so a delay
// longer than half a clock period still reproduces the clock correctly.
// A code change affects edges that enter after the change.
// The delay is a run-time value, so lint cannot prove it non-zero; it never
// is, since T0_PS > 0 (hence its zero-delay note on the two # controls).
`timescale 1ps / 10fs
module qec_dcdl #(
  parameter int unsigned CODE_W = 7,
  parameter real         LSB_PS = 1.23,
  parameter real         T0_PS  = 20.0
) (
  input  logic              clk_i,
  input  logic [CODE_W-1:0] code,
  output logic              clk_o
);

  realtime     dly;
  realtime     t_rise, t_fall;   // when the last rising / falling edge left

  always_comb dly = T0_PS + LSB_PS * real'(code);

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

  // high when the latest edge to come out was a rising one
  always_comb clk_o = (t_rise > t_fall);

endmodule
