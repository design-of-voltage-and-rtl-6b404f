// fcrx_dcdl_dec: code decoder of the receiver DCDL (dual coarse lines + PI).
//
// The DCDL has two NAND coarse lines, CLKU and CLKD, each enabled stage by
// stage by a 6-bit thermometer code (CU, CD), and a phase interpolator that
// mixes them with weight w/15 on CLKD (FSEL = 15-bit thermometer of w).
// The binary code c = 15 k + f (0..89) is decoded so that the delay is
// k + f/15 coarse steps:
//   k even: CLKU = k stages, CLKD = k+1 stages, w = f
//   k odd : CLKU = k+1 stages, CLKD = k stages, w = 15 - f
// At a coarse boundary the interpolator already sits fully on one line, so
// only the other, unweighted line changes: the coarse and fine controls are
// never switched together and the output does not jump (seamless boundary
// switching). The line structure and the seamless switching follow the
// design; this particular code mapping is this design's. Codes above 89 are
// treated as 89. Purely combinational.
`timescale 1ps / 10fs
module fcrx_dcdl_dec
  import fcrx_pkg::*;
(
  input  logic [CODE_W-1:0]     code,
  output logic [N_COARSE-1:0]   cu,
  output logic [N_COARSE-1:0]   cd,
  output logic [FINE_STEPS-1:0] fsel
);

  logic [CODE_W-1:0] c;
  logic [3:0]        k;     // coarse position 0..5
  logic [3:0]        f;     // fine step 0..14
  logic [3:0]        nu, nd, w;

  always_comb begin
    c  = (code > CODE_W'(CODE_MAX)) ? CODE_W'(CODE_MAX) : code;
    k  = 4'(c / CODE_W'(FINE_STEPS));
    f  = 4'(c % CODE_W'(FINE_STEPS));
    if (!k[0]) begin
      nu = k;
      nd = k + 4'd1;
      w  = f;
    end else begin
      nu = k + 4'd1;
      nd = k;
      w  = 4'(FINE_STEPS) - f;
    end
    cu   = N_COARSE'((1 << nu) - 1);
    cd   = N_COARSE'((1 << nd) - 1);
    fsel = FINE_STEPS'((1 << w) - 1);
  end

endmodule
