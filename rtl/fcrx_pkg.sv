// fcrx_pkg: constants and types shared by the forwarded-clock receiver.
//
// DCDL code format: code = FINE_STEPS * k + f, k = coarse position, f = fine
// (phase interpolator) step. One coarse step is 2 NAND delays and the
// interpolator divides it into FINE_STEPS = 15 steps. With N_COARSE = 6
// thermometer bits per coarse line the largest code is 15*5 + 14 = 89.
// A module that imports the package but uses only some of its constants gets
// lint notes about the others; they are harmless.
`timescale 1ps / 10fs
package fcrx_pkg;

  localparam int unsigned FINE_STEPS = 15;
  localparam int unsigned N_COARSE   = 6;
  localparam int unsigned CODE_W     = 7;
  localparam int unsigned CODE_MAX   = FINE_STEPS * (N_COARSE - 1) + FINE_STEPS - 1;  // 89

  // Flow of the digital loop filter.
  typedef enum logic [2:0] {
    ST_IDLE   = 3'd0,   // loop stopped, codes at minimum
    ST_LOCKPT = 3'd1,   // wait at minimum codes, then record the lock points
    ST_CS1    = 3'd2,   // coarse sweep of DCDL1
    ST_CS2    = 3'd3,   // coarse sweep of DCDL2
    ST_TRACK  = 3'd4    // both codes follow their phase detectors
  } fcrx_state_e;

endpackage
