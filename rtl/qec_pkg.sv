// qec_pkg: types and constants shared by the quadrature error corrector (QEC).
//
// The QEC works on four clock phases numbered in the order they rise:
// 0 = I, 1 = Q, 2 = IB, 3 = QB. Pair k of the signal selector is
// (phase k, phase k+1 mod 4): (I,Q), (Q,IB), (IB,QB), (QB,I). Bit k of every
// 4-bit bang-bang word in the DLF belongs to pair k after reordering.
// The five delay lines the update controller may touch are the four main-path
// DCDLs and the quadrature DCDL of the error detector.
// A module that imports the package but uses only some of its constants gets
// lint notes about the others; they are harmless.
`timescale 1ps / 10fs
package qec_pkg;

  localparam int unsigned N_PHASE = 4;

  // Which delay line the update controller selects in one update.
  typedef enum logic [2:0] {
    SEL_I    = 3'd0,
    SEL_Q    = 3'd1,
    SEL_IB   = 3'd2,
    SEL_QB   = 3'd3,
    SEL_QUAD = 3'd4,
    SEL_NONE = 3'd7
  } qec_sel_e;

  // MODE counter of the DLF (with the rest cycle).
  typedef enum logic [1:0] {
    MODE_COMPUTE = 2'd0,  // retime DES BB_OUT, choose DCDL, compute new code
    MODE_UPDATE  = 2'd1,  // write the computed code into the DCDL register
    MODE_REST    = 2'd2   // let the DCDL settle; the word measured now is dropped
  } qec_mode_e;

endpackage
