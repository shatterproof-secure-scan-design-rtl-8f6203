// sss_pkg: shared type of the shatterproof secure scan (SSS) design.
//
// The scan enable of every scan cell, called "c" at the chip level, selects
// between two modes: normal (functional) mode, in which each flip-flop
// captures its functional data, and shift-register (scan) mode, in which the
// flip-flops form a chain that is shifted one bit per clock. The encoding
// (1 = shift) follows the test procedure of the design; the enum itself is
// this implementation's convenience.
package sss_pkg;

  typedef enum logic {
    NORMAL_MODE = 1'b0,
    SHIFT_MODE  = 1'b1
  } scan_mode_e;

endpackage
