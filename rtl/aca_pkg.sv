// aca_pkg: types shared by the accuracy-configurable adder blocks.
//
// acc_mode_e selects how the subadder boundaries of a SARA adder take their
// carry: ACC_ACCURATE passes the real carry at every boundary (the adder is a
// plain ripple-carry adder), ACC_APPROX uses the carry prediction at every
// boundary (shortest carry chain), ACC_DAR lets the delay-adaptive detector
// choose per boundary from the operands. The three-way encoding is this
// design's choice; the source describes the two fixed modes and the adaptive
// technique but no encoding.
package aca_pkg;

  typedef enum logic [1:0] {
    ACC_ACCURATE = 2'd0,
    ACC_APPROX   = 2'd1,
    ACC_DAR      = 2'd2
  } acc_mode_e;

endpackage
