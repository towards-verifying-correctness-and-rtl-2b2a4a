// Shared types of the variable-latency multiplier.
//
// phase_e is the three-valued phase register of the multiplier: Empty (ready to
// accept operands), Busy (shift-and-add in progress) and Full (product waiting
// to be dequeued). The three phases come from the multiplier's state record;
// the two-bit encoding is this design's choice.
package vl_mul_pkg;

  typedef enum logic [1:0] {
    PH_EMPTY = 2'd0,
    PH_BUSY  = 2'd1,
    PH_FULL  = 2'd2
  } phase_e;

endpackage
