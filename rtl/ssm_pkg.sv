// Shared constants and types of the static-segment approximate multiplier.
//
// SSM_N and SSM_M are the default operand width n and segment width m
// (36 and 18, the widths of the Booth-based multiplier's ports). The
// shift-select code is the 2-bit sum of the two segment-select bits: it
// tells the output multiplexer by how many multiples of (n-m) the 2m-bit
// segment product is shifted left. Code 2'b11 cannot occur.
package ssm_pkg;

  localparam int unsigned SSM_N = 36;
  localparam int unsigned SSM_M = 18;

  typedef enum logic [1:0] {
    SHIFT_NONE = 2'b00,  // both segments are the lower m bits
    SHIFT_ONE  = 2'b01,  // one upper segment, one lower: shift by n-m
    SHIFT_TWO  = 2'b10   // both segments are the upper m bits: shift by 2(n-m)
  } shift_sel_e;

endpackage
