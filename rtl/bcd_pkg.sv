// bcd_pkg: types and constants shared by the three-digit sign-magnitude BCD
// adder. A digit is a 4-bit BCD code 0..9; codes 10..15 never appear as
// magnitudes, so two of them are borrowed as display codes for the sign
// position (a minus sign and a blank digit), as the display controller needs.
// The magnitude comparison is passed from digit to digit as a two-flag struct
// (both flags low means "equal so far"). Segment patterns are active-low, in
// the order {g,f,e,d,c,b,a}, matching the common-anode display whose cathodes
// light a segment when driven low.
package bcd_pkg;

  // Number of BCD digits of an operand.
  localparam int unsigned NDIGITS = 3;

  typedef logic [3:0] bcd_digit_t;

  // Result of comparing the A and B magnitudes over the digits seen so far.
  typedef struct packed {
    logic a_gt_b;
    logic a_lt_b;
  } cmp_t;

  localparam cmp_t CMP_EQUAL = '{a_gt_b: 1'b0, a_lt_b: 1'b0};

  // Non-BCD codes used for the sign digit of the display.
  localparam bcd_digit_t CODE_MINUS = 4'hA;
  localparam bcd_digit_t CODE_BLANK = 4'hB;

  // Active-low seven-segment patterns, bit order {g,f,e,d,c,b,a}.
  typedef logic [6:0] seg_t;
  localparam seg_t SEG_OFF   = 7'b111_1111;
  localparam seg_t SEG_MINUS = 7'b011_1111;

endpackage
