// bcd_pkg: types and constants shared by the parallel decimal multiplier.
//
// Numbers are carried as packed BCD: digit i occupies bits [4*i+3:4*i], least
// significant digit at the bottom. The multiplier works on 8-digit (32-bit)
// operands and produces a 16-digit (64-bit) product. Every adder in the design
// can be built in one of three styles, chosen with an adder_kind_e parameter:
// a ripple-carry BCD adder, a carry-lookahead BCD adder whose decimal
// correction is done before the carries are known, and a Kogge-Stone
// parallel-prefix BCD adder. The Kogge-Stone style is the default, being the
// fastest of the three.
package bcd_pkg;

  // Number of BCD digits in one operand (32 bits / 4).
  localparam int unsigned DIGITS = 8;

  // Number of multiplicand multiples the evaluation block produces (1A..5A).
  localparam int unsigned NUM_MULTIPLES = 5;

  typedef logic [3:0] bcd_digit_t;

  typedef enum logic [1:0] {
    ADDER_RA  = 2'd0,  // regular adder: ripple carry
    ADDER_MA  = 2'd1,  // modified adder: carry lookahead, pre-corrected digits
    ADDER_RDA = 2'd2   // reduced delay adder: Kogge-Stone prefix network
  } adder_kind_e;

  // Nine's complement of one BCD digit.
  function automatic bcd_digit_t nines(input bcd_digit_t d);
    return bcd_digit_t'(4'd9 - d);
  endfunction

endpackage
