// booth_pkg: widths and types shared by the units of the 32x32 radix-4 Booth
// multiplier.
//
// Operands are 32 bits wide. Each is widened to 33 bits so that signed and
// unsigned values share one two's complement datapath. The 33-bit multiplier
// is cut into 17 overlapping 3-bit groups (F-blocks). Each group becomes one
// radix-4 Booth digit in {-2,-1,0,+1,+2}, and each digit selects one 34-bit
// partial product row. A correction row (ROW#-1) holds the +1 that turns the
// bit-inverted row of a negative digit into its two's complement. Together
// that makes 18 rows to add into the 64-bit product.
//
// booth_ctl_t carries the three control lines of one digit:
//   neg (F-bar) - the digit is negative
//   one (F1)    - the digit is non-zero
//   two (F2)    - the digit is +2 or -2
// The widths and the 17 digits follow the design description. The names of
// the constants are this implementation's own.
package booth_pkg;

  localparam int MULT_W = 32;            // operand width
  localparam int EXT_W  = MULT_W + 1;    // operand after the 33rd-bit extender
  localparam int NDIG   = EXT_W / 2 + 1; // Booth digits F0, F2, ..., F32 (17)
  localparam int ROW_W  = EXT_W + 1;     // one row holds +-2*b (34 bits)
  localparam int PROD_W = 2 * MULT_W;    // product width
  localparam int NROWS  = NDIG + 1;      // 17 partial product rows + ROW#-1

  typedef struct packed {
    logic neg;  // F-bar: digit is negative
    logic one;  // F1   : digit is non-zero
    logic two;  // F2   : digit magnitude is 2
  } booth_ctl_t;

endpackage
