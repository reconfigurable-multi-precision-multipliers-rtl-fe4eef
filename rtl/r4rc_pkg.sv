// r4rc_pkg: types and constants shared by the reconfigurable radix-4 Booth
// multipliers (R4RC16 and R4RC32).
//
// booth_digit_t carries one recoded radix-4 Booth digit as three select
// lines: `one` selects the multiplicand, `two` selects it shifted left by one,
// `neg` inverts the selected row (the two's-complement +1 travels separately).
// Neither `one` nor `two` set means a zero digit.
//
// mode_select = MODE_DEFAULT (1) runs a multiplier at its full width (16 or 32
// bits); MODE_LOW_POWER (0) runs it as independent signed 8x8 multipliers, one
// per byte lane. The polarity follows the description of the design ("ON"
// gives the full-width product); the names are this design's own.
package r4rc_pkg;

  typedef struct packed {
    logic neg;
    logic two;
    logic one;
  } booth_digit_t;

  localparam logic MODE_LOW_POWER = 1'b0;
  localparam logic MODE_DEFAULT   = 1'b1;

  // Width of one low-power lane operand and of its product.
  localparam int unsigned LANE_W   = 8;
  localparam int unsigned LANE_P_W = 2 * LANE_W;

  // Number of Booth digits produced from one 9-bit ib slice.
  localparam int unsigned DIGITS_PER_SLICE = LANE_W / 2;

endpackage
