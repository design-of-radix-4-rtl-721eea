// Shared types and constants of the radix-4 Booth FIR filter.
//
// booth_digit_t is the output of the radix-4 Booth encoder: one signed digit
// d in {-2,-1,0,+1,+2} of the recoded multiplier, carried as three select
// lines. `one` and `two` pick |d| (at most one of them is set), `neg` marks a
// negative digit. The default word length of 8 bits is the one the filter is
// reported at; the tap count of 4 is this design's own choice.
package fir_booth_pkg;

  // Default operand width (multiplicand, multiplier, sample, coefficient).
  localparam int unsigned DEFAULT_L    = 8;
  // Default number of filter taps.
  localparam int unsigned DEFAULT_TAPS = 4;

  typedef struct packed {
    logic neg;  // digit is negative
    logic one;  // |digit| == 1
    logic two;  // |digit| == 2
  } booth_digit_t;

  // Signed value of a digit, for checks and readability.
  function automatic int digit_value(booth_digit_t d);
    int v;
    v = d.two ? 2 : (d.one ? 1 : 0);
    return d.neg ? -v : v;
  endfunction

endpackage
