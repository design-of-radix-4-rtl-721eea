// Radix-4 modified Booth encoder (one digit).
//
// Looks at three overlapping bits of the multiplier, {y[2i+1], y[2i], y[2i-1]}
// (y[-1] = 0 for the lowest digit), and recodes them into the digit
//   d = -2*y[2i+1] + y[2i] + y[2i-1]   in {-2,-1,0,+1,+2}.
// Scanning every second column this way halves the number of partial
// products of a plain shift-and-add multiplier, which is the idea the filter
// is built on. The digit leaves as select lines (neg, one, two) for the Booth
// decoder. The patterns 000 and 111 give zero with neg = 0, so a zero row
// contributes nothing; that choice is this design's own.
//
// Purely combinational.
module booth_encoder
  import fir_booth_pkg::*;
(
  input  logic [2:0]   bits,   // {y[2i+1], y[2i], y[2i-1]}
  output booth_digit_t digit
);

  always_comb begin
    digit.one = bits[1] ^ bits[0];
    digit.two = (bits[2] & ~bits[1] & ~bits[0]) | (~bits[2] & bits[1] & bits[0]);
    digit.neg = bits[2] & ~(bits[1] & bits[0]);
  end

endmodule
