// Booth decoder: radix-4 partial product row generator.
//
// For one Booth digit it selects 0, X or 2X of the signed L-bit multiplicand
// and, for a negative digit, inverts the selected value. The row is L+1 bits
// wide so that 2X fits. The two's complement is completed by the separate
// `neg` bit, which the multiplier adds at the row's least significant
// position; this keeps the decoder free of a carry chain. The row is a signed
// (L+1)-bit value: pp + neg == digit * X. A deferred assertion flags a
// malformed digit that selects both X and 2X.
//
// Purely combinational.
module booth_pp_gen
  import fir_booth_pkg::*;
#(
  parameter int unsigned L = DEFAULT_L
) (
  input  logic [L-1:0]  x,      // multiplicand, two's complement
  input  booth_digit_t  digit,  // digit from booth_encoder
  output logic [L:0]    pp,     // selected multiple, one's complemented if neg
  output logic          neg     // +1 correction of the row
);

  logic [L:0] x1;  // X sign-extended to L+1 bits
  logic [L:0] x2;  // 2X
  logic [L:0] sel;

  assign x1 = {x[L-1], x};
  assign x2 = {x, 1'b0};

  always_comb begin
    sel = '0;
    if (digit.one) sel = x1;
    if (digit.two) sel = x2;
    pp  = digit.neg ? ~sel : sel;
  end

  assign neg = digit.neg;

  // A Booth digit selects one magnitude at most.
  always_comb begin
    assert final (!(digit.one && digit.two))
      else $error("booth_pp_gen: digit selects both X and 2X");
  end

endmodule
