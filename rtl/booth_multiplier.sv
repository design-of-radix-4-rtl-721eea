// Signed L x L radix-4 modified Booth multiplier.
//
// Computes p = x * y for two's-complement x (multiplicand) and y (multiplier),
// with the full 2L-bit product. The structure follows the classic parallel
// modified Booth multiplier:
//   1. Booth encoder: y is recoded into Q = L/2 radix-4 digits
//      d_i = -2*y[2i+1] + y[2i] + y[2i-1] (y[-1] = 0), so only every second
//      column of y produces a partial product.
//   2. Booth decoder: each digit selects 0, x or 2x, inverted when negative;
//      row i is sign-extended to 2L bits and weighted by 4^i (shifted 2i).
//   3. The +1 that completes each negated row is gathered into one extra row
//      (bit 2i holds row i's neg bit), giving Q+1 rows in all.
//   4. Wallace tree of 3:2 carry-save adders reduces the rows to two.
//   5. Carry look-ahead adder adds the last two rows.
// Row layout, negation bits and sign extension are this design's own
// choices; the order of the stages is the one the filter is described with.
// L must be even (the multiplier scales in even widths from 4 bits up).
//
// Purely combinational: the product is valid one propagation delay after the
// operands.
module booth_multiplier
  import fir_booth_pkg::*;
#(
  parameter int unsigned L = DEFAULT_L
) (
  input  logic [L-1:0]   x,  // multiplicand
  input  logic [L-1:0]   y,  // multiplier (Booth-recoded)
  output logic [2*L-1:0] p   // product x*y, two's complement
);

  localparam int unsigned Q = L / 2;  // number of Booth digits / partial products
  localparam int unsigned W = 2 * L;  // product width

  logic [L:0]            ybits;  // {y, 0}: y with the implicit y[-1] = 0
  booth_digit_t [Q-1:0]  digit;
  logic [Q-1:0][L:0]     pp;
  logic [Q-1:0]          neg;
  logic [Q:0][W-1:0]     rows;
  logic [W-1:0]          tree_sum;
  logic [W-1:0]          tree_carry;
  logic                  cout_unused;

  // The radix-4 recoding takes the multiplier two bits at a time.
  if (L < 4 || L % 2 != 0) begin : g_bad_width
    $error("booth_multiplier: L = %0d, must be even and at least 4", L);
  end

  assign ybits = {y, 1'b0};

  for (genvar i = 0; i < Q; i++) begin : g_pp
    booth_encoder u_enc (
      .bits (ybits[2*i +: 3]),
      .digit(digit[i])
    );

    booth_pp_gen #(.L(L)) u_dec (
      .x    (x),
      .digit(digit[i]),
      .pp   (pp[i]),
      .neg  (neg[i])
    );

    // Sign-extend the (L+1)-bit row to W bits and weight it by 4^i.
    assign rows[i] = W'({{(W - L - 1){pp[i][L]}}, pp[i]} << (2 * i));
  end

  // Row of negation bits: bit 2i completes the two's complement of row i.
  always_comb begin
    rows[Q] = '0;
    for (int i = 0; i < Q; i++) rows[Q][2*i] = neg[i];
  end

  wallace_tree #(.W(W), .N(Q + 1)) u_wtc (
    .rows (rows),
    .sum  (tree_sum),
    .carry(tree_carry)
  );

  cla_adder #(.W(W)) u_cla (
    .a   (tree_sum),
    .b   (tree_carry),
    .cin (1'b0),
    .s   (p),
    .cout(cout_unused)
  );

endmodule
