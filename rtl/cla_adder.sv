// W-bit carry look-ahead adder.
//
// Adds a + b + cin. The operands are split into 4-bit look-ahead groups
// (cla4); inside a group every carry is computed directly from generate and
// propagate, and each group's carry in is formed from the previous group's
// group generate and propagate, C(j+1) = G(j) | P(j)&C(j). The operands are
// zero-padded up to a whole number of groups, so W need not be a multiple of
// four. This adder finishes the Booth multiplier (adding the last two rows
// of the Wallace tree) and forms the filter's sum of tap products.
//
// Purely combinational.
module cla_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  localparam int unsigned NG = (W + 3) / 4;  // number of 4-bit groups
  localparam int unsigned WP = 4 * NG;       // padded width

  logic [WP-1:0] ap;
  logic [WP-1:0] bp;
  logic [WP-1:0] sp;
  logic [NG:0]   gc;  // carry into each group
  logic [NG-1:0] gg;
  logic [NG-1:0] gp;

  assign ap    = WP'(a);
  assign bp    = WP'(b);
  assign gc[0] = cin;

  for (genvar j = 0; j < NG; j++) begin : g_grp
    cla4 u_cla4 (
      .a  (ap[4*j +: 4]),
      .b  (bp[4*j +: 4]),
      .cin(gc[j]),
      .s  (sp[4*j +: 4]),
      .gg (gg[j]),
      .gp (gp[j])
    );
    assign gc[j+1] = gg[j] | (gp[j] & gc[j]);
  end

  assign s = sp[W-1:0];

  // Carry out of bit W-1: from the group chain when W fills the groups,
  // otherwise the carry that reached the first padding bit.
  if (W == WP) begin : g_cout_full
    assign cout = gc[NG];
  end else begin : g_cout_pad
    assign cout = sp[W];
  end

endmodule
