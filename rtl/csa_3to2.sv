// W-bit 3:2 carry-save adder: one row of full adders.
//
// Adds three rows a, b, c without propagating carries: sum holds the bitwise
// sum, carry holds the majority bits shifted one place left, so that
// sum + carry == a + b + c modulo 2^W. This is the cell of the Wallace tree.
//
// Purely combinational.
module csa_3to2 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-1:0] maj;

  assign sum   = a ^ b ^ c;
  assign maj   = (a & b) | (a & c) | (b & c);
  assign carry = {maj[W-2:0], 1'b0};

endmodule
