// 4-bit carry look-ahead block.
//
// Computes every internal carry of a 4-bit group directly from the bit
// generate (a&b) and propagate (a^b) signals and the group's carry in, so no
// carry ripples inside the group. It also produces the group generate and
// propagate, from which the next group's carry in is formed in one step.
//
// Purely combinational.
module cla4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       gg,   // group generate
  output logic       gp    // group propagate
);

  logic [3:0] g;
  logic [3:0] p;
  logic [3:0] c;

  assign g = a & b;
  assign p = a ^ b;

  assign c[0] = cin;
  assign c[1] = g[0] | (p[0] & cin);
  assign c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
  assign c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cin);

  assign s  = p ^ c;
  assign gg = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
  assign gp = &p;

endmodule
