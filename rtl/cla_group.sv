// cla_group: four-input carry look-ahead unit.
//
// From the carry-in c0 and four generate/propagate pairs it forms the carries
// c1..c4 into the next four positions, and the group generate and propagate:
//   c(i+1) = g(i) | p(i)&c(i), expanded into two-level sum-of-products form.
// Used at every level of the look-ahead adders (bits, 4-bit groups, 16-bit
// blocks). Combinational.
module cla_group (
  input  logic       c0,
  input  logic [3:0] g,
  input  logic [3:0] p,
  output logic [4:1] c,
  output logic       gg,
  output logic       pg
);
  assign c[1] = g[0] | (c0 & p[0]);
  assign c[2] = g[1] | (g[0] & p[1]) | (c0 & p[0] & p[1]);
  assign c[3] = g[2] | (g[1] & p[2]) | (g[0] & p[1] & p[2]) | (c0 & p[0] & p[1] & p[2]);
  assign c[4] = g[3] | (g[2] & p[3]) | (g[1] & p[2] & p[3]) | (g[0] & p[1] & p[2] & p[3])
              | (c0 & p[0] & p[1] & p[2] & p[3]);
  assign gg   = g[3] | (g[2] & p[3]) | (g[1] & p[2] & p[3]) | (g[0] & p[1] & p[2] & p[3]);
  assign pg   = &p;
endmodule
