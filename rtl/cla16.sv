// cla16: 16-bit two-level carry look-ahead adder.
//
// Bit generate g = a&b and propagate p = a|b; four cla_group units give the
// carries inside each 4-bit group, a fifth the carries between groups from the
// group generate/propagate signals. gg/pg are the block's own generate and
// propagate for the next level; the carry-out is left to that level.
// Combinational.
module cla16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] sum,
  output logic        gg,
  output logic        pg
);
  logic [15:0] g, p, c;
  logic [3:0]  g4, p4;
  logic [4:0]  cg;

  assign g = a & b;
  assign p = a | b;
  assign cg[0] = cin;

  for (genvar k = 0; k < 4; k++) begin : g_grp
    logic [4:1] cc;
    cla_group u_bits (
      .c0(cg[k]), .g(g[4*k +: 4]), .p(p[4*k +: 4]), .c(cc), .gg(g4[k]), .pg(p4[k])
    );
    assign c[4*k]       = cg[k];
    assign c[4*k+1 +: 3] = cc[3:1];
    logic unused_cc;
    assign unused_cc = cc[4];
  end

  cla_group u_grp (.c0(cin), .g(g4), .p(p4), .c(cg[4:1]), .gg(gg), .pg(pg));

  assign sum = a ^ b ^ c;
endmodule
