// add_tree: reduces the multiplier rows and the addend to carry-save form.
//
// Nine 70-bit inputs, t0..t7 and one extra row, are reduced to two by six
// carry-save adders in four levels:
//   (t0,t1,t5) (t2,t3,t4) (t6,t7,extra) -> six rows -> four -> three -> ws, wc.
// The extra row holds -gamma2 while -M is computed (scale high), aligned with
// 28 fraction bits (bits 28..15, its two constant top bits 1 0 above them and
// ones beyond), and the +1 brought out by mult as neg, at bit 14 (row 7) or, in
// the recurrence (sel high), at bit 10 (row 5); both bits are free in the row.
// -M is read from bits 29..15 of each half (ms, mc), as the document places it.
// The grouping of the adders follows the document's figure of the tree; all rows
// are full width here, where the document trims each adder to the bits it needs.
// Combinational.
module add_tree
  import div_pkg::*;
(
  input  logic [W_W-1:0]  t [N_DIG],
  input  logic            neg,
  input  logic            scale,
  input  logic            sel,
  input  logic [W_G2-1:0] mgamma2,
  output logic [W_W-1:0]  ws,
  output logic [W_W-1:0]  wc,
  output logic [W_M-1:0]  ms,
  output logic [W_M-1:0]  mc
);
  logic [W_W-1:0] extra, g2row;
  logic [W_W-1:0] p0s1, p0c1, p0s2, p0c2, p0s3, p0c3;
  logic [W_W-1:0] p1s1, p1c1, p1s2, p1c2, p2s, p2c;

  always_comb begin
    g2row = scale ? ({{(W_W-W_G2-17){1'b1}}, 2'b10, mgamma2, 15'b0}) : '0;
    extra = g2row;
    if (sel) extra[10] = neg;
    else     extra[14] = neg;
  end

  csa #(.W(W_W)) u_c00 (.a(t[0]),  .b(t[1]),  .c(t[5]),  .s(p0s1), .cy(p0c1));
  csa #(.W(W_W)) u_c01 (.a(t[2]),  .b(t[3]),  .c(t[4]),  .s(p0s2), .cy(p0c2));
  csa #(.W(W_W)) u_c02 (.a(t[6]),  .b(t[7]),  .c(extra), .s(p0s3), .cy(p0c3));
  csa #(.W(W_W)) u_c10 (.a(p0s1),  .b(p0c1),  .c(p0s2),  .s(p1s1), .cy(p1c1));
  csa #(.W(W_W)) u_c11 (.a(p0c2),  .b(p0s3),  .c(p0c3),  .s(p1s2), .cy(p1c2));
  csa #(.W(W_W)) u_c20 (.a(p1s1),  .b(p1c1),  .c(p1s2),  .s(p2s),  .cy(p2c));
  csa #(.W(W_W)) u_c30 (.a(p2s),   .b(p2c),   .c(p1c2),  .s(ws),   .cy(wc));

  assign ms = ws[29:15];
  assign mc = wc[29:15];
endmodule
