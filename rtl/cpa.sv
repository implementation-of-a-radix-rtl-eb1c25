// cpa: 70-bit carry-propagate adder that assimilates the carry-save residual.
//
// sum = ws + wc (mod 2^70). Three levels of carry look-ahead, grouped by four:
// four 16-bit cla16 blocks cover bits 0..63 and a cla_group unit generates the
// carries between them; the six top bits 64..69 are added by a separate 6-bit
// look-ahead adder. z is sum[67:0] (the scaled divisor when latch3 holds M*d);
// sign is sum[69] (the sign of the last residual w[6]).
// The adder organisation (4-16-64 grouping, separate six top bits) follows the
// document. Combinational.
module cpa
  import div_pkg::*;
(
  input  logic [W_W-1:0] ws,
  input  logic [W_W-1:0] wc,
  output logic [W_Z-1:0] z,
  output logic           sign
);
  logic [W_W-1:0] sum;
  logic [3:0]     gb, pb;
  logic [4:0]     cb;

  assign cb[0] = 1'b0;

  for (genvar k = 0; k < 4; k++) begin : g_blk
    cla16 u_blk (
      .a(ws[16*k +: 16]), .b(wc[16*k +: 16]), .cin(cb[k]),
      .sum(sum[16*k +: 16]), .gg(gb[k]), .pg(pb[k])
    );
  end

  logic gtop, ptop;
  cla_group u_gen (.c0(1'b0), .g(gb), .p(pb), .c(cb[4:1]), .gg(gtop), .pg(ptop));

  // six top bits: a ripple-free look-ahead over six positions
  logic [5:0] a6, b6, g6, p6;
  logic [6:0] c6;
  assign a6 = ws[69:64];
  assign b6 = wc[69:64];
  assign g6 = a6 & b6;
  assign p6 = a6 | b6;
  always_comb begin
    c6[0] = cb[4];
    for (int i = 1; i <= 6; i++) begin
      c6[i] = g6[i-1];
      for (int j = i - 2; j >= -1; j--) begin
        logic term;
        term = (j >= 0) ? g6[j] : c6[0];
        for (int k = j + 1; k < i; k++) term &= p6[k];
        c6[i] |= term;
      end
    end
  end
  assign sum[69:64] = a6 ^ b6 ^ c6[5:0];

  assign z    = sum[W_Z-1:0];
  assign sign = sum[W_W-1];

  logic unused;
  assign unused = gtop ^ ptop ^ c6[6];
endmodule
