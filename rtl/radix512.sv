// radix512: radix-512 divider for the mantissas of double-precision numbers.
//
// Computes q = x/d with 0.5 <= d < 1 and x < d (53-bit d, 54-bit x: a dividend
// not below d is to be halved by the caller, its exponent incremented), giving
// the 53-bit quotient rounded to nearest. Both operands are first scaled by a
// factor M ~ 1/d taken from a 32-entry table and one multiply-add, so that the
// scaled divisor z = M*d is within 1 +- 0.000487; then each quotient digit
// (nine bits, radix 512) is simply the rounded top of the shifted residual, and
// the recurrence w[j+1] = 512*w[j] - q[j+1]*z runs six times in carry-save form.
// A single multiplier-adder serves the computation of M, both scalings and the
// recurrence. One division takes ten clock cycles (see control):
//   cycle 1 -M, 2 M*d, 3 M*x, 4..9 six digits, 10 residual sign and rounding.
// Interface: reset is asynchronous and active high. d must be valid in the
// cycle in which op_ld is high, x in the cycle after it. q holds the result of
// the previous division while q_valid is high (the S0 cycle after it completes)
// and until the end of the following division. Divisions can be issued every
// ten cycles. The block decomposition and the cycle schedule follow the
// document; op_ld and q_valid are this design's additions.
module radix512
  import div_pkg::*;
(
  input  logic           clk,
  input  logic           reset,
  input  logic [W_D-1:0] d,
  input  logic [W_X-1:0] x,
  output logic [W_D-1:0] q,
  output logic           op_ld,
  output logic           q_valid
);
  // controller lines
  logic cl1, cl2, digit, round, ld1, ld2, ld3, mx1l, mx1h, mx2s1, mx2s2, mx2s3;
  state_t state;

  // datapath nets (names follow the document's bus list)
  logic [14:0]      d15;
  logic [4:0]       d5;
  logic [W_Z-1:0]   mu1l1, l1mu3, mu3ma, z;
  logic [W_G1-1:0]  mgamma1;
  logic [W_G2-1:0]  mgamma2;
  logic [W_M-1:0]   mas, mac, ms, mc;
  logic [W_REC-1:0] mu2rs, mu2rc;
  logic             e, f, sign;
  rdigits_t         dig;
  logic [W_W-1:0]   ws, wc, rws, rwc;
  logic [W_QCS-1:0] qs, qc;

  // d split: the first 15 fraction bits, and the 5 bits below the leading one
  assign d15 = d[W_D-1 -: 15];
  assign d5  = d[W_D-2 -: 5];

  control u_control (
    .clk(clk), .reset(reset), .cl1(cl1), .cl2(cl2), .digit(digit), .round(round),
    .ld1(ld1), .ld2(ld2), .ld3(ld3), .mx1l(mx1l), .mx1h(mx1h),
    .mx2s1(mx2s1), .mx2s2(mx2s2), .mx2s3(mx2s3),
    .op_ld(op_ld), .q_valid(q_valid), .state(state)
  );

  gamma_table u_gamma (.idx(d5), .mgamma1(mgamma1), .mgamma2(mgamma2));

  mux1 u_mux1 (.d(d), .x(x), .z(z), .sel_x(mx1l), .sel_z(mx1h), .y(mu1l1));

  latch1 u_latch1 (.clk(clk), .clear(cl1), .load(ld1), .a(mu1l1), .y(l1mu3));

  mux3 u_mux3 (.mgamma1(mgamma1), .c(l1mu3), .sel(mx2s3), .y(mu3ma));

  latch2 u_latch2 (
    .clk(clk), .clear(cl1), .load(ld2), .as(mas), .ac(mac), .ys(ms), .yc(mc)
  );

  mux2 u_mux2 (
    .qs(qs), .qc(qc), .ms(ms), .mc(mc), .d15(d15),
    .s1(mx2s1), .s2(mx2s2), .s3(mx2s3), .zs(mu2rs), .zc(mu2rc), .e(e), .f(f)
  );

  recoder u_recoder (.zs(mu2rs), .zc(mu2rc), .t0(e), .h0(f), .dig(dig));

  multadd u_multadd (
    .dig(dig), .inz(mu3ma), .mgamma2(mgamma2), .rws(rws), .rwc(rwc),
    .scale(mx2s3), .sel(mx2s1), .ws(ws), .wc(wc), .ms(mas), .mc(mac)
  );

  latch3 u_latch3 (
    .clk(clk), .clear(cl1), .load(ld3), .as(ws), .ac(wc),
    .rws(rws), .rwc(rwc), .qs(qs), .qc(qc)
  );

  cpa u_cpa (.ws(rws), .wc(rwc), .z(z), .sign(sign));

  convert u_convert (
    .clk(clk), .clear(cl2), .digit(digit), .round(round), .sign(sign),
    .a1(qs), .a2(qc), .q(q)
  );

  logic [3:0] unused_state;
  assign unused_state = state;
endmodule
