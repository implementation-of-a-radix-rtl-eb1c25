// recoder: turns a 16-bit carry-save multiplier into eight radix-4 digits.
//
// Eight rec_stage instances, one per radix-4 position, chained through two
// transfer bits. The bottom stage takes the transfer inputs t0 and h0, which
// add one each at the least significant position: mux2 drives them with the
// quotient-digit rounding bits e and f. With V = zs + zc + t0 + h0 (mod 2^16)
// the digits Z_0..Z_6 lie in {-2..2} and the top digit Z_7 in {-1..2}, so that
// R = sum Z_k 4^k is congruent to V modulo 2^16 and lies in [-21845, 38229]:
// R equals V for every V in [-16384, 32767], which covers the three uses
// (d15 in [2^14, 2^15), -M in [-2^14, 0), and the quotient digit, which is small).
// The outputs are the digits of -R in one-hot form (rdigits_t), so that the
// multiplier-adder computes A - R*C.
// Structure per the document: eight stages of one radix-4 digit each, the top
// one of a different kind; the rule of the top stage is this design's own.
// Combinational, a two-level ripple through the transfers.
module recoder
  import div_pkg::*;
(
  input  logic [W_REC-1:0] zs,
  input  logic [W_REC-1:0] zc,
  input  logic             t0,
  input  logic             h0,
  output rdigits_t         dig
);
  logic [N_DIG:0] t, h;

  assign t[0] = t0;
  assign h[0] = h0;

  for (genvar k = 0; k < N_DIG; k++) begin : g_stage
    rec_stage #(.TOP(k == N_DIG-1)) u_stage (
      .s1(zs[2*k+1]), .s0(zs[2*k]), .c1(zc[2*k+1]), .c0(zc[2*k]),
      .t_in(t[k]), .h_in(h[k]), .t_out(t[k+1]), .h_out(h[k+1]),
      .m2(dig.m2[k]), .m1(dig.m1[k]), .p1(dig.p1[k]), .p2(dig.p2[k])
    );
  end

  // the top stage produces no transfers
  logic unused_top;
  assign unused_top = t[N_DIG] ^ h[N_DIG];
endmodule
