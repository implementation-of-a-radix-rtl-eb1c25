// mult: partial-product generator of the multiplier-adder.
//
// Forms the eight partial products of a radix-4 signed-digit multiplier (the
// recoder's one-hot digits) times the multiplicand mp = {scale, inz}, a 69-bit
// two's complement number (the sign is one only while -gamma1 is multiplied).
// Product k selects 0, mp or 2*mp, sign-extended to 70 bits, bit-complements it
// for a negative digit and is shifted left by 2k; the +1 that completes the
// negation of product k is placed in bit 2k of product k+1, whose low bits are
// free. All products are taken modulo 2^70.
// In the recurrence (sel high) only six digits are used and the last two
// product slots, t6 and t7, carry the shifted residual 512*w in carry-save form
// instead; the +1 of product 5 is then brought out on neg (weight 2^10), and
// otherwise neg carries the +1 of product 7 (weight 2^14). The adder tree places it.
// Follows the document's scheme (eight product rows, complement-and-add-one in
// the next row, residual in the last two slots); full sign extension of every
// row instead of the document's shortened rows is this design's choice.
// Combinational. The low bits of product k+1 below bit 2k are constant zero
// by construction (the shift), which leaves room for the +1 described above.
module mult
  import div_pkg::*;
(
  input  rdigits_t       dig,
  input  logic [W_Z-1:0] inz,
  input  logic           scale,
  input  logic           sel,
  input  logic [W_W-1:0] rws,
  input  logic [W_W-1:0] rwc,
  output logic [W_W-1:0] t [N_DIG],
  output logic           neg
);
  logic signed [W_Z:0] mp;
  logic [W_W-1:0]      mag   [N_DIG];
  logic [W_W-1:0]      pp    [N_DIG];
  logic [N_DIG-1:0]    isneg;

  assign mp = signed'({scale, inz});

  always_comb begin
    for (int k = 0; k < N_DIG; k++) begin
      isneg[k] = dig.m1[k] | dig.m2[k];
      if (dig.m1[k] | dig.p1[k])      mag[k] = W_W'(mp);
      else if (dig.m2[k] | dig.p2[k]) mag[k] = W_W'(mp) << 1;
      else                            mag[k] = '0;
      pp[k] = (isneg[k] ? ~mag[k] : mag[k]) << (2 * k);
      if (k > 0) pp[k][2*(k-1)] = isneg[k-1];
    end
    for (int k = 0; k < N_DIG - 2; k++) t[k] = pp[k];
    t[N_DIG-2] = sel ? (rws << LOG_R) : pp[N_DIG-2];
    t[N_DIG-1] = sel ? (rwc << LOG_R) : pp[N_DIG-1];
    neg        = sel ? isneg[N_DIG-3] : isneg[N_DIG-1];
  end
endmodule
