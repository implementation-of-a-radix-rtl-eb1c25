// mux2: selects the multiplier that the recoder turns into radix-4 digits.
//
// Three one-hot selects (one per controller line):
//   s1  the quotient-digit estimate: the 12 integer bits of qs and qc, each
//       sign-extended to 16 bits. Their two fraction bits (a b of qs, c d of qc)
//       become the rounding inputs e = a|c and f = b&d&~(a^c), so that the
//       recoded value is floor(qs + qc + 1/2).
//   s2  -M from latch2. Its two 15-bit halves are extended to 16 bits so that
//       the pair sums to -M modulo 2^16: since -M lies in [-2,0), bit 14 of the
//       true sum is one and the carry out of bit 14 is ms[14]&mc[14]; bit 15 of
//       the sum half is set to the complement of that carry and that of the carry
//       half to zero.
//   s3  d15, the first 15 fraction bits of d, in the sum half; carry half zero.
// The selection, the sign extension of the estimate and the e/f rounding
// equations are the document's; the 16th-bit rule for -M is this design's own
// form of the document's correction of the two top bits of -M, which is not
// legible in the available text. Combinational.
module mux2
  import div_pkg::*;
(
  input  logic [W_QCS-1:0] qs,
  input  logic [W_QCS-1:0] qc,
  input  logic [W_M-1:0]   ms,
  input  logic [W_M-1:0]   mc,
  input  logic [14:0]      d15,
  input  logic             s1,
  input  logic             s2,
  input  logic             s3,
  output logic [W_REC-1:0] zs,
  output logic [W_REC-1:0] zc,
  output logic             e,
  output logic             f
);
  logic [W_REC-1:0] q_s, q_c, m_s, m_c, d_s;

  assign q_s = {{4{qs[13]}}, qs[13:2]};
  assign q_c = {{4{qc[13]}}, qc[13:2]};
  assign m_s = {~(ms[14] & mc[14]), ms};
  assign m_c = {1'b0, mc};
  assign d_s = {1'b0, d15};

  assign zs = ({W_REC{s1}} & q_s) | ({W_REC{s2}} & m_s) | ({W_REC{s3}} & d_s);
  assign zc = ({W_REC{s1}} & q_c) | ({W_REC{s2}} & m_c);

  assign e = s1 & (qs[1] | qc[1]);
  assign f = s1 & qs[0] & qc[0] & ~(qs[1] ^ qc[1]);
endmodule
