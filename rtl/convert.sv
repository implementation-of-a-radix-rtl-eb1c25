// convert: on-the-fly conversion of the quotient digits and final rounding.
//
// Each cycle with digit high it takes the carry-save estimate (a1, a2 = qs, qc,
// 12 integer + 2 fraction bits each), forms the digit
//   q = floor(qs + qc + 1/2)  (a 3:2 row with the constant 1/2, then a 14-bit
//   carry-propagate adder; the 12-bit integer part read as two's complement)
// with q in [-511, 512], and shifts it into three 54-bit registers holding,
// modulo 1, Q (the quotient so far), QM = Q - ulp and QP = Q + ulp:
//   Q  <- q >= 0     ? (Q , q)       : (QM, q + 512)
//   QM <- q > 0      ? (Q , q - 1)   : (QM, q - 1 + 512)
//   QP <- q+1 >= 512 ? (QP, q + 1 - 512) : q+1 >= 0 ? (Q, q + 1) : (QM, q + 1 + 512)
// No carry-propagating addition over the quotient is needed. A first digit of
// 512 is taken as 0 into Q, which is right modulo 1 since the registers start at 0.
// With round high, the output register q is loaded with the 53-bit quotient:
// QP if the last residual is non-negative (sign low) and Q otherwise, dropping
// the 54th bit. This adds one unit in the last of the 54 bits when the residual is
// positive and then truncates, which rounds the quotient to nearest (ties up).
// The document instead appends p = q6 + (not sign) to the registers of the
// previous step; selecting QP or Q after the sixth step gives the same value.
// clear (synchronous) empties the three registers.
// Digit is taken at the rising edge ending each recurrence cycle; q changes at
// the edge ending the round cycle.
module convert
  import div_pkg::*;
(
  input  logic             clk,
  input  logic             clear,
  input  logic             digit,
  input  logic             round,
  input  logic             sign,
  input  logic [W_QCS-1:0] a1,
  input  logic [W_QCS-1:0] a2,
  output logic [W_D-1:0]   q
);
  // cr_csa: qs + qc + 0.5 reduced to two rows
  logic [W_QCS-1:0] hs, hc, rsum;
  csa #(.W(W_QCS)) u_rcsa (.a(a1), .b(a2), .c(W_QCS'(2)), .s(hs), .cy(hc));
  assign rsum = hs + hc;

  logic signed [11:0] qk, qn, qo;   // q, q-1, q+1
  logic qsig, qolsig, det0, det512, qpos;
  assign qk     = signed'(rsum[W_QCS-1:2]);
  assign qn     = qk - 12'sd1;
  assign qo     = qk + 12'sd1;
  assign qsig   = qk[11];
  assign qolsig = qo[11];
  assign det0   = (qk == 12'sd0);
  assign det512 = ~qolsig & qo[9];   // q+1 >= 512
  assign qpos   = ~qsig & ~det0;

  logic [W_Q-1:0] rq, rqm, rqp;
  localparam int unsigned HI = W_Q - LOG_R;

  always_ff @(posedge clk) begin
    if (clear) begin
      rq  <= '0;
      rqm <= '0;
      rqp <= '0;
    end else if (digit) begin
      rq  <= {(qsig ? rqm[HI-1:0] : rq[HI-1:0]), qk[8:0]};
      rqm <= {(qpos ? rq[HI-1:0] : rqm[HI-1:0]), qn[8:0]};
      rqp <= {(det512 ? rqp[HI-1:0] : (qolsig ? rqm[HI-1:0] : rq[HI-1:0])), qo[8:0]};
    end
  end

  always_ff @(posedge clk) begin
    if (round) q <= sign ? rq[W_Q-1:1] : rqp[W_Q-1:1];
  end

  // the digit set of radix 512 with the first-step overflow
  a_range: assert property (@(posedge clk) digit |-> (qk >= -12'sd511 && qk <= 12'sd512))
    else $warning("quotient digit %0d outside -511..512", qk);
endmodule
