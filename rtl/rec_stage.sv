// rec_stage: one radix-4 digit of the carry-save to signed-digit recoder.
//
// Inputs are the two bit pairs (s1 s0) and (c1 c0) of one radix-4 position of
// a carry-save number, whose digit sum is 0..6, and two transfer bits from the
// stage below (t_in, h_in). In three steps:
//   1. t_out = s1&c1 and w = 2*((s1+c1) mod 2) + s0 + c0, 0 <= w <= 4
//   2. u = w + t_in (0..5); h_out = (u >= 2); v = u - 4*h_out (-2..1)
//   3. digit Z = v + h_in (-2..2)
// The top stage (TOP = 1) produces no transfers: it adds the incoming transfers
// to its digit sum and reduces the result modulo 4 into {-1, 0, 1, 2}, which
// fixes the sign of the whole number (see recoder).
// The stage outputs the digit of the negated multiplier, -Z, as a one-hot
// group (m2 m1 p1 p2); all low is zero. This is the three-step transfer scheme
// the document describes; the gate-level form is this design's own.
// Combinational.
module rec_stage #(
  parameter bit TOP = 1'b0
) (
  input  logic s1,
  input  logic s0,
  input  logic c1,
  input  logic c0,
  input  logic t_in,
  input  logic h_in,
  output logic t_out,
  output logic h_out,
  output logic m2,
  output logic m1,
  output logic p1,
  output logic p2
);
  logic [2:0] w, u;
  logic       w1;
  logic signed [2:0] v, zd;

  always_comb begin
    w1    = s1 ^ c1;
    t_out = s1 & c1;
    w     = {w1, 1'b0} + {2'b00, s0} + {2'b00, c0};
    u     = w + {2'b00, t_in};
    h_out = (u >= 3'd2);
    v     = signed'(u - (h_out ? 3'd4 : 3'd0));
    zd    = v + signed'({2'b00, h_in});
    if (TOP) begin
      t_out = 1'b0;
      h_out = 1'b0;
      unique case (2'(u + {2'b00, h_in}))
        2'd0: zd = 3'sd0;
        2'd1: zd = 3'sd1;
        2'd2: zd = 3'sd2;
        default: zd = -3'sd1;
      endcase
    end
    // outputs carry -Z
    p2 = (zd == -3'sd2);
    p1 = (zd == -3'sd1);
    m1 = (zd ==  3'sd1);
    m2 = (zd ==  3'sd2);
  end
endmodule
