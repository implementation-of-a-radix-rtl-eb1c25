// div_pkg: widths and shared types of the radix-512 divider.
//
// Fixed-point frames used throughout (bit i of a vector has the weight given):
//   d        53 bits, weight 2^(i-53)       divisor, 0.5 <= d < 1
//   x        54 bits, weight 2^(i-54)       dividend, x < d
//   w, rw    70 bits, weight 2^(i-67)       residual: sign, 2 integer, 67 fraction bits
//   z        68 bits, weight 2^(i-67)       scaled divisor M*d (always positive)
//   -M       15 bits, weight 2^(i-13)       scaling factor, two's complement, carry-save
//   qs/qc    14 bits, weight 2^(i-2)        top of the residual: 12 integer + 2 fraction bits
// A recoded multiplier is eight radix-4 signed digits in {-2..2}, each a one-hot
// group (m2, m1, p1, p2); all four low means digit 0.
package div_pkg;

  localparam int unsigned W_D   = 53;   // divisor mantissa bits
  localparam int unsigned W_X   = 54;   // dividend bits (one extra for the x >= d pre-shift)
  localparam int unsigned W_Z   = 68;   // scaled divisor / multiplicand bits
  localparam int unsigned W_W   = 70;   // residual bits (per carry-save half)
  localparam int unsigned W_M   = 15;   // -M bits (per carry-save half)
  localparam int unsigned W_G1  = 15;   // -gamma1 table word
  localparam int unsigned W_G2  = 14;   // -gamma2 table word
  localparam int unsigned W_QCS = 14;   // quotient-digit estimate bits (per carry-save half)
  localparam int unsigned W_REC = 16;   // recoder input bits
  localparam int unsigned N_DIG = 8;    // radix-4 digits produced by the recoder
  localparam int unsigned W_Q   = 54;   // on-the-fly conversion registers: 6 digits x 9 bits
  localparam int unsigned LOG_R = 9;    // radix 512 = 2^9
  localparam int unsigned N_IT  = 6;    // recurrence iterations
  localparam int unsigned N_CYC = 10;   // clock cycles per division

  // recoded multiplier, one bit per digit in each field
  typedef struct packed {
    logic [N_DIG-1:0] m2;
    logic [N_DIG-1:0] m1;
    logic [N_DIG-1:0] p1;
    logic [N_DIG-1:0] p2;
  } rdigits_t;

  // controller states: S0..S9 are the ten cycles of one division
  typedef enum logic [3:0] {
    S0 = 4'd0, S1 = 4'd1, S2 = 4'd2, S3 = 4'd3, S4 = 4'd4,
    S5 = 4'd5, S6 = 4'd6, S7 = 4'd7, S8 = 4'd8, S9 = 4'd9
  } state_t;

endpackage
