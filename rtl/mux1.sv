// mux1: selects the multiplicand to be stored in latch1 and aligns it.
//
// sel_z high selects z (68 bits, weight 2^(i-67)); otherwise sel_x high selects
// the dividend x and low the divisor d. Both are placed with weight 2^(i-54), d
// with a zero appended below its last bit, so that a product with the 13-fraction-
// bit scaling factor lands in the residual frame (67 fraction bits).
// The three sources follow the document; the exact alignment is this design's own.
// Combinational.
module mux1
  import div_pkg::*;
(
  input  logic [W_D-1:0] d,
  input  logic [W_X-1:0] x,
  input  logic [W_Z-1:0] z,
  input  logic           sel_x,   // controller line MX1L
  input  logic           sel_z,   // controller line MX1H
  output logic [W_Z-1:0] y
);
  always_comb begin
    if (sel_z)      y = z;
    else if (sel_x) y = W_Z'(x);
    else            y = W_Z'({d, 1'b0});
  end
endmodule
