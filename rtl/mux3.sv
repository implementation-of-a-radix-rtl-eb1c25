// mux3: multiplicand input of the multiplier-adder.
//
// With sel high it passes -gamma1 (from gamma_table) as a negative number: the
// 15-bit table word in the low bits and ones in all bits above it, so that the
// 68-bit value (with the sign the multiplier adds above it) equals
// -4 + mgamma1/2^13 in units of 2^-13. With sel low it passes latch1 unchanged.
// The document states that the positions above -gamma1 are filled with zeros in
// one place and shows them as ones in its operand alignment table; the ones are
// followed here because the product needs the negative value. Combinational.
module mux3
  import div_pkg::*;
(
  input  logic [W_G1-1:0] mgamma1,
  input  logic [W_Z-1:0]  c,
  input  logic            sel,      // controller line MX2S3
  output logic [W_Z-1:0]  y
);
  always_comb begin
    if (sel) y = {{(W_Z-W_G1){1'b1}}, mgamma1};
    else     y = c;
  end
endmodule
