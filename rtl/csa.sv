// csa: W-bit carry-save (3:2) adder, a row of full adders without carry ripple.
//
// s = a ^ b ^ c bit by bit; cy is the majority of each bit position shifted one
// place up, with a zero in bit 0 and the carry out of the top bit dropped, so
// that s + cy = a + b + c modulo 2^W. Combinational.
module csa #(
  parameter int unsigned W = 70
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);
  logic [W-1:0] maj;
  assign s   = a ^ b ^ c;
  assign maj = (a & b) | (a & c) | (b & c);
  assign cy  = {maj[W-2:0], 1'b0};
endmodule
