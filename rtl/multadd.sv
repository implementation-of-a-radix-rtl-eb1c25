// multadd: the multiplier-adder, sum = A - R*C, shared by all four operations.
//
// R arrives recoded (digits of -R) from the recoder, C is the 68-bit input inz.
//   scale high: -M = -gamma2 - d15*(-gamma1)   (A = -gamma2 via mgamma2)
//   scale, sel low: z = M*d or w[0] = M*x       (A = 0, R = -M)
//   sel high:   w[j+1] = 512*w[j] - q[j+1]*z    (A = 512*(rws + rwc))
// mult forms the rows, add_tree reduces them to the carry-save result ws/wc;
// ms/mc are the -M field of that result. One clock cycle of combinational logic.
// wc[0] is always zero (the last 3:2 row shifts its carries up by one place).
module multadd
  import div_pkg::*;
(
  input  rdigits_t        dig,
  input  logic [W_Z-1:0]  inz,
  input  logic [W_G2-1:0] mgamma2,
  input  logic [W_W-1:0]  rws,
  input  logic [W_W-1:0]  rwc,
  input  logic            scale,
  input  logic            sel,
  output logic [W_W-1:0]  ws,
  output logic [W_W-1:0]  wc,
  output logic [W_M-1:0]  ms,
  output logic [W_M-1:0]  mc
);
  logic [W_W-1:0] t [N_DIG];
  logic           neg;

  mult u_mult (
    .dig(dig), .inz(inz), .scale(scale), .sel(sel), .rws(rws), .rwc(rwc),
    .t(t), .neg(neg)
  );

  add_tree u_tree (
    .t(t), .neg(neg), .scale(scale), .sel(sel), .mgamma2(mgamma2),
    .ws(ws), .wc(wc), .ms(ms), .mc(mc)
  );
endmodule
