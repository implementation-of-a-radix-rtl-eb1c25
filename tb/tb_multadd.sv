// tb_multadd: checks sum = A + (signed-digit multiplier) * C in all three modes.
// Random one-hot digits d_k in {-2..2} (the digits the recoder delivers) and a
// random multiplicand are applied; the carry-save result ws + wc must equal,
// modulo 2^70, the product computed here with wide signed integers plus
//   scale high:  A = -gamma2 word: (mgamma2 - 2^15) * 2^15, C = {1, inz} (negative)
//   both low:    A = 0, C = {0, inz}
//   sel high:    A = 512*(rws + rwc), digits 6 and 7 zero, C = {0, inz}.
// With scale high the -M field (ms + mc modulo 2^15) must also be the bits
// 29..15 of that sum, or one less (each half truncated separately).
module tb_multadd;
  import div_pkg::*;
  rdigits_t dig;
  logic [W_Z-1:0] inz;
  logic [W_G2-1:0] mgamma2;
  logic [W_W-1:0] rws, rwc, ws, wc;
  logic scale, sel;
  logic [W_M-1:0] ms, mc;
  int checks = 0, failures = 0;

  multadd dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [139:0] c, r, a, e;
    logic [W_W-1:0] e70, s70;
    logic [W_M-1:0] fld, msum;
    int nd, nneg7, nneg5;
    nneg7 = 0; nneg5 = 0;
    for (int i = 0; i < 1500; i++) begin
      {scale, sel} = (i % 3 == 0) ? 2'b10 : (i % 3 == 1) ? 2'b00 : 2'b01;
      inz = {$urandom, $urandom, $urandom};
      mgamma2 = 14'($urandom);
      rws = {$urandom, $urandom, $urandom};
      rwc = {$urandom, $urandom, $urandom};
      dig = '0;
      r = 0;
      for (int k = N_DIG - 1; k >= 0; k--) begin
        nd = $urandom_range(0, 4) - 2;
        if (sel && k >= N_DIG - 2) nd = 0;
        case (nd)
          -2: dig.m2[k] = 1'b1;
          -1: dig.m1[k] = 1'b1;
           1: dig.p1[k] = 1'b1;
           2: dig.p2[k] = 1'b1;
          default: ;
        endcase
        r = r * 4 + 140'(signed'(nd));
      end
      if (dig.m1[7] | dig.m2[7]) nneg7++;
      if (sel && (dig.m1[5] | dig.m2[5])) nneg5++;
      c = scale ? 140'(signed'({1'b1, inz})) : 140'(signed'({1'b0, inz}));
      if (scale)    a = 140'(signed'({2'b10, mgamma2})) <<< 15;
      else if (sel) a = (140'(rws) + 140'(rwc)) <<< 9;
      else          a = 0;
      e = a + r * c;
      #1;
      e70 = e[W_W-1:0];
      s70 = ws + wc;
      checks++;
      if (s70 !== e70) begin
        failures++; $display("FAIL: mode %b%b sum %h expected %h", scale, sel, s70, e70);
      end
      if (scale) begin
        fld  = e70[29:15];
        msum = ms + mc;
        checks++;
        if (!(msum == fld || msum == fld - 15'd1) || ms !== ws[29:15] || mc !== wc[29:15]) begin
          failures++; $display("FAIL: -M field %h expected %h", msum, fld);
        end
      end
    end
    checks++;
    if (nneg7 == 0 || nneg5 == 0) begin failures++; $display("FAIL: negative top rows not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
