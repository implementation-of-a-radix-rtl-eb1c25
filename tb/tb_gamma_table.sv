// tb_gamma_table: checks all 32 entries of the scaling-coefficient table.
//
// For each index i, d6 = (32+i)/64 and, in units of 2^-15,
// den = 8(32+i)^2 + 8(32+i) + 1 = (d6^2 + d6/64 + 2^-15)*2^15. Then
// gamma1 truncated to 13 fraction bits is floor(2^28/den) and gamma2 is
// floor(((32+i)*1024 + 512) * 2^13 / den); the table words must be their
// negations modulo 4 (-gamma1 in 15 bits, -gamma2 + 4 in 14 bits), and the
// gammas must lie in 1 < gamma1 < 4, 2 < gamma2 < 4.
module tb_gamma_table;
  import div_pkg::*;

  logic [4:0] idx;
  logic [W_G1-1:0] mgamma1;
  logic [W_G2-1:0] mgamma2;
  int checks = 0, failures = 0;

  gamma_table dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint den, g1, g2;
    for (int i = 0; i < 32; i++) begin
      idx = 5'(i);
      #1;
      den = 8 * (32 + i) * (32 + i) + 8 * (32 + i) + 1;
      g1  = (longint'(1) << 28) / den;
      g2  = ((32 + i) * 1024 + 512) * (longint'(1) << 13) / den;
      checks++;
      if (longint'(mgamma1) != ((longint'(1) << 15) - g1)) begin
        failures++; $display("FAIL: idx %0d mgamma1 %b expected %0d", i, mgamma1, (1 << 15) - g1);
      end
      checks++;
      if (longint'(mgamma2) != ((longint'(1) << 15) - g2) % (1 << 14)) begin
        failures++; $display("FAIL: idx %0d mgamma2 %b", i, mgamma2);
      end
      checks++;
      if (!(g1 > 8192 && g1 < 4 * 8192 && g2 > 2 * 8192 && g2 < 4 * 8192)) begin
        failures++; $display("FAIL: idx %0d gamma out of range", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
