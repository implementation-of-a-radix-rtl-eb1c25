// tb_recoder: checks the radix-4 signed-digit recoding.
// For random 16-bit carry-save inputs and transfer bits, every digit group must
// be one-hot or zero, the digits of -R must satisfy R = -(sum d_k 4^k) with
// R congruent to zs + zc + t0 + h0 modulo 2^16 and R in [-27306, 43690] (top digit in -1..2, lower digits in -2..2),
// and for inputs built to represent a value V in [-16384, 32767] (the three uses:
// d15, -M and the quotient estimate) R must equal V exactly.
module tb_recoder;
  import div_pkg::*;
  logic [W_REC-1:0] zs, zc;
  logic t0, h0;
  rdigits_t dig;
  int checks = 0, failures = 0;

  recoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int value_of(rdigits_t g);
    int r = 0;
    for (int k = N_DIG - 1; k >= 0; k--) begin
      int dk;
      dk = 2 * int'(g.p2[k]) + int'(g.p1[k]) - int'(g.m1[k]) - 2 * int'(g.m2[k]);
      r = r * 4 + dk;
    end
    return -r;   // the outputs are the digits of -R
  endfunction

  initial begin
    int v, r;
    for (int i = 0; i < 2000; i++) begin
      t0 = 1'($urandom); h0 = 1'($urandom);
      zs = 16'($urandom);
      if (i % 2 == 0) begin
        zc = 16'($urandom);
      end else begin
        v  = $urandom_range(0, 49151) - 16384;
        zc = 16'(v - int'(zs) - int'(t0) - int'(h0));
      end
      #1;
      r = value_of(dig);
      checks++;
      for (int k = 0; k < N_DIG; k++)
        if (int'(dig.m2[k]) + int'(dig.m1[k]) + int'(dig.p1[k]) + int'(dig.p2[k]) > 1) begin
          failures++; $display("FAIL: digit %0d not one-hot", k);
        end
      checks++;
      if (16'(r) != 16'(zs + zc + 16'(t0) + 16'(h0)) || r < -27306 || r > 43690) begin
        failures++; $display("FAIL: zs %h zc %h t %b h %b R %0d", zs, zc, t0, h0, r);
      end
      if (i % 2 == 1) begin
        checks++;
        if (r != v) begin failures++; $display("FAIL: V %0d recoded as %0d", v, r); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
