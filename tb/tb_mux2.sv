// tb_mux2: checks the three recoder sources on random inputs.
//   s1: zs/zc are the sign-extended integer parts of qs/qc, and
//       zs + zc + e + f (as signed numbers) = floor((qs + qc)/4 + 1/2),
//       the rounded quotient-digit estimate, computed here directly.
//   s2: for a random -M value V in [-2^14, 0) split randomly into two 15-bit
//       halves, zs + zc must equal V modulo 2^16; e = f = 0.
//   s3: zs = d15, zc = 0.
module tb_mux2;
  import div_pkg::*;
  logic [W_QCS-1:0] qs, qc;
  logic [W_M-1:0] ms, mc;
  logic [14:0] d15;
  logic s1, s2, s3, e, f;
  logic [W_REC-1:0] zs, zc;
  int checks = 0, failures = 0;

  mux2 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, y, r, hw;
    for (int i = 0; i < 600; i++) begin
      qs = 14'($urandom); qc = 14'($urandom); ms = 15'($urandom); mc = 15'($urandom);
      d15 = 15'($urandom);
      {s1, s2, s3} = 3'b100 >> (i % 3);
      if (s2) begin
        v  = -$urandom_range(1, 16384);
        ms = 15'($urandom);
        mc = 15'(v - int'(ms));
      end
      #1;
      checks++;
      if (s1) begin
        y  = int'(signed'(qs)) + int'(signed'(qc));          // units of 1/4
        r  = (y + 2) >>> 2;                                   // floor(y/4 + 1/2)
        hw = int'(signed'(zs)) + int'(signed'(zc)) + int'(e) + int'(f);
        if (hw != r || zs[15:12] != {4{qs[13]}}) begin
          failures++; $display("FAIL: s1 qs %h qc %h -> %0d expected %0d", qs, qc, hw, r);
        end
      end else if (s2) begin
        if (16'(zs + zc) != 16'(v) || e || f) begin
          failures++; $display("FAIL: s2 V %0d ms %h mc %h zs %h zc %h", v, ms, mc, zs, zc);
        end
      end else begin
        if (zs != {1'b0, d15} || zc != '0 || e || f) begin failures++; $display("FAIL: s3"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
