// tb_cpa: random and corner carry-save pairs (all-ones plus one, long carry
// chains across every 16-bit block boundary) against the integer sum:
// z must be the low 68 bits of ws + wc and sign bit 69.
module tb_cpa;
  import div_pkg::*;
  logic [W_W-1:0] ws, wc;
  logic [W_Z-1:0] z;
  logic sign;
  int checks = 0, failures = 0;

  cpa dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [W_W-1:0] s;
    #1;
    s = ws + wc;
    checks++;
    if (z !== s[W_Z-1:0] || sign !== s[W_W-1]) begin
      failures++; $display("FAIL: %h + %h: z %h sign %b", ws, wc, z, sign);
    end
  endtask

  initial begin
    ws = '1; wc = 70'd1; check();
    for (int b = 0; b < W_W; b++) begin ws = (70'd1 << b) - 70'd1; wc = 70'd1; check(); end
    for (int b = 0; b < W_W; b++) begin ws = '1 << b; wc = 70'd1 << b; check(); end
    for (int i = 0; i < 500; i++) begin
      ws = {$urandom, $urandom, $urandom};
      wc = {$urandom, $urandom, $urandom};
      if (i % 3 == 0) wc = ~ws + 70'($urandom_range(0, 3));
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
