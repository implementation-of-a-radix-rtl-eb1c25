// tb_convert: checks the on-the-fly conversion and the final rounding.
// Each test takes six digits q1..q6 (q1 in [-511, 512], the others in
// [-511, 511], with runs of zeros, 511s and 512 mixed in), presents each as a
// random carry-save pair whose rounded value floor((qs+qc)/4 + 1/2) is that
// digit, then a residual sign. The output must be
//   ((sum q_j 512^(6-j)) mod 2^54 + (sign ? 0 : 1)) >> 1,
// the accumulated quotient plus one unit when the residual is non-negative,
// with its last bit dropped, computed here with plain integer arithmetic.
// Also counts digits 0, negative, q+1 = 512 and both signs.
module tb_convert;
  import div_pkg::*;
  logic clk = 1'b0, clear, digit, round, sign;
  logic [W_QCS-1:0] a1, a2;
  logic [W_D-1:0] q;
  int checks = 0, failures = 0;

  convert dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [63:0] acc;
    logic [W_Q-1:0] exp54;
    logic [W_D-1:0] expq;
    int qd, y;
    int nzero = 0, nneg = 0, n511 = 0, npos = 0, nnegs = 0;
    clear = 1'b1; digit = 1'b0; round = 1'b0; sign = 1'b0; a1 = '0; a2 = '0;
    @(negedge clk);
    for (int t = 0; t < 400; t++) begin
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      acc = 0;
      for (int j = 1; j <= 6; j++) begin
        case ($urandom_range(0, 7))
          0: qd = 0;
          1: qd = 511;
          2: qd = (j == 1) ? 512 : -511;
          default: qd = $urandom_range(0, 1022) - 511;
        endcase
        if (qd == 0) nzero++;
        if (qd < 0) nneg++;
        if (qd == 511 || qd == 512) n511++;
        acc = acc * 512 + 64'(qd);
        y  = 4 * qd - 2 + $urandom_range(0, 3);          // floor(y/4 + 1/2) = qd
        a1 = 14'($urandom);
        a2 = 14'(y - int'(signed'(a1)));
        digit = 1'b1;
        @(negedge clk);
      end
      digit = 1'b0;
      sign  = 1'($urandom);
      if (sign) nnegs++; else npos++;
      round = 1'b1;
      @(negedge clk);
      round = 1'b0;
      exp54 = W_Q'(acc) + W_Q'(!sign);
      expq  = exp54[W_Q-1:1];
      checks++;
      if (q !== expq) begin failures++; $display("FAIL: test %0d q %h expected %h", t, q, expq); end
    end
    checks++;
    if (nzero == 0 || nneg == 0 || n511 == 0 || npos == 0 || nnegs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
