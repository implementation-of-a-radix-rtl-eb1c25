// tb_latch3: random load / clear / hold sequence against a model of both
// 70-bit halves, and the quotient-estimate taps: qs and qc must be bits 69..56
// of the stored halves.
module tb_latch3;
  import div_pkg::*;
  logic clk = 1'b0, clear, load;
  logic [W_W-1:0] as, ac, rws, rwc, ms, mc;
  logic [W_QCS-1:0] qs, qc;
  int checks = 0, failures = 0;

  latch3 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1'b1; load = 1'b0; as = '0; ac = '0; ms = '0; mc = '0;
    @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      checks++;
      if (rws !== ms || rwc !== mc) begin failures++; $display("FAIL: %0d halves", i); end
      checks++;
      if (qs !== ms[69:56] || qc !== mc[69:56]) begin failures++; $display("FAIL: %0d taps", i); end
      clear = ($urandom_range(0, 9) == 0);
      load  = 1'($urandom);
      as = {$urandom, $urandom, $urandom};
      ac = {$urandom, $urandom, $urandom};
      if (clear) begin ms = '0; mc = '0; end else if (load) begin ms = as; mc = ac; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
