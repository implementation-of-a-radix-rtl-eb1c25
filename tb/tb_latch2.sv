// tb_latch2: random load / clear / hold sequence against a model register.
// Load takes the input at the clock edge, clear empties the register and has
// priority, otherwise the value holds.
module tb_latch2;
  import div_pkg::*;
  logic clk = 1'b0, clear, load;
  logic [W_M-1:0] as, ac, ys, yc, ms, mc;
  int checks = 0, failures = 0;

  latch2 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nld = 0, nhold = 0;
    clear = 1'b1; load = 1'b0; as = '0; ac = '0; ms = '0; mc = '0;
    @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      checks++;
      if (ys !== ms || yc !== mc) begin failures++; $display("FAIL: %0d", i); end
      clear = ($urandom_range(0, 9) == 0);
      load  = 1'($urandom);
      as = 15'($urandom); ac = 15'($urandom);
      if (clear) begin ms = '0; mc = '0; end else if (load) begin ms = as; mc = ac; nld++; end else nhold++;
    end
    checks++;
    if (nld == 0 || nhold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
