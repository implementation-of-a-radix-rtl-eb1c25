// tb_latch1: random load / clear / hold sequence against a model register.
// Load takes the input at the clock edge, clear empties the register and has
// priority, otherwise the value holds.
module tb_latch1;
  import div_pkg::*;
  logic clk = 1'b0, clear, load;
  logic [W_Z-1:0] a, y, m;
  int checks = 0, failures = 0;

  latch1 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nld = 0, nhold = 0;
    clear = 1'b1; load = 1'b0; a = '0; m = '0;
    @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      checks++;
      if (y !== m) begin failures++; $display("FAIL: %0d y %h expected %h", i, y, m); end
      clear = ($urandom_range(0, 9) == 0);
      load  = 1'($urandom);
      a     = {$urandom, $urandom, $urandom};
      if (clear) m = '0; else if (load) begin m = a; nld++; end else nhold++;
    end
    checks++;
    if (nld == 0 || nhold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
