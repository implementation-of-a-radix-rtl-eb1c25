// tb_mux1: checks the multiplicand selection and alignment of mux1 on random
// operands: d appears shifted up by one with a zero below, x unchanged in the
// low 54 bits, z unchanged; z has priority over x.
module tb_mux1;
  import div_pkg::*;
  logic [W_D-1:0] d;
  logic [W_X-1:0] x;
  logic [W_Z-1:0] z, y;
  logic sel_x, sel_z;
  int checks = 0, failures = 0;

  mux1 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W_Z-1:0] e;
    for (int i = 0; i < 200; i++) begin
      d = {$urandom, $urandom};
      x = {$urandom, $urandom};
      z = {$urandom, $urandom, $urandom};
      {sel_x, sel_z} = 2'($urandom);
      #1;
      if (sel_z)      e = z;
      else if (sel_x) e = {14'b0, x};
      else            e = {14'b0, d, 1'b0};
      checks++;
      if (y !== e) begin failures++; $display("FAIL: sel %b%b y %h expected %h", sel_x, sel_z, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
