// tb_mux3: checks that mux3 passes latch1 when sel is low, and when sel is high
// a 68-bit word whose signed value (with the negative sign the multiplier adds)
// is -4 + mgamma1/2^13 in units of 2^-13, i.e. equals mgamma1 - 2^15.
module tb_mux3;
  import div_pkg::*;
  logic [W_G1-1:0] mgamma1;
  logic [W_Z-1:0] c, y;
  logic sel;
  int checks = 0, failures = 0;

  mux3 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      mgamma1 = 15'($urandom);
      c = {$urandom, $urandom, $urandom};
      sel = 1'($urandom);
      #1;
      checks++;
      if (sel) begin
        if (longint'(signed'({1'b1, y})) != longint'(mgamma1) - 32768) begin
          failures++; $display("FAIL: gamma1 word %h for %h", y, mgamma1);
        end
      end else if (y !== c) begin
        failures++; $display("FAIL: pass-through %h expected %h", y, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
