// tb_random_vectors: runs the published set of random division vectors
// through the full-size divider.
//
// Each vector gives x, d and the expected 53-bit quotient; they are read from
// tb/random_vectors.hex (three words per vector: x in units of 2^-54, d and q in
// units of 2^-53) and issued back to back, one every ten cycles, the way a
// user of the divider would: d and x are presented when op_ld is high and the
// result is taken when q_valid is high. Every quotient is compared with the
// published value and with floor((x*2^53 + d) / (2d)), x/d rounded to nearest,
// computed here; the ten-cycle latency is checked too.
module tb_random_vectors;
  import div_pkg::*;

  localparam int NVEC = 80;

  logic clk = 1'b0;
  logic reset = 1'b1;
  logic [W_D-1:0] d = '0;
  logic [W_X-1:0] x = '0;
  logic [W_D-1:0] q;
  logic op_ld, q_valid;
  logic [55:0] mem [3*NVEC];

  int checks = 0, failures = 0;
  int cycle = 0;

  radix512 dut (.clk(clk), .reset(reset), .d(d), .x(x), .q(q), .op_ld(op_ld), .q_valid(q_valid));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W_D-1:0] ref_q(input logic [W_X-1:0] xx, input logic [W_D-1:0] dd);
    logic [127:0] num, den;
    num = (128'(xx) << 53) + 128'(dd);
    den = 128'(dd) << 1;
    return W_D'(num / den);
  endfunction

  initial begin
    logic [W_D-1:0] pub_q, exp_q;
    int issued_at, nvalid;
    for (int i = 0; i < 3 * NVEC; i++) mem[i] = '0;
    $readmemh("tb/random_vectors.hex", mem);
    nvalid = 0;
    for (int i = 0; i < NVEC; i++) if (mem[3*i+1] != 0) nvalid++;
    checks++;
    if (nvalid != NVEC) begin failures++; $display("FAIL: %0d vectors read", nvalid); end
    repeat (3) @(posedge clk);
    reset = 1'b0;
    for (int i = 0; i <= NVEC; i++) begin
      @(negedge clk);
      while (!op_ld) @(negedge clk);
      if (i > 0) begin
        checks += 3;
        if (!q_valid) begin failures++; $display("FAIL: vector %0d q_valid low", i - 1); end
        if (cycle - issued_at != N_CYC) begin failures++; $display("FAIL: latency %0d", cycle - issued_at); end
        if (q !== pub_q || q !== exp_q) begin
          failures++; $display("FAIL: vector %0d q=%h published %h computed %h", i - 1, q, pub_q, exp_q);
        end
      end
      if (i < NVEC) begin
        x = W_X'(mem[3*i]);
        d = W_D'(mem[3*i+1]);
        pub_q = W_D'(mem[3*i+2]);
        exp_q = ref_q(x, d);
        issued_at = cycle;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
