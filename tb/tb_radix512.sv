// tb_radix512: end-to-end test of the radix-512 divider at its full size.
//
// Issues divisions back to back, one every ten cycles: the special operands of
// the boundary cases (largest and smallest d, x near d, exact quotients,
// periodic quotient), operands with x just below d (first digit 512), and
// random ones. Each quotient is compared with floor((x*2^53 + d) / (2d)) in
// 53-bit units, i.e. x/d rounded to nearest, computed here with wide integer
// division, and for the exactly known special cases also with the stated value.
// It checks that each result appears ten cycles after its operands were taken,
// and counts the datapath events the design must handle: a first digit of 512,
// negative and zero digits, q+1 reaching 512 in the conversion, and a final
// residual of each sign. One that never happens is counted as a failure.
module tb_radix512;
  import div_pkg::*;

  localparam int NRAND = 400;

  logic clk = 1'b0;
  logic reset = 1'b1;
  logic [W_D-1:0] d = '0;
  logic [W_X-1:0] x = '0;
  logic [W_D-1:0] q;
  logic op_ld, q_valid;

  int checks = 0, failures = 0;
  int cycle = 0;

  radix512 dut (.clk(clk), .reset(reset), .d(d), .x(x), .q(q), .op_ld(op_ld), .q_valid(q_valid));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event counters, sampled from the conversion unit
  int n_q512 = 0, n_neg = 0, n_zero = 0, n_det512 = 0, n_pos_res = 0, n_neg_res = 0;
  always @(posedge clk) if (!reset) begin
    if (dut.digit && dut.state != S9) begin
      if (dut.u_convert.qk == 12'sd512) n_q512++;
      if (dut.u_convert.qsig) n_neg++;
      if (dut.u_convert.det0) n_zero++;
      if (dut.u_convert.det512) n_det512++;
    end
    if (dut.round && dut.state == S9 && !dut.u_control.idle) begin
      if (dut.sign) n_neg_res++; else n_pos_res++;
    end
  end

  function automatic logic [W_D-1:0] ref_q(input logic [W_X-1:0] xx, input logic [W_D-1:0] dd);
    logic [127:0] num, den;
    num = (128'(xx) << 53) + 128'(dd);
    den = 128'(dd) << 1;
    return W_D'(num / den);
  endfunction

  logic [W_D-1:0] exp_q, stated_q;
  logic           have_exp = 1'b0, have_stated = 1'b0;
  int             issued_at = 0;

  task automatic issue(input logic [W_X-1:0] xx, input logic [W_D-1:0] dd,
                       input logic st_en, input logic [W_D-1:0] st);
    // wait for the operand-load cycle; check the previous result there
    @(negedge clk);
    while (!op_ld) @(negedge clk);
    if (have_exp) begin
      checks++;
      if (!q_valid) begin failures++; $display("FAIL: q_valid low at result time"); end
      checks++;
      if (cycle - issued_at != N_CYC) begin
        failures++; $display("FAIL: latency %0d cycles", cycle - issued_at);
      end
      checks++;
      if (q !== exp_q) begin
        failures++; $display("FAIL: q=%h expected %h", q, exp_q);
      end
      if (have_stated) begin
        checks++;
        if (q !== stated_q) begin failures++; $display("FAIL: q=%h stated %h", q, stated_q); end
      end
    end
    d = dd;
    x = xx;
    exp_q = ref_q(xx, dd);
    have_exp = 1'b1;
    have_stated = st_en;
    stated_q = st;
    issued_at = cycle;
  endtask

  localparam logic [W_D-1:0] DMAX = {W_D{1'b1}};          // 1 - 2^-53
  localparam logic [W_D-1:0] HALF = {1'b1, {(W_D-1){1'b0}}};
  localparam logic [W_X-1:0] XHALF = {1'b1, {(W_X-1){1'b0}}};  // 0.5 in the x frame

  initial begin
    logic [W_D-1:0] dd;
    logic [W_X-1:0] xx;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    // the special operands (x in units of 2^-54, d in units of 2^-53)
    issue(54'(3) << 52, 53'(7) << 50, 1'b0, '0);                  // 0.75 / 0.875
    issue(54'(21) << 49, 53'(7) << 50, 1'b1, 53'(3) << 51);       // 0.65625 / 0.875 = 0.75
    issue(XHALF, 53'(5404319552844595), 1'b0, '0);                // 0.5 / 0.6
    issue(XHALF, DMAX, 1'b1, HALF + 53'd1);                       // d largest
    issue(54'(1) << 52, HALF, 1'b1, HALF);                        // x, d smallest
    issue(54'(1) << 52, DMAX, 1'b1, 53'(1) << 51);                // x smallest, d largest
    issue({W_X{1'b1}} - 54'd5, DMAX, 1'b1, DMAX - 53'd1);         // x, d near 1
    issue(XHALF, HALF + 53'd1, 1'b1, DMAX - 53'd1);               // d just above 0.5
    issue(XHALF - 54'd2, HALF, 1'b0, '0);                         // x just below 0.5
    issue(XHALF - 54'd2, (53'(3) << 51) - 53'd1, 1'b0, '0);       // periodic quotient
    // x just below d: first digit 512
    for (int i = 0; i < 40; i++) begin
      dd = {1'b1, 52'($urandom) ^ (52'($urandom) << 32)};
      xx = {dd, 1'b0} - 54'($urandom_range(1, 1 << 20));
      issue(xx, dd, 1'b0, '0);
    end
    // random operands with d/2 <= x < d, and with small x
    for (int i = 0; i < NRAND; i++) begin
      dd = {1'b1, 52'({$urandom, $urandom})};
      xx = {dd, 1'b0} - 54'(1) - (54'({$urandom, $urandom}) % 54'(dd));
      if (i % 4 == 3) xx = 54'({$urandom, $urandom}) % {dd, 1'b0};
      if (xx < 54'(1) << 52) xx = xx | (54'(1) << 52);
      issue(xx, dd, 1'b0, '0);
    end
    issue(XHALF, HALF | 53'd1, 1'b0, '0);   // final collection of the last result
    checks++;
    if (n_q512 == 0)    begin failures++; $display("FAIL: no first digit of 512"); end
    if (n_neg == 0)     begin failures++; $display("FAIL: no negative digit"); end
    if (n_zero == 0)    begin failures++; $display("FAIL: no zero digit"); end
    if (n_det512 == 0)  begin failures++; $display("FAIL: no q+1 = 512"); end
    if (n_pos_res == 0) begin failures++; $display("FAIL: no non-negative final residual"); end
    if (n_neg_res == 0) begin failures++; $display("FAIL: no negative final residual"); end
    $display("events: q=512 %0d, negative digits %0d, zero digits %0d, q+1=512 %0d, residual >=0 %0d, <0 %0d",
             n_q512, n_neg, n_zero, n_det512, n_pos_res, n_neg_res);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
