// tb_control: checks the divider's sequencer state by state.
//
// After reset the controller must sit in the idle form of S9 (clears and ROUND
// high), then run S0..S9 repeatedly. For three whole divisions every output
// line is compared, in every cycle, with the expected line values of that
// cycle of the schedule (written out here as a table), op_ld must come every
// ten cycles and q_valid only from the second S0 on.
module tb_control;
  import div_pkg::*;

  logic clk = 1'b0, reset = 1'b1;
  logic cl1, cl2, digit, round, ld1, ld2, ld3, mx1l, mx1h, mx2s1, mx2s2, mx2s3, op_ld, q_valid;
  state_t state;
  int checks = 0, failures = 0;

  control dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected {cl1,cl2,digit,round,ld1,ld2,ld3,mx1l,mx1h,mx2s1,mx2s2,mx2s3} per cycle 0..9
  function automatic logic [11:0] expect_lines(int c);
    case (c)
      0: return 12'b0_1_0_0_1_1_0_0_0_0_0_1;
      1: return 12'b0_0_0_0_1_0_1_1_0_0_1_0;
      2: return 12'b0_0_0_0_1_0_1_1_1_0_1_0;
      3, 4, 5, 6, 7, 8: return 12'b0_0_1_0_0_0_1_1_1_1_0_0;
      default: return 12'b0_0_1_1_0_0_1_1_1_1_0_0;
    endcase
  endfunction

  initial begin
    logic [11:0] got;
    repeat (2) @(negedge clk);
    got = {cl1, cl2, digit, round, ld1, ld2, ld3, mx1l, mx1h, mx2s1, mx2s2, mx2s3};
    checks++;
    if (got !== 12'b1_1_0_1_0_0_0_0_0_0_0_1 || op_ld) begin
      failures++; $display("FAIL: idle lines %b", got);
    end
    @(negedge clk) reset = 1'b0;
    @(posedge clk);
    for (int div = 0; div < 3; div++) begin
      for (int c = 0; c < N_CYC; c++) begin
        @(negedge clk);
        got = {cl1, cl2, digit, round, ld1, ld2, ld3, mx1l, mx1h, mx2s1, mx2s2, mx2s3};
        checks++;
        if (got !== expect_lines(c)) begin
          failures++; $display("FAIL: division %0d cycle %0d lines %b expected %b", div, c, got, expect_lines(c));
        end
        checks++;
        if (op_ld !== (c == 0) || q_valid !== (c == 0 && div > 0)) begin
          failures++; $display("FAIL: division %0d cycle %0d op_ld %b q_valid %b", div, c, op_ld, q_valid);
        end
        checks++;
        if (int'(state) != c) begin failures++; $display("FAIL: state %0d at cycle %0d", state, c); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
