// control: sequencer of the radix-512 divider.
//
// A ten-state counter, one state per clock cycle of a division, decoded into the
// load, clear and select lines of the datapath (Moore outputs):
//   S0  -M = gamma2 - gamma1*d15 in the multiplier-adder; d -> latch1, -M -> latch2
//   S1  M*d;  x -> latch1, Md -> latch3
//   S2  M*x;  z (carry-propagated Md) -> latch1, w[0] -> latch3
//   S3..S8  six recurrence steps w[j+1] = 512 w[j] - q[j+1] z, one digit per cycle
//   S9  sign of w[6] and final rounding of the quotient
// After S9 the counter wraps to S0, so divisions follow each other every ten cycles
// and the operands must be presented at S0 (d) and S1 (x).
// reset (asynchronous, active high) puts the counter in an idle form of S9 that
// clears the latches and the conversion registers; the first S0 follows it.
// The state sequence and the value of each line in each state follow the
// document's controller and its timing diagram. op_ld and q_valid are this
// design's own outputs: op_ld is high in S0 (d is sampled in this cycle, x in the
// next), q_valid is high in S0 when q holds the result of the previous division.
// reset is asynchronous for the state flops and also disables the select-line
// assertion, which is why lint sees it used both ways.
module control
  import div_pkg::*;
(
  input  logic clk,
  input  logic reset,
  output logic cl1,      // clear latch1..latch3
  output logic cl2,      // clear conversion registers
  output logic digit,    // convert: take one quotient digit
  output logic round,    // convert: final rounding / load output
  output logic ld1,      // latch1 load
  output logic ld2,      // latch2 load
  output logic ld3,      // latch3 load
  output logic mx1l,     // mux1: x (when mx1h low)
  output logic mx1h,     // mux1: z
  output logic mx2s1,    // mux2: quotient digit to recoder, multadd SEL
  output logic mx2s2,    // mux2: -M to recoder
  output logic mx2s3,    // mux2: d15 to recoder, mux3 gamma1, multadd SCALE
  output logic op_ld,
  output logic q_valid,
  output state_t state
);

  logic idle;        // in the reset form of S9
  logic have_result; // at least one division has completed

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state       <= S9;
      idle        <= 1'b1;
      have_result <= 1'b0;
    end else begin
      if (state == S9) begin
        state <= S0;
        idle  <= 1'b0;
        if (!idle) have_result <= 1'b1;
      end else begin
        state <= state_t'(state + 4'd1);
      end
    end
  end

  always_comb begin
    {cl1, cl2, digit, round, ld1, ld2, ld3, mx1l, mx1h, mx2s1, mx2s2, mx2s3} = '0;
    unique case (state)
      S0: begin ld1 = 1'b1; ld2 = 1'b1; cl2 = 1'b1; mx2s3 = 1'b1; end
      S1: begin ld1 = 1'b1; ld3 = 1'b1; mx1l = 1'b1; mx2s2 = 1'b1; end
      S2: begin ld1 = 1'b1; ld3 = 1'b1; mx1l = 1'b1; mx1h = 1'b1; mx2s2 = 1'b1; end
      S3, S4, S5, S6, S7, S8: begin
        ld3 = 1'b1; mx1l = 1'b1; mx1h = 1'b1; mx2s1 = 1'b1; digit = 1'b1;
      end
      S9: begin
        if (idle) begin
          cl1 = 1'b1; cl2 = 1'b1; round = 1'b1; mx2s3 = 1'b1;
        end else begin
          ld3 = 1'b1; mx1l = 1'b1; mx1h = 1'b1; mx2s1 = 1'b1; digit = 1'b1; round = 1'b1;
        end
      end
      default: ;
    endcase
  end

  assign op_ld   = (state == S0);
  assign q_valid = (state == S0) && have_result;

  // exactly one recoder source is selected in every state
  property p_one_src;
    @(posedge clk) disable iff (reset) $onehot({mx2s1, mx2s2, mx2s3});
  endproperty
  a_one_src: assert property (p_one_src);

endmodule
