// latch3: residual register, carry-save (two 70-bit halves).
//
// Holds Md in cycle 3, w[0] in cycle 4 and w[j] in the recurrence cycles. Its
// outputs go back to the multiplier-adder and to the carry-propagate adder. The
// top 14 bits of each half, bits 69..56, are also brought out as qs and qc: read
// as 512*w they are its 12 integer and 2 fraction bits, the estimate from which
// the next quotient digit is taken. Synchronous clear has priority over load.
module latch3
  import div_pkg::*;
(
  input  logic             clk,
  input  logic             clear,
  input  logic             load,
  input  logic [W_W-1:0]   as,
  input  logic [W_W-1:0]   ac,
  output logic [W_W-1:0]   rws,
  output logic [W_W-1:0]   rwc,
  output logic [W_QCS-1:0] qs,
  output logic [W_QCS-1:0] qc
);
  always_ff @(posedge clk) begin
    if (clear) begin
      rws <= '0;
      rwc <= '0;
    end else if (load) begin
      rws <= as;
      rwc <= ac;
    end
  end
  assign qs = rws[W_W-1 -: W_QCS];
  assign qc = rwc[W_W-1 -: W_QCS];
endmodule
