// latch2: holds -M in carry-save form (two 15-bit halves).
//
// Loaded at the end of the first cycle of a division from the multiplier-adder's
// -M outputs, and read by mux2 in the next two cycles while the operands are
// scaled. Synchronous clear has priority over load; otherwise it holds.
module latch2
  import div_pkg::*;
(
  input  logic           clk,
  input  logic           clear,
  input  logic           load,
  input  logic [W_M-1:0] as,
  input  logic [W_M-1:0] ac,
  output logic [W_M-1:0] ys,
  output logic [W_M-1:0] yc
);
  always_ff @(posedge clk) begin
    if (clear) begin
      ys <= '0;
      yc <= '0;
    end else if (load) begin
      ys <= as;
      yc <= ac;
    end
  end
endmodule
