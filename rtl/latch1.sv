// latch1: multiplicand register.
//
// A 68-bit edge-triggered register (the document calls its registers latches).
// On a rising clock edge it is cleared when clear is high, else loaded when load
// is high, else it holds. It stores d in the first cycle of a division, x in the
// second and z from the third on. The document clears asynchronously; this
// design clears synchronously, which gives the same sequence because clear is
// only raised for whole clock cycles.
module latch1
  import div_pkg::*;
(
  input  logic           clk,
  input  logic           clear,
  input  logic           load,
  input  logic [W_Z-1:0] a,
  output logic [W_Z-1:0] y
);
  always_ff @(posedge clk) begin
    if (clear)     y <= '0;
    else if (load) y <= a;
  end
endmodule
